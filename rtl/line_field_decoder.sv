// line_field_decoder: recovers video timing from a BT.656 (ITU-R 656) word stream.
//
// The stream carries Cb,Y,Cr,Y,... words at the 27 MHz pixel clock, with timing
// embedded as timing reference signals: the preamble 3FF 000 000 followed by an
// XY word = {1, F, V, H, P3, P2, P1, P0} in bits [9:2]. H=1 marks EAV (end of
// active video), H=0 marks SAV. F is the field (0 = field 1) and V is vertical
// blanking. The decoder:
//   * watches a 4-word history for TRS codes and checks the Hamming protection
//     bits (P3=V^H, P2=F^H, P1=F^V, P0=F^V^H); a bad XY word is ignored and
//     reported on trs_err;
//   * detects NTSC or PAL by counting words from EAV to SAV (272 for NTSC,
//     284 for PAL) -- pal_ntsc_out = 1 for PAL;
//   * keeps the line count: +1 at every EAV, wrapping after 525/625, and
//     reloaded with 266 (NTSC) or 313 (PAL) when F goes from 0 to 1;
//   * keeps a word count within the line (0 = first Cb after SAV);
//   * derives active-low hsync_out, vsync_out and blank_out.
// The video words are passed through with a delay of DELAY=4 clocks so that
// every output (h/v/f/de/counts) is aligned with vid_out: the TRS words of EAV
// and SAV are never marked active (de_out = 0) and the first word with de_out=1
// is Cb0 of the line.
// Timing: EAV decoded on the cycle its XY word enters; H, V, F, lcnt update on
// the same edge the EAV's 3FF word leaves on vid_out. H falls on the edge Cb0
// leaves. Latency input to output: 4 clocks.
// From the description: TRS codes, XY bit meaning, protection bits, the
// 266/313 reload, EAV-to-SAV format detection, pass-through with delay.
// Own choices: the 4-clock delay, the error handling, the sync-signal shapes
// (hsync low for 64 samples after a 16-sample front porch; vsync low for the
// first 3 lines after each F change; blank low whenever H or V is set).
module line_field_decoder
  import fasic_pkg::*;
#(
  parameter int W = VID_W
) (
  input  logic         clk,
  input  logic         rst,          // synchronous, active high
  input  logic [W-1:0] vid_in,
  output logic [W-1:0] vid_out,      // vid_in delayed 4 clocks
  output logic         h_out,        // 1 during horizontal blanking (EAV..SAV)
  output logic         v_out,        // 1 during vertical blanking
  output logic         f_out,        // field: 0 = field 1 (odd), 1 = field 2
  output logic         de_out,       // active picture word on vid_out
  output logic [11:0]  wcnt_out,     // word index in line, 0 = Cb0 after SAV
  output logic [10:0]  pcnt_out,     // sample index in line = wcnt_out/2
  output logic [9:0]   lcnt_out,     // line number 1..525 / 1..625
  output logic         pal_ntsc_out, // 1 = PAL (625 lines), 0 = NTSC (525)
  output logic         hsync_out,    // active low
  output logic         vsync_out,    // active low
  output logic         blank_out,    // active low
  output logic         trs_err       // one-clock pulse: XY word failed its check
);

  logic [W-1:0] hist [3];            // hist[0] = previous word, hist[2] oldest
  logic [W-1:0] dly  [4];
  logic [3:0]   sav_pipe;
  logic [11:0]  eav_cnt;             // words since EAV decoded (saturating)
  logic         eav_seen;
  logic [1:0]   vs_cnt;

  // XY word decode on the incoming word
  logic preamble, xy_valid, xy_hit, xy_f, xy_v, xy_h;
  assign preamble = (hist[2] == TRS_FF) && (hist[1] == TRS_00) && (hist[0] == TRS_00);
  assign xy_f     = vid_in[W-2];
  assign xy_v     = vid_in[W-3];
  assign xy_h     = vid_in[W-4];
  assign xy_valid = vid_in[W-1] && (vid_in[W-5 -: 4] == xy_protect(xy_f, xy_v, xy_h));
  assign xy_hit   = preamble && xy_valid;

  logic is_eav, is_sav;
  assign is_eav = xy_hit && xy_h;
  assign is_sav = xy_hit && !xy_h;

  logic [9:0] max_line;
  assign max_line = pal_ntsc_out ? 10'(PAL_LINES) : 10'(NTSC_LINES);

  always_ff @(posedge clk) begin
    if (rst) begin
      hist         <= '{default: '0};
      dly          <= '{default: '0};
      sav_pipe     <= '0;
      eav_cnt      <= '1;
      eav_seen     <= 1'b0;
      vs_cnt       <= '0;
      h_out        <= 1'b1;
      v_out        <= 1'b1;
      f_out        <= 1'b0;
      wcnt_out     <= '0;
      lcnt_out     <= 10'd1;
      pal_ntsc_out <= 1'b0;
      trs_err      <= 1'b0;
    end else begin
      hist[0] <= vid_in;
      hist[1] <= hist[0];
      hist[2] <= hist[1];
      dly[0]  <= vid_in;
      for (int i = 1; i < 4; i++) dly[i] <= dly[i-1];

      trs_err  <= preamble && !xy_valid;
      sav_pipe <= {sav_pipe[2:0], is_sav};
      if (eav_cnt != '1) eav_cnt <= eav_cnt + 12'd1;
      if (wcnt_out != '1) wcnt_out <= wcnt_out + 12'd1;

      if (is_eav) begin
        h_out    <= 1'b1;
        v_out    <= xy_v;
        f_out    <= xy_f;
        eav_cnt  <= '0;
        eav_seen <= 1'b1;
        if (xy_f && !f_out)
          lcnt_out <= pal_ntsc_out ? 10'(PAL_F_LOAD) : 10'(NTSC_F_LOAD);
        else if (lcnt_out >= max_line)
          lcnt_out <= 10'd1;
        else
          lcnt_out <= lcnt_out + 10'd1;
        if (xy_f != f_out)
          vs_cnt <= 2'd3;
        else if (vs_cnt != 0)
          vs_cnt <= vs_cnt - 2'd1;
      end

      if (is_sav && eav_seen) begin
        pal_ntsc_out <= (eav_cnt + 12'd1 >= 12'(FMT_SPLIT));
        eav_seen     <= 1'b0;
      end

      // first active word (Cb0) leaves the delay line
      if (sav_pipe[3]) begin
        h_out    <= 1'b0;
        wcnt_out <= '0;
      end
    end
  end

  assign vid_out   = dly[3];
  assign de_out    = !h_out && !v_out;
  assign pcnt_out  = wcnt_out[11:1];
  assign hsync_out = !(h_out && (eav_cnt >= 12'd32) && (eav_cnt < 12'd160));
  assign vsync_out = (vs_cnt == 0);
  assign blank_out = !(h_out || v_out);

endmodule
