// tb_line_field_decoder: checks the BT.656 line/field decoder against the
// ground truth of the stream generator.
// An NTSC stream (short 32-sample active lines, full blanking) runs for a
// frame and a half, then the generator switches to PAL. For every word the
// decoder's vid_out must equal the input 4 clocks earlier, and once the line
// counter has been reloaded by an F rising edge, h/v/f/de, the line number and
// the active word index must match the truth delayed by 4 clocks. The format
// flag must read NTSC and later PAL. One damaged SAV XY word must raise
// trs_err exactly once and not disturb the timing.
module tb_line_field_decoder;
  import fasic_pkg::*;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic pal = 0, corrupt = 0;
  logic [9:0] data;
  logic t_h, t_v, t_f, t_active, t_pal;
  logic [9:0] t_line;
  logic [11:0] t_word;
  int frame_no;

  bt656_source #(.ACT(32)) src (
    .clk, .rst, .pal, .y_level(8'd100), .corrupt_sav(corrupt), .data,
    .t_h, .t_v, .t_f, .t_line, .t_active, .t_word, .frame_no, .t_pal
  );

  logic [9:0]  vid_out, lcnt;
  logic        h, v, f, de, pal_ntsc, hs, vs, bl, err;
  logic [11:0] wcnt;
  logic [10:0] pcnt;

  line_field_decoder dut (
    .clk, .rst, .vid_in(data), .vid_out, .h_out(h), .v_out(v), .f_out(f), .de_out(de),
    .wcnt_out(wcnt), .pcnt_out(pcnt), .lcnt_out(lcnt), .pal_ntsc_out(pal_ntsc),
    .hsync_out(hs), .vsync_out(vs), .blank_out(bl), .trs_err(err)
  );

  int checks = 0, failures = 0;
  int errs = 0, synced = 0, hs_low = 0, vs_low = 0;
  int bad_line = -1;          // line whose SAV was damaged: stays blanked
  logic [9:0]  d_data [4];
  logic [25:0] d_truth [4];   // {h,v,f,active,line,word}

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t lcnt=%0d tline=%0d f=%0d h=%0d", msg, $time, lcnt, d_truth[3][21:12], f, h);
    end
  endtask

  always @(posedge clk) begin
    if (!rst) begin
      d_data[0] <= data;
      d_truth[0] <= {t_h, t_v, t_f, t_active, t_line, t_word};
      for (int i = 1; i < 4; i++) begin d_data[i] <= d_data[i-1]; d_truth[i] <= d_truth[i-1]; end
    end
  end

  // compare outputs (sampled just before the next edge)
  logic [25:0] tr;
  always @(negedge clk) begin
    if (!rst && synced > 0) begin
      tr = d_truth[3];
      check(vid_out == d_data[3], "vid_out delay");
      if (bad_line >= 0 && int'(tr[21:12]) == bad_line + 1) bad_line = -1;
      if (bad_line >= 0 && int'(tr[21:12]) == bad_line && tr[22]) begin
        check(h && !de, "damaged SAV ignored");
      end else begin
      check(h == tr[25], "h");
      check(v == tr[24], "v");
      check(f == tr[23], "f");
      check(de == tr[22], "de");
      check(lcnt == tr[21:12], "line count");
      if (tr[22]) check(wcnt == tr[11:0] && pcnt == tr[11:1], "word count");
      check(bl == !(tr[25] || tr[24]), "blank");
      end
    end
    if (!rst) begin
      if (err) begin errs++; bad_line = int'(t_line); end
      if (!hs) hs_low++;
      if (!vs) vs_low++;
    end
  end

  // synchronised once F has risen and the reload has happened
  always @(posedge clk) if (!rst && frame_no >= 1 && f && lcnt == 10'd267 && synced == 0) synced <= 1;

  initial begin
    repeat (4) @(posedge clk);
    rst = 0;
    // NTSC: 1.5 frames
    wait (frame_no == 2);
    check(pal_ntsc == 1'b0, "NTSC detected");
    check(synced == 1, "decoder synchronised");
    // one corrupted SAV
    @(posedge clk) corrupt = 1;
    @(posedge clk) corrupt = 0;
    repeat (4000) @(posedge clk);
    check(errs == 1, "one TRS error reported");
    // PAL from next line 1
    pal = 1;
    synced = 0;
    wait (frame_no == 4);
    check(pal_ntsc == 1'b1, "PAL detected");
    check(synced == 1, "re-synchronised on PAL");
    repeat (2000) @(posedge clk);
    check(hs_low > 0 && vs_low > 0, "sync pulses seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // PAL reload: F rises at line 313
  always @(posedge clk) if (!rst && pal && f && lcnt == 10'd314 && synced == 0) synced <= 1;

  initial begin
    repeat (4_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
