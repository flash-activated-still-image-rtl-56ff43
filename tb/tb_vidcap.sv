// tb_vidcap: the capture core on short-line NTSC video (32 active samples per
// line, full blanking and line count) with a simple bus/memory model.
// Frame k has luminance 40+k except frame 3, the "flash", at 220. The
// threshold sits between the two frame energies. With C_NUM_FRAMES = 2 the
// core must detect the flash during frame 3, write frames 4 and 5 to the
// same buffer, and end in state G with led2 lit. Checked: every state A..G
// visited, led1 while searching, the exact number of bus writes, the final
// buffer content word by word (frame 5's pixels in field order), no writes
// outside the buffer, no dropped words; then inflags = 0 returns to A.
module tb_vidcap;
  import fasic_pkg::*;
  localparam int ACT = 32;
  localparam int NF  = 2;
  localparam int FLASH = 3;

  logic opb_clk = 0, vid_clk = 0, rst = 1;
  always #10 opb_clk = ~opb_clk;        // 50 MHz
  always #18.5 vid_clk = ~vid_clk;      // 27 MHz

  logic [9:0] data;
  logic t_h, t_v, t_f, t_active, t_pal;
  logic [9:0] t_line;
  logic [11:0] t_word;
  int frame_no;
  logic [7:0] ylev;
  assign ylev = (frame_no == FLASH) ? 8'd220 : 8'(40 + frame_no);

  bt656_source #(.ACT(ACT)) src (.clk(vid_clk), .rst, .pal(1'b0), .y_level(ylev), .corrupt_sav(1'b0),
    .data, .t_h, .t_v, .t_f, .t_line, .t_active, .t_word, .frame_no, .t_pal);

  logic [31:0] inflags = 0;
  opb_m2b_t m2b;
  opb_b2m_t b2m = '0;
  logic led1, led2, pal_ntsc;
  cap_state_t st;
  logic [31:0] energy, dropped, nw, nf;
  logic [15:0] terr;

  vidcap #(.C_FBADDR(32'h8010_0000), .C_NUM_FRAMES(NF), .FIFO_AW(4)) dut (
    .opb_clk, .opb_rst(rst), .vid_clk, .YCrCb_in(data), .inflags, .m2b, .b2m, .led1, .led2,
    .state(st), .energy, .pal_ntsc, .dropped_words(dropped), .trs_errors(terr),
    .words_written(nw), .words_failed(nf));

  int checks = 0, failures = 0;
  task automatic check(input logic c, input string m);
    checks++; if (!c) begin failures++; if (failures < 10) $display("FAIL %s %0t", m, $time); end
  endtask

  // bus + memory model: grant 2 clocks after request, ack 2 clocks after select
  logic [31:0] mem [int];
  int gcnt = 0, scnt = 0, writes = 0, outside = 0;
  always @(posedge opb_clk) begin
    b2m <= '0;
    if (m2b.request && !b2m.grant) begin
      gcnt <= gcnt + 1;
      if (gcnt == 1) begin b2m.grant <= 1; gcnt <= 0; end
    end
    if (m2b.select && !b2m.xferack) begin
      scnt <= scnt + 1;
      if (scnt == 1) begin
        scnt <= 0; b2m.xferack <= 1; writes++;
        check(!m2b.rnw && m2b.be == 4'hF, "write transfer");
        if (m2b.abus < 32'h8010_0000 || m2b.abus > 32'h801F_FFFF) outside++;
        mem[int'(m2b.abus - 32'h8010_0000) >> 2] = m2b.dbus;
      end
    end
  end

  bit seen [7];
  logic armed = 0;   // set once reset has long reached the video domain
  always @(posedge vid_clk) if (!rst && armed) begin
    seen[int'(st)] = 1;
    check(led1 == (st == ST_B_LOOK), "led1 while searching");
    check(led2 == (st == ST_G_DONE), "led2 when done");
  end

  int found_at = -1;
  always @(posedge vid_clk) if (!rst && armed && st == ST_C_WAITEND && found_at < 0) found_at = frame_no;

  initial begin
    int idx, lines_per_frame, words_per_line, errs;
    repeat (5) @(posedge opb_clk); rst = 0;
    repeat (20) @(posedge opb_clk);
    // threshold between dark (~0.7e6) and flash (~3.4e6) frame energy
    armed = 1;
    inflags = (32'd2_000_000 & ~32'h3) | 32'h3;
    wait (st == ST_G_DONE);
    repeat (200) @(posedge opb_clk);
    check(found_at == FLASH, "flash frame detected");
    if (found_at != FLASH) $display("found in frame %0d", found_at);
    lines_per_frame = 244 + 243;
    words_per_line  = ACT / 2;
    check(writes == NF * lines_per_frame * words_per_line, "number of words written");
    check(nw == 32'(writes) && nf == 0, "status counters");
    check(dropped == 0, "no dropped words");
    check(outside == 0, "all writes inside the buffer");
    check(pal_ntsc == 0, "NTSC");
    // content: frame FLASH+NF, field 1 lines 20..263 then field 2 lines 283..525
    idx = 0; errs = 0;
    for (int ln = 1; ln <= 525; ln++) begin
      if ((ln >= 20 && ln <= 263) || ln >= 283) begin
        for (int p = 0; p < words_per_line; p++) begin
          logic [7:0] L; logic [31:0] e;
          L = 8'(40 + FLASH + NF);
          e = {L, 8'(16 + (p % 200)), L + 8'd1, 8'(16 + (ln % 200))};
          if (!mem.exists(idx) || mem[idx] != e) errs++;
          idx++;
        end
      end
    end
    check(errs == 0, "frame buffer content");
    if (errs) $display("content errors: %0d", errs);
    check(mem.size() == idx, "buffer size");
    for (int s = 0; s < 7; s++) check(seen[s], "every state visited");
    // reset by writing 0
    inflags = 0;
    repeat (20) @(posedge vid_clk);
    check(st == ST_A_RESET && !led2, "back to A");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (3_000_000) @(posedge vid_clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
