// tb_flash_capturer_top: end-to-end run of the whole system at its default
// parameters with full-size video (720 active samples per line).
//
// Run 1 (NTSC, 100 MHz bus): the host arms the detector by writing
// 0x02000003 to the GPIO (threshold 0x02000000), keeps polling the GPIO over
// the shared bus while video runs, the flash frame (luminance 200 against
// about 40 in the others) is found, the next 4 frames are written through
// the bus and the memory controller into the ZBT model. Checked: frame of
// detection, led1/led2, words written, no drops, the whole frame buffer word
// by word (it must hold the last written frame, fields in order), a few
// words read back by the host over the bus, a bus timeout on an unmapped
// address, and the reset to state A by writing 0.
// Run 2 (PAL, bus slowed to 12.5 MHz): one damaged SAV word is injected and
// the detector is re-armed. The bus is now too slow for the video rate, so
// the FIFO overflows and words are dropped ("blank spots"); every word must
// still be accounted for as written or dropped.
// Each mechanism (flash detection, frame writes, FIFO overflow, bus
// contention, bus timeout, NTSC and PAL detection, TRS error, reset from G)
// is counted and must happen at least once.
// The colour space converter is fed a few values and compared against the
// conversion equations.
module tb_flash_capturer_top;
  import fasic_pkg::*;

  localparam int NF = 4;                     // default C_NUM_FRAMES
  logic opb_clk = 0, vid_clk = 0, csc_clk = 0, rst = 1;
  realtime opb_half = 5.0;
  always #(opb_half) opb_clk = ~opb_clk;
  always #18.5 vid_clk = ~vid_clk;
  always #5 csc_clk = ~csc_clk;

  // video source
  logic pal = 0, corrupt = 0;
  logic [9:0] data;
  logic t_h, t_v, t_f, t_active, t_pal;
  logic [9:0] t_line;
  logic [11:0] t_word;
  int frame_no;
  int flash1 = -1, flash2 = -1;
  logic [7:0] ylev;
  assign ylev = (frame_no == flash1 || frame_no == flash2) ? 8'd200 : 8'(40 + frame_no % 16);

  bt656_source #(.ACT(720)) src (.clk(vid_clk), .rst, .pal, .y_level(ylev), .corrupt_sav(corrupt),
    .data, .t_h, .t_v, .t_f, .t_line, .t_active, .t_word, .frame_no, .t_pal);

  opb_m2b_t host_m2b = '0;
  opb_b2m_t host_b2m;
  logic [17:0] za; logic zcs, zwe, zoe; logic [3:0] zbw; logic [31:0] zdo, zdi;
  logic led1, led2, pal_ntsc;
  cap_state_t st;
  logic [31:0] energy, dropped, nw, nfail;
  logic [15:0] terr;
  logic csc_ce = 0;
  logic [9:0] cy = 0, ccr = 0, ccb = 0, cr_o, cg_o, cb_o;

  flash_capturer_top dut (
    .opb_clk, .rst, .vid_clk, .YCrCb_in(data), .host_m2b, .host_b2m,
    .zbt_addr(za), .zbt_cs_n(zcs), .zbt_we_n(zwe), .zbt_bw_n(zbw), .zbt_dq_o(zdo), .zbt_dq_oe(zoe),
    .zbt_dq_i(zdi), .led1, .led2, .cap_state(st), .energy, .pal_ntsc, .dropped_words(dropped),
    .trs_errors(terr), .words_written(nw), .words_failed(nfail),
    .csc_clk, .csc_ce, .csc_y(cy), .csc_cr(ccr), .csc_cb(ccb), .csc_r(cr_o), .csc_g(cg_o), .csc_b(cb_o));

  zbt_sram_model #(.AW(18)) ram (.clk(opb_clk), .addr(za), .cs_n(zcs), .we_n(zwe), .bw_n(zbw),
    .dq_i(zdo), .dq_o(zdi));

  int checks = 0, failures = 0;
  task automatic check(input logic c, input string m);
    checks++; if (!c) begin failures++; if (failures < 20) $display("FAIL %s %0t", m, $time); end
  endtask

  // ---------------- host bus functional model ----------------
  int n_contention = 0, n_timeout = 0;
  task automatic host(input logic [31:0] a, input logic rnw, input logic [31:0] d,
                      output logic [31:0] q, output logic err);
    int wait_cyc;
    @(negedge opb_clk) host_m2b.request = 1;
    wait_cyc = 0;
    do begin @(posedge opb_clk); wait_cyc++; end while (!host_b2m.grant);
    if (wait_cyc > 2) n_contention++;
    @(negedge opb_clk);
    host_m2b.request = 0; host_m2b.select = 1; host_m2b.rnw = rnw; host_m2b.abus = a;
    host_m2b.be = 4'hF; host_m2b.dbus = rnw ? 0 : d;
    do @(posedge opb_clk); while (!host_b2m.xferack && !host_b2m.errack);
    q = host_b2m.dbus; err = host_b2m.errack;
    @(negedge opb_clk) host_m2b = '0;
  endtask

  // ---------------- mechanism counters ----------------
  int n_found = 0, n_frames = 0, n_reset_g = 0, n_ntsc = 0, n_pal = 0;
  logic armed = 0;
  cap_state_t st_q = ST_A_RESET;
  int found_frame_no [$];
  always @(posedge vid_clk) if (armed) begin
    if (st == ST_C_WAITEND && st_q == ST_B_LOOK) begin n_found++; found_frame_no.push_back(frame_no); end
    if (st == ST_E_INC) n_frames++;
    if (st == ST_A_RESET && st_q == ST_G_DONE) n_reset_g++;
    check(led1 == (st == ST_B_LOOK) && led2 == (st == ST_G_DONE), "LEDs follow state");
    st_q <= st;
  end

  logic polling = 0;
  initial begin
    forever begin
      logic [31:0] q; logic e;
      @(posedge opb_clk);
      if (polling) begin
        host(GPIO_BASE, 1, 0, q, e);
        check(q == 32'h0200_0003 && !e, "GPIO read while capturing");
        repeat (500) @(posedge opb_clk);
      end
    end
  end

  function automatic int lim(input real v);
    if (v < 0) return 0; if (v > 1023) return 1023; return $rtoi(v + 0.5);
  endfunction

  initial begin
    logic [31:0] q; logic e;
    int errs, idx, total;
    repeat (10) @(posedge opb_clk); rst = 0;
    repeat (20) @(posedge opb_clk);

    // ---------- run 1: NTSC ----------
    flash1 = 3;
    host(GPIO_BASE, 0, 32'h0200_0003, q, e);
    check(!e, "GPIO write");
    host(GPIO_BASE, 1, 0, q, e);
    check(q == 32'h0200_0003, "GPIO read back");
    repeat (10) @(posedge vid_clk);
    armed = 1;
    check(led1 && !led2, "led1 on: searching");
    polling = 1;
    wait (st == ST_G_DONE);
    polling = 0;
    repeat (50) @(posedge opb_clk);
    if (pal_ntsc == 0) n_ntsc++;
    check(found_frame_no.size() == 1 && found_frame_no[0] == flash1, "flash found in frame 3");
    check(!led1 && led2, "led2 on: done");
    total = NF * 487 * 360;
    check(nw == 32'(total), "words written, run 1");
    if (nw != 32'(total)) $display("written %0d expected %0d dropped %0d", nw, total, dropped);
    check(dropped == 0 && nfail == 0, "no drops at 100 MHz");
    // frame buffer: frame flash1+NF, all lines of field 1 then field 2
    idx = 0; errs = 0;
    for (int ln = 1; ln <= 525; ln++) begin
      if ((ln >= 20 && ln <= 263) || ln >= 283) begin
        for (int p = 0; p < 360; p++) begin
          logic [7:0] L; logic [31:0] ex;
          L = 8'(40 + (flash1 + NF) % 16);
          ex = {L, 8'(16 + (p % 200)), L + 8'd1, 8'(16 + (ln % 200))};
          if (ram.peek(idx) != ex) errs++;
          idx++;
        end
      end
    end
    check(errs == 0, "frame buffer content, run 1");
    if (errs) $display("buffer errors %0d", errs);
    check(ram.peek(idx) == 0, "nothing beyond the frame");
    // host reads through the bus
    for (int k = 0; k < 8; k++) begin
      int w; w = (k * 21911) % idx;
      host(EMC_BASE + 32'(w) * 4, 1, 0, q, e);
      check(!e && q == ram.peek(w), "host read of frame buffer");
    end
    // unmapped address: bus timeout
    host(32'h9000_0000, 1, 0, q, e);
    if (e) n_timeout++;
    check(e, "timeout on unmapped address");
    // reset
    host(GPIO_BASE, 0, 32'h0, q, e);
    repeat (10) @(posedge vid_clk);
    check(st == ST_A_RESET && !led1 && !led2, "reset to A");

    // ---------- run 2: PAL, slow bus, damaged SAV ----------
    pal = 1;
    wait (t_pal == 1);
    opb_half = 40.0;                 // 12.5 MHz bus
    repeat (3000) @(posedge vid_clk);
    @(negedge vid_clk) corrupt = 1; @(negedge vid_clk) corrupt = 0;
    flash2 = frame_no + 3;
    host(GPIO_BASE, 0, 32'h0200_0003, q, e);
    wait (st == ST_G_DONE);
    repeat (2000) @(posedge opb_clk);
    if (pal_ntsc == 1) n_pal++;
    check(found_frame_no.size() == 2 && found_frame_no[1] == flash2, "flash found, run 2");
    total = NF * 576 * 360;
    check(nw - 32'(NF * 487 * 360) + dropped == 32'(total), "every word written or dropped, run 2");
    check(terr == 1, "one TRS error counted");
    host(GPIO_BASE, 0, 32'h0, q, e);
    repeat (10) @(posedge vid_clk);

    // ---------- colour space converter ----------
    csc_ce = 1;
    for (int k = 0; k < 20; k++) begin
      int er, eg, eb;
      @(negedge csc_clk);
      cy = 10'($urandom); ccr = 10'($urandom); ccb = 10'($urandom);
      er = lim(1.164 * (real'(cy) - 64) + 1.596 * (real'(ccr) - 512));
      eg = lim(1.164 * (real'(cy) - 64) - 0.813 * (real'(ccr) - 512) - 0.392 * (real'(ccb) - 512));
      eb = lim(1.164 * (real'(cy) - 64) + 2.017 * (real'(ccb) - 512));
      repeat (5) @(posedge csc_clk);
      #1;
      check((int'(cr_o) - er) inside {[-1:1]} && (int'(cg_o) - eg) inside {[-1:1]} && (int'(cb_o) - eb) inside {[-1:1]}, "converter");
    end

    // ---------- mechanisms ----------
    $display("mechanisms: found=%0d frames=%0d drops=%0d contention=%0d timeout=%0d ntsc=%0d pal=%0d trs_err=%0d resetG=%0d",
             n_found, n_frames, dropped, n_contention, n_timeout, n_ntsc, n_pal, terr, n_reset_g);
    check(n_found == 2, "flash detection happened");
    check(n_frames == 2 * NF, "frame writes happened");
    check(dropped > 0, "FIFO overflow happened");
    check(n_contention > 0, "bus contention happened");
    check(n_timeout > 0, "bus timeout happened");
    check(n_ntsc > 0 && n_pal > 0, "NTSC and PAL detected");
    check(terr > 0, "TRS error happened");
    check(n_reset_g == 2, "reset from G happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20_000_000) @(posedge vid_clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
