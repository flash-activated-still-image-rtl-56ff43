// tb_flash_fsm: walks the capture state machine through every state and
// transition of its diagram and checks each state's outputs, the frame
// counter and the number of frames written (C_NUM_FRAMES = 3).
module tb_flash_fsm;
  import fasic_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic we = 0, found = 0, fend = 0;
  cap_state_t st;
  logic ce, wf, l1, l2;
  logic [3:0] fc;

  flash_fsm #(.C_NUM_FRAMES(3)) dut (.clk, .rst, .write_en(we), .found_frame(found), .frame_end(fend),
    .state(st), .count_energy(ce), .write_frame(wf), .frame_count(fc), .led1(l1), .led2(l2));

  int checks = 0, failures = 0;
  task automatic check(input logic c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s state=%0d %0t", m, st, $time); end
  endtask
  task automatic outs(input cap_state_t s);
    check(st == s, "state");
    check(ce == (s == ST_B_LOOK), "CountEnergy");
    check(wf == (s inside {ST_D_WAITSTART, ST_E_INC, ST_F_WRITE}), "WriteFrame");
    check(l1 == (s == ST_B_LOOK), "led1");
    check(l2 == (s == ST_G_DONE), "led2");
  endtask
  task automatic step; @(negedge clk); endtask

  int written;
  initial begin
    step; step; rst = 0; step;
    outs(ST_A_RESET);
    repeat (3) step; outs(ST_A_RESET);            // stays without write_en
    we = 1; step; outs(ST_B_LOOK);
    fend = 1; step; fend = 0; outs(ST_B_LOOK);      // frame ends, nothing found
    check(fc == 0, "counter reset in B");
    found = 1; step; found = 0; outs(ST_C_WAITEND);
    repeat (5) step; outs(ST_C_WAITEND);
    fend = 1; step; outs(ST_D_WAITSTART);
    step; outs(ST_D_WAITSTART);                     // stays while frame_end
    written = 0;
    for (int k = 0; k < 3; k++) begin
      fend = 0; step; outs(ST_E_INC);
      step; outs(ST_F_WRITE); written++;
      check(fc == 4'(k + 1), "frame counter");
      repeat (10) step; outs(ST_F_WRITE);
      fend = 1; step; outs(ST_D_WAITSTART);
    end
    fend = 0; step; outs(ST_G_DONE);
    check(written == 3, "three frames");
    repeat (5) step; outs(ST_G_DONE);
    fend = 1; step; fend = 0; outs(ST_G_DONE);
    we = 0; step; outs(ST_A_RESET);
    // second run, immediately found
    we = 1; found = 1; step; outs(ST_B_LOOK); step; outs(ST_C_WAITEND); found = 0;
    check(fc == 0, "counter cleared again");
    rst = 1; step; rst = 0; outs(ST_A_RESET);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
