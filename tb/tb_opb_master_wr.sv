// tb_opb_master_wr: the capture bus master against a scripted bus.
// A queue model holds random {address, data} pairs; the bus grants after a
// random delay and answers each selected transfer with xferAck, retry or
// errAck. Checks that each acknowledged transfer carries the head word with
// RNW = 0 and byte enables 1111, that a retried word is sent again, that an
// errAck drops and counts the word, that outputs are zero while not selected,
// and that M_request is never high while M_select is.
module tb_opb_master_wr;
  import fasic_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic q_empty, q_pop;
  logic [63:0] q_data;
  opb_m2b_t m2b;
  opb_b2m_t b2m = '0;
  logic [31:0] nw, nf;

  opb_master_wr dut (.clk, .rst, .q_empty, .q_data, .q_pop, .m2b, .b2m, .words_written(nw), .words_failed(nf));

  logic [63:0] q[$];
  assign q_empty = (q.size() == 0);
  assign q_data  = q_empty ? 64'h0 : q[0];
  always @(posedge clk) if (q_pop) void'(q.pop_front());

  int checks = 0, failures = 0;
  task automatic check(input logic c, input string m);
    checks++; if (!c) begin failures++; if (failures < 10) $display("FAIL %s %0t", m, $time); end
  endtask

  int acked = 0, retried = 0, errored = 0, gdelay = 0, sel_cyc = 0, pending_grant = 0;
  logic [63:0] last_retry;
  logic check_resend = 0;
  // scripted bus
  always @(negedge clk) begin
    b2m <= '0;
    if (!rst) begin
      check(!(m2b.request && m2b.select), "request and select exclusive");
      if (!m2b.select) check(m2b.abus == 0 && m2b.dbus == 0 && m2b.be == 0, "idle outputs zero");
      if (m2b.request && !m2b.select) begin
        if (gdelay == 0) gdelay = 1 + $urandom % 4;
        else if (--gdelay == 0) b2m.grant <= 1;
      end
      if (m2b.select) begin
        sel_cyc++;
        if (sel_cyc == 2) begin
          int r; r = $urandom % 8;
          check(m2b.rnw == 0 && m2b.be == 4'hF, "write, all bytes");
          check({m2b.abus, m2b.dbus} == q[0], "head word on bus");
          if (check_resend) begin check({m2b.abus, m2b.dbus} == last_retry, "retried word re-sent"); check_resend = 0; end
          if (r == 0)      begin b2m.retry <= 1; retried++; last_retry = q[0]; check_resend = 1; end
          else if (r == 1) begin b2m.errack <= 1; errored++; end
          else             begin b2m.xferack <= 1; acked++; end
        end
      end else sel_cyc = 0;
    end
  end

  initial begin
    repeat (3) @(negedge clk); rst = 0;
    for (int i = 0; i < 300; i++) begin
      q.push_back({32'h8010_0000 + 32'(i) * 4, 32'($urandom)});
      repeat ($urandom % 6) @(negedge clk);
    end
    wait (q.size() == 0);
    repeat (10) @(negedge clk);
    check(acked + errored == 300, "every word ended");
    check(nw == 32'(acked) && nf == 32'(errored), "status counters");
    check(retried > 0 && errored > 0, "retry and error exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
