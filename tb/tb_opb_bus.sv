// tb_opb_bus: two simple master models compete for the bus; two memory-like
// slave models answer in different address ranges after 1 and 3 clocks.
// Checks that grants go only to requesters while the bus is idle, that the
// higher-index master wins when both ask, that each master's writes reach
// the right slave and its reads return the right data, and that an access
// to an unmapped address ends with errAck after the timeout.
module tb_opb_bus;
  import fasic_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  opb_m2b_t m2b [2];
  opb_b2m_t b2m [2];
  opb_b2s_t b2s;
  opb_s2b_t s2b [2];

  opb_bus #(.NM(2), .NS(2), .TIMEOUT(16)) dut (.clk, .rst, .m2b, .b2m, .b2s, .s2b);

  int checks = 0, failures = 0;
  task automatic check(input logic c, input string m);
    checks++; if (!c) begin failures++; if (failures < 10) $display("FAIL %s %0t", m, $time); end
  endtask

  // slaves: s0 at 0x1000_0000 (ack after 1), s1 at 0x2000_0000 (ack after 3)
  logic [31:0] mem0 [16], mem1 [16];
  int cnt0 = 0, cnt1 = 0;
  always @(posedge clk) begin
    s2b[0] <= '0; s2b[1] <= '0;
    if (b2s.select && b2s.abus[31:28] == 4'h1 && !s2b[0].xferack) begin
      if (!b2s.rnw) mem0[b2s.abus[5:2]] <= b2s.dbus; else s2b[0].dbus <= mem0[b2s.abus[5:2]];
      s2b[0].xferack <= 1;
    end
    if (b2s.select && b2s.abus[31:28] == 4'h2 && !s2b[1].xferack) begin
      cnt1 <= cnt1 + 1;
      if (cnt1 == 2) begin
        if (!b2s.rnw) mem1[b2s.abus[5:2]] <= b2s.dbus; else s2b[1].dbus <= mem1[b2s.abus[5:2]];
        s2b[1].xferack <= 1; cnt1 <= 0;
      end
    end
  end

  // master models
  int grants [2] = '{0, 0};
  task automatic access(input int m, input logic [31:0] a, input logic rnw, input logic [31:0] d,
                        output logic [31:0] q, output logic err);
    @(negedge clk) m2b[m].request = 1;
    do @(posedge clk); while (!b2m[m].grant);
    grants[m]++;
    @(negedge clk);
    m2b[m].request = 0; m2b[m].select = 1; m2b[m].rnw = rnw; m2b[m].abus = a; m2b[m].be = 4'hF;
    m2b[m].dbus = rnw ? 0 : d;
    do @(posedge clk); while (!b2m[m].xferack && !b2m[m].errack);
    q = b2m[m].dbus; err = b2m[m].errack;
    @(negedge clk) m2b[m] = '0;
  endtask

  always @(posedge clk) if (!rst) begin
    for (int m = 0; m < 2; m++) if (b2m[m].grant) check(m2b[m].request, "grant only to requester");
    check(!(b2m[0].grant && b2m[1].grant), "single grant");
    if (b2m[0].grant || b2m[1].grant) check(!(m2b[0].select || m2b[1].select), "grant only on idle bus");
  end

  logic [31:0] q; logic err;
  int both_won1 = 0;
  initial begin
    m2b[0] = '0; m2b[1] = '0;
    repeat (3) @(negedge clk); rst = 0;
    fork
      for (int i = 0; i < 16; i++) begin
        logic [31:0] q0; logic e0;
        access(0, 32'h1000_0000 + 32'(i) * 4, 0, 32'hA000_0000 + 32'(i), q0, e0);
      end
      for (int i = 0; i < 16; i++) begin
        logic [31:0] q1; logic e1;
        access(1, 32'h2000_0000 + 32'(i) * 4, 0, 32'hB000_0000 + 32'(i), q1, e1);
      end
    join
    for (int i = 0; i < 16; i++) begin
      check(mem0[i] == 32'hA000_0000 + 32'(i), "master 0 write reached slave 0");
      check(mem1[i] == 32'hB000_0000 + 32'(i), "master 1 write reached slave 1");
      access(i % 2, 32'h1000_0000 + 32'(i) * 4, 1, 0, q, err);
      check(q == 32'hA000_0000 + 32'(i) && !err, "read slave 0");
      access(1 - i % 2, 32'h2000_0000 + 32'(i) * 4, 1, 0, q, err);
      check(q == 32'hB000_0000 + 32'(i) && !err, "read slave 1");
    end
    // simultaneous request: master 1 must win
    @(negedge clk) begin m2b[0].request = 1; m2b[1].request = 1; end
    do @(posedge clk); while (!(b2m[0].grant || b2m[1].grant));
    check(b2m[1].grant && !b2m[0].grant, "higher index wins");
    @(negedge clk) begin m2b[0].request = 0; m2b[1].request = 0; end
    repeat (3) @(negedge clk);
    // unmapped address -> timeout
    access(0, 32'h3000_0000, 1, 0, q, err);
    check(err, "timeout errAck");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
