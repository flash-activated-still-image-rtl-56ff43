// tb_opb_gpio: OPB writes and reads of the GPIO register, acting as the bus.
// Checks write data (with byte enables) on gpio_d_out, read-back, the
// single-clock acknowledge, silence (zero data, no ack) for other addresses.
module tb_opb_gpio;
  import fasic_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  opb_b2s_t b2s = '0;
  opb_s2b_t s2b;
  logic [31:0] gout;
  opb_gpio dut (.clk, .rst, .b2s, .s2b, .gpio_d_out(gout));

  int checks = 0, failures = 0;
  task automatic check(input logic c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s %0t", m, $time); end
  endtask

  task automatic xfer(input logic [31:0] a, input logic rnw, input logic [3:0] be, input logic [31:0] d,
                      output logic [31:0] q, output int cyc);
    @(negedge clk); b2s.select = 1; b2s.rnw = rnw; b2s.abus = a; b2s.be = be; b2s.dbus = rnw ? 0 : d;
    cyc = 0;
    do begin @(posedge clk); cyc++; #1; end while (!s2b.xferack && cyc < 20);
    q = s2b.dbus;
    @(negedge clk); b2s = '0;
  endtask

  logic [31:0] q, model;
  int cyc;
  initial begin
    repeat (3) @(negedge clk); rst = 0;
    check(gout == 0, "reset value");
    model = 0;
    for (int i = 0; i < 50; i++) begin
      logic [31:0] d; logic [3:0] be;
      d = $urandom; be = (i < 10) ? 4'hF : 4'($urandom);
      xfer(32'h8000_0300, 0, be, d, q, cyc);
      for (int b = 0; b < 4; b++) if (be[b]) model[8*b +: 8] = d[8*b +: 8];
      check(cyc == 1, "ack latency 1");
      check(gout == model, "gpio_d_out");
      xfer(32'h8000_0300, 1, 4'hF, 0, q, cyc);
      check(q == model, "read back");
      @(posedge clk); #1 check(s2b == '0, "idle bus quiet");
    end
    // other address: no ack, no change
    @(negedge clk); b2s.select = 1; b2s.rnw = 0; b2s.abus = 32'h8000_0400; b2s.be = 4'hF; b2s.dbus = 32'hDEAD_BEEF;
    repeat (5) begin @(posedge clk); #1 check(!s2b.xferack && s2b.dbus == 0, "other address ignored"); end
    @(negedge clk); b2s = '0;
    check(gout == model, "unchanged by other address");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
