// tb_opb_emc: the memory controller with a ZBT SRAM model behind it.
// Random writes (with byte enables) and reads inside the window against a
// software memory; checks the 4-clock transfer, that a read returns the last
// value written, and that addresses outside the window are not answered.
module tb_opb_emc;
  import fasic_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  opb_b2s_t b2s = '0;
  opb_s2b_t s2b;
  logic [17:0] za; logic zcs, zwe, zoe; logic [3:0] zbw; logic [31:0] zdo, zdi;

  opb_emc dut (.clk, .rst, .b2s, .s2b, .zbt_addr(za), .zbt_cs_n(zcs), .zbt_we_n(zwe), .zbt_bw_n(zbw),
    .zbt_dq_o(zdo), .zbt_dq_oe(zoe), .zbt_dq_i(zdi));
  zbt_sram_model #(.AW(18)) ram (.clk, .addr(za), .cs_n(zcs), .we_n(zwe), .bw_n(zbw), .dq_i(zdo), .dq_o(zdi));

  int checks = 0, failures = 0;
  task automatic check(input logic c, input string m);
    checks++; if (!c) begin failures++; if (failures < 10) $display("FAIL %s %0t", m, $time); end
  endtask
  task automatic xfer(input logic [31:0] a, input logic rnw, input logic [3:0] be, input logic [31:0] d,
                      output logic [31:0] q, output int cyc);
    @(negedge clk); b2s.select = 1; b2s.rnw = rnw; b2s.abus = a; b2s.be = be; b2s.dbus = rnw ? 0 : d;
    cyc = 0;
    do begin @(posedge clk); cyc++; #1; end while (!s2b.xferack && cyc < 20);
    q = s2b.dbus;
    @(negedge clk); b2s = '0;
  endtask

  logic [31:0] model [int];
  logic [31:0] q;
  int cyc, addrs[16];
  initial begin
    repeat (3) @(negedge clk); rst = 0;
    for (int i = 0; i < 16; i++) addrs[i] = (i == 15) ? 32'h3FFFF : ($urandom % 32'h40000);
    for (int i = 0; i < 400; i++) begin
      int w; logic [31:0] d; logic [3:0] be;
      w = addrs[$urandom % 16];
      if (!model.exists(w)) model[w] = 0;
      if ($urandom % 2) begin
        d = $urandom; be = ($urandom % 3 == 0) ? 4'($urandom) : 4'hF;
        xfer(EMC_BASE + 32'(w) * 4, 0, be, d, q, cyc);
        for (int b = 0; b < 4; b++) if (be[b]) model[w][8*b +: 8] = d[8*b +: 8];
        check(cyc == 4, "write takes 4 clocks");
      end else begin
        xfer(EMC_BASE + 32'(w) * 4, 1, 4'hF, 0, q, cyc);
        check(cyc == 4, "read takes 4 clocks");
        check(q == model[w], "read data");
      end
    end
    xfer(32'h8020_0000, 0, 4'hF, 32'h1234_5678, q, cyc);
    check(cyc == 20, "outside window not answered");
    xfer(32'h800F_FFFC, 1, 4'hF, 0, q, cyc);
    check(cyc == 20, "below window not answered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
