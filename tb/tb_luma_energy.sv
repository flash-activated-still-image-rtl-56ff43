// tb_luma_energy: random luminance samples against a software sum.
// Checks the running sum, the found flag against the threshold, clearing at
// frame start, that disabled samples are ignored, and saturation (a 12-bit
// counter instance is driven past its maximum).
module tb_luma_energy;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic clear = 0, en = 0;
  logic [7:0] y = 0;
  logic [31:0] thr = 32'd5000, energy;
  logic found;
  logic [11:0] e12;
  logic f12;

  luma_energy #(.YW(8), .EW(32)) dut (.clk, .rst, .clear, .sample_en(en), .y, .threshold(thr), .energy, .found);
  luma_energy #(.YW(8), .EW(12)) dut12 (.clk, .rst, .clear, .sample_en(en), .y, .threshold(12'd4000), .energy(e12), .found(f12));

  int checks = 0, failures = 0;
  longint model, model12;
  task automatic check(input logic c, input string m);
    checks++; if (!c) begin failures++; if (failures < 10) $display("FAIL %s %0t", m, $time); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst = 0; model = 0; model12 = 0;
    for (int frame = 0; frame < 6; frame++) begin
      @(negedge clk); clear = 1; @(negedge clk); clear = 0;
      model = 0; model12 = 0;
      check(energy == 0 && !found, "cleared");
      for (int i = 0; i < 200; i++) begin
        en = ($urandom % 4) != 0;
        y  = 8'($urandom);
        @(negedge clk);
        if (en) begin
          model += y;
          model12 = (model12 + y > 4095) ? 4095 : model12 + y;
        end
        check(energy == 32'(model), "sum");
        check(found == (model > thr), "found");
        check(e12 == 12'(model12), "saturating sum");
        check(f12 == (model12 > 4000), "found 12");
      end
      en = 0;
    end
    check(model12 == 4095, "saturation reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
