// tb_csc_mult: random and corner 10-bit Y'CrCb inputs against the
// floating-point conversion equations (10-bit offsets 64 and 512), limited
// to 0..1023. Results must be within 1 LSB and appear exactly 5 enabled
// clocks after the input; ce = 0 must freeze the pipeline.
module tb_csc_mult;
  logic clk = 0;
  always #5 clk = ~clk;
  logic ce = 0;
  logic [9:0] y = 0, cr = 0, cb = 0, r, g, b;
  csc_mult #(.W(10)) dut (.clk, .ce, .y, .cr, .cb, .r, .g, .b);

  int checks = 0, failures = 0;
  task automatic check(input logic c, input string m);
    checks++; if (!c) begin failures++; if (failures < 10) $display("FAIL %s %0t", m, $time); end
  endtask
  function automatic int lim(input real v);
    int i; i = $rtoi(v + 0.5 - ((v < -0.5) ? 1.0 : 0.0));
    if (v < 0) return 0; if (i > 1023) return 1023; return i;
  endfunction
  function automatic logic near(input int a, input int e); return (a - e <= 1) && (e - a <= 1); endfunction

  int er[$], eg[$], eb[$];
  int n = 0;
  initial begin
    // latency: 5 enabled clocks
    @(negedge clk); ce = 1;
    for (int i = 0; i < 3000; i++) begin
      real yy, rr, bb;
      if (i < 8) begin y = (i & 1) ? 10'd1023 : 10'd0; cr = (i & 2) ? 10'd1023 : 10'd0; cb = (i & 4) ? 10'd1023 : 10'd0; end
      else begin y = 10'($urandom); cr = 10'($urandom); cb = 10'($urandom); end
      yy = 1.164 * (real'(y) - 64.0);
      er.push_back(lim(yy + 1.596 * (real'(cr) - 512.0)));
      eg.push_back(lim(yy - 0.813 * (real'(cr) - 512.0) - 0.392 * (real'(cb) - 512.0)));
      eb.push_back(lim(yy + 2.017 * (real'(cb) - 512.0)));
      @(posedge clk); #1;
      if (i >= 4) begin
        check(near(int'(r), er.pop_front()), "R");
        begin int e; e = eg.pop_front(); check(near(int'(g), e), "G"); if (!near(int'(g), e)) $display("g=%0d exp=%0d i=%0d", g, e, i); end
        check(near(int'(b), eb.pop_front()), "B");
        n++;
      end
      if (i == 1000) begin
        // hold: outputs must not move while ce = 0
        logic [9:0] r0; r0 = r;
        @(negedge clk); ce = 0; y = 10'($urandom); repeat (6) @(posedge clk); #1;
        check(r == r0, "ce freezes pipeline");
        @(negedge clk); ce = 1;
      end else @(negedge clk);
    end
    check(n > 2900, "results counted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
