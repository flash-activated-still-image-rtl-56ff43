// tb_pixel_packer: feeds several short "lines" of Cb,Y,Cr,Y words with gaps
// and checks every emitted word's layout {Y0,Cr,Y1,Cb} and address, that no
// word is emitted while write_frame is low, and that frame_start restarts the
// address at C_FBADDR.
module tb_pixel_packer;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  localparam logic [31:0] BASE = 32'h8010_0000;

  logic fs = 0, wf = 0, de = 0;
  logic [1:0] ph = 0;
  logic [9:0] vid = 0;
  logic ov; logic [31:0] oa, od;

  pixel_packer #(.C_FBADDR(BASE)) dut (.clk, .rst, .frame_start(fs), .write_frame(wf), .de, .phase(ph), .vid,
    .out_valid(ov), .out_addr(oa), .out_data(od));

  int checks = 0, failures = 0;
  task automatic check(input logic c, input string m);
    checks++; if (!c) begin failures++; if (failures < 10) $display("FAIL %s %0t", m, $time); end
  endtask

  logic [31:0] expq[$];
  int idx, seen;
  always @(negedge clk) if (!rst && ov) begin
    seen++;
    if (expq.size() == 0) check(0, "unexpected word");
    else begin
      logic [63:0] e; e = {32'h0, expq.pop_front()};
      check(od == e[31:0], "data layout");
    end
  end
  logic [31:0] addrq[$];
  always @(negedge clk) if (!rst && ov) begin
    logic [31:0] a; a = addrq.pop_front();
    check(oa == a, "address");
  end

  task automatic line(input int pairs, input logic write);
    logic [7:0] cb, y0, cr, y1;
    for (int p = 0; p < pairs; p++) begin
      cb = 8'($urandom); y0 = 8'($urandom); cr = 8'($urandom); y1 = 8'($urandom);
      if (write) begin expq.push_back({y0, cr, y1, cb}); addrq.push_back(BASE + 4 * idx); end
      idx++;
      @(negedge clk) begin de = 1; ph = 0; vid = {cb, 2'($urandom)}; wf = write; end
      @(negedge clk) begin ph = 1; vid = {y0, 2'b00}; end
      @(negedge clk) begin ph = 2; vid = {cr, 2'b11}; end
      @(negedge clk) begin ph = 3; vid = {y1, 2'b01}; end
    end
    @(negedge clk) de = 0;
    repeat (5) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk); rst = 0;
    for (int fr = 0; fr < 3; fr++) begin
      @(negedge clk) fs = 1; @(negedge clk) fs = 0; idx = 0;
      for (int l = 0; l < 4; l++) line(8 + l, fr != 1);
    end
    repeat (5) @(negedge clk);
    check(expq.size() == 0, "all words emitted");
    check(seen == 2 * (8 + 9 + 10 + 11), "word count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
