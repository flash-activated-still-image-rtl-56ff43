// tb_async_fifo: writer at 27 MHz, reader at 50 MHz with random stalls.
// Every word read must be the next one written (scoreboard), the FIFO must
// report full when the reader stops (exactly 2**AW words held), and empty
// when drained.
module tb_async_fifo;
  logic wclk = 0, rclk = 0, rst = 1;
  always #18.5 wclk = ~wclk;
  always #10 rclk = ~rclk;

  logic wen = 0, ren = 0, full, empty;
  logic [15:0] wdata = 0, rdata;

  async_fifo #(.DW(16), .AW(3)) dut (.wclk, .wrst(rst), .wen, .wdata, .full,
    .rclk, .rrst(rst), .ren, .rdata, .empty);

  int checks = 0, failures = 0;
  task automatic check(input logic c, input string m);
    checks++; if (!c) begin failures++; if (failures < 10) $display("FAIL %s %0t", m, $time); end
  endtask

  logic [15:0] sb[$];
  int nwr = 0, nrd = 0, fulls = 0;
  logic rd_stop = 0;
  bit writing = 1;

  always @(posedge wclk) if (!rst) begin
    if (wen && !full) begin sb.push_back(wdata); nwr++; end
    if (full) fulls++;
  end
  always @(negedge wclk) if (!rst) begin
    wen <= writing && ($urandom % 3 != 0);
    if (wen && !full) wdata <= wdata + 16'd1;
  end

  always @(posedge rclk) if (!rst) begin
    if (ren && !empty) begin
      check(sb.size() > 0, "read with data");
      if (sb.size() > 0) check(rdata == sb.pop_front(), "order/data");
      nrd++;
    end
  end
  always @(negedge rclk) ren <= !rd_stop && ($urandom % 2 == 0);

  initial begin
    repeat (3) @(posedge wclk); rst = 0;
    repeat (2000) @(posedge wclk);
    rd_stop = 1;
    repeat (40) @(posedge wclk);
    check(full, "full when reader stops");
    check(sb.size() == 8, "holds 2**AW words");
    rd_stop = 0;
    writing = 0;
    repeat (100) @(posedge wclk);
    check(empty, "empty when drained");
    check(sb.size() == 0, "all words read");
    check(nrd > 500, "traffic");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge wclk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
