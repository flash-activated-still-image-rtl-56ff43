// async_fifo: dual-clock FIFO carrying captured words from the video clock
// to the bus clock.
//
// Classic Gray-coded pointer FIFO: binary pointers with one extra wrap bit,
// converted to Gray code and passed through two flip-flops into the other
// clock domain. full and empty are therefore pessimistic by up to two clocks
// of the other domain, never optimistic. Read data is first-word-fall-through
// (rdata shows the head word while empty is low). Depth is 2**AW.
// A write while full is refused (the caller counts it as a dropped word); a
// read while empty is ignored.
// The capture core needs such a buffer because the video clock and the bus
// clock differ and the bus grant arrives with a delay; its structure and
// depth are this design's choice.
module async_fifo #(
  parameter int DW = 64,
  parameter int AW = 4
) (
  input  logic          wclk,
  input  logic          wrst,
  input  logic          wen,
  input  logic [DW-1:0] wdata,
  output logic          full,
  input  logic          rclk,
  input  logic          rrst,
  input  logic          ren,
  output logic [DW-1:0] rdata,
  output logic          empty
);

  logic [DW-1:0] mem [2**AW];
  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w1, rgray_w2, wgray_r1, wgray_r2;
  logic [AW:0] wbin_n, rbin_n;

  function automatic logic [AW:0] b2g(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  assign wbin_n = wbin + (AW+1)'(wen && !full);
  assign rbin_n = rbin + (AW+1)'(ren && !empty);

  always_ff @(posedge wclk) begin
    if (wen && !full) mem[wbin[AW-1:0]] <= wdata;
  end

  always_ff @(posedge wclk) begin
    if (wrst) begin
      wbin <= '0; wgray <= '0; rgray_w1 <= '0; rgray_w2 <= '0;
    end else begin
      wbin <= wbin_n;
      wgray <= b2g(wbin_n);
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
    end
  end

  always_ff @(posedge rclk) begin
    if (rrst) begin
      rbin <= '0; rgray <= '0; wgray_r1 <= '0; wgray_r2 <= '0;
    end else begin
      rbin <= rbin_n;
      rgray <= b2g(rbin_n);
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
    end
  end

  // full: write pointer one lap ahead of the synchronised read pointer
  assign full  = (wgray == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});
  assign empty = (rgray == wgray_r2);
  assign rdata = mem[rbin[AW-1:0]];

endmodule
