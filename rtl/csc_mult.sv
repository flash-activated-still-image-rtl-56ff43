// csc_mult: Y'CrCb to R'G'B' colour space converter built around five
// constant multipliers.
//
// Computes
//   R' = 1.164(Y'-16k) + 1.596(Cr-128k)
//   G' = 1.164(Y'-16k) - 0.813(Cr-128k) - 0.392(Cb-128k)
//   B' = 1.164(Y'-16k) + 2.017(Cb-128k)        with k = 2**(W-8)
// (k = 4 for 10-bit studio video, offsets 64 and 512). The 1.164(Y'-16k) term
// is shared by all three outputs, so five products suffice (P1..P5).
// Coefficients are unsigned fixed point with CF = 9 fraction bits (1.164 ->
// 596, 1.596 -> 817, 0.813 -> 416, 0.392 -> 201, 2.017 -> 1033); sums are
// shifted right by CF with rounding and limited to 0 .. 2**W-1.
// Pipeline (every register enabled by ce), latency 5 clocks:
//   1 input registers          2 offset removal (signed differences)
//   3 products P1..P5          4 R: P1+P2, G: P1-P3 then -P4, B: P1+P5
//   5 limit and output registers
// The G path subtracts P3 in stage 4 and P4 in stage 5 before the limit, as
// in the two-step G adder of the multiplier-based structure.
// From the description: the equations, the five shared products, the
// multiplier structure and its staged adders, the limit. Own choices: the
// fraction width, rounding and exact stage boundaries.
module csc_mult #(
  parameter int W  = 10,
  parameter int CF = 9
) (
  input  logic         clk,
  input  logic         ce,
  input  logic [W-1:0] y,
  input  logic [W-1:0] cr,
  input  logic [W-1:0] cb,
  output logic [W-1:0] r,
  output logic [W-1:0] g,
  output logic [W-1:0] b
);

  localparam int K  = 1 << (W - 8);
  localparam int PW = W + 1 + 12 + 2;           // product/sum width with headroom
  localparam logic signed [12:0] C_Y   = 13'(int'(1.164 * (1 << CF)));
  localparam logic signed [12:0] C_RCR = 13'(int'(1.596 * (1 << CF)));
  localparam logic signed [12:0] C_GCR = 13'(int'(0.813 * (1 << CF)));
  localparam logic signed [12:0] C_GCB = 13'(int'(0.392 * (1 << CF)));
  localparam logic signed [12:0] C_BCB = 13'(int'(2.017 * (1 << CF)));

  logic [W-1:0]           y1, cr1, cb1;
  logic signed [W:0]      yd, crd, cbd;
  logic signed [PW-1:0]   p1, p2, p3, p4, p5;
  logic signed [PW-1:0]   r4, g4, b4, p4_d;
  logic [W-1:0]           r5, g5, b5;

  function automatic logic [W-1:0] limit(input logic signed [PW-1:0] s);
    logic signed [PW-1:0] q;
    q = (s + (PW'(1) <<< (CF - 1))) >>> CF;
    if (q < 0)                   return '0;
    else if (q > PW'((1 << W) - 1)) return '1;
    else                         return q[W-1:0];
  endfunction

  always_ff @(posedge clk) begin
    if (ce) begin
      // 1: input registers
      y1 <= y; cr1 <= cr; cb1 <= cb;
      // 2: remove offsets
      yd  <= $signed({1'b0, y1})  - (W+1)'(16 * K);
      crd <= $signed({1'b0, cr1}) - (W+1)'(128 * K);
      cbd <= $signed({1'b0, cb1}) - (W+1)'(128 * K);
      // 3: five products
      p1 <= PW'(yd)  * PW'(C_Y);
      p2 <= PW'(crd) * PW'(C_RCR);
      p3 <= PW'(crd) * PW'(C_GCR);
      p4 <= PW'(cbd) * PW'(C_GCB);
      p5 <= PW'(cbd) * PW'(C_BCB);
      // 4: adders
      r4   <= p1 + p2;
      g4   <= p1 - p3;
      b4   <= p1 + p5;
      p4_d <= p4;
      // 5: second G adder, limit, output
      r5 <= limit(r4);
      g5 <= limit(g4 - p4_d);
      b5 <= limit(b4);
    end
  end

  assign r = r5;
  assign g = g5;
  assign b = b5;

endmodule
