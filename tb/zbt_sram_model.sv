// zbt_sram_model: behavioural model of a pipelined ZBT SRAM bank, 32 bits
// wide, DEPTH words. A command (cs_n low) is taken on a rising edge; write
// data is taken two edges later with the byte-write enables given with the
// command, and read data is driven during the clock that ends two edges after
// the command. Memory starts at zero.
module zbt_sram_model #(
  parameter int AW = 18
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic          cs_n,
  input  logic          we_n,
  input  logic [3:0]    bw_n,
  input  logic [31:0]   dq_i,     // data from the controller
  output logic [31:0]   dq_o      // data to the controller
);

  logic [31:0] mem [2**AW];
  logic [AW-1:0] a1, a2;
  logic          v1, v2, w1, w2;
  logic [3:0]    b1, b2;

  initial begin
    for (int i = 0; i < 2**AW; i++) mem[i] = '0;
    v1 = 0; v2 = 0; w1 = 0; w2 = 0;
  end

  always @(posedge clk) begin
    v1 <= !cs_n; w1 <= !we_n; a1 <= addr; b1 <= bw_n;
    v2 <= v1;    w2 <= w1;    a2 <= a1;   b2 <= b1;
    if (v2 && w2)
      for (int b = 0; b < 4; b++) if (!b2[b]) mem[a2][8*b +: 8] <= dq_i[8*b +: 8];
  end

  assign dq_o = (v2 && !w2) ? mem[a2] : 32'h0;

  function automatic logic [31:0] peek(input int a);
    return mem[a];
  endfunction

endmodule
