// opb_emc: OPB external memory controller for one bank of ZBT SRAM.
//
// Answers OPB transfers in the window C_BASEADDR..C_HIGHADDR (1 MB, 256K
// 32-bit words) and turns each into one pipelined ZBT SRAM access:
//   cycle 0 (CMD)  : chip select low, word address, we_n = RNW, byte writes
//   cycle 1        : wait
//   cycle 2 (DATA) : write data driven on dq_o with dq_oe = 1, or read data
//                    sampled from dq_i at the end of the cycle
//   cycle 3 (ACK)  : OPB xferAck, read data on the OPB data bus
// i.e. the SRAM takes data two clocks after its command, as pipelined ZBT
// parts do. One access at a time; the bus sees a 4-clock transfer.
// The ZBT clock is the OPB clock. The word address is the byte address
// divided by four, in [17:0] order.
// From the description: one bank, the address window 0x80100000 to
// 0x801FFFFF. Own choices: all of the access timing and the pin set.
module opb_emc
  import fasic_pkg::*;
#(
  parameter logic [31:0] C_BASEADDR = EMC_BASE,
  parameter logic [31:0] C_HIGHADDR = EMC_HIGH,
  parameter int          ZAW        = 18      // ZBT word address bits
) (
  input  logic           clk,
  input  logic           rst,
  input  opb_b2s_t       b2s,
  output opb_s2b_t       s2b,
  // ZBT SRAM pins
  output logic [ZAW-1:0] zbt_addr,
  output logic           zbt_cs_n,
  output logic           zbt_we_n,
  output logic [3:0]     zbt_bw_n,
  output logic [31:0]    zbt_dq_o,
  output logic           zbt_dq_oe,
  input  logic [31:0]    zbt_dq_i
);

  typedef enum logic [2:0] {E_IDLE, E_CMD, E_WAIT, E_DATA, E_ACK} estate_t;
  estate_t st;
  logic        hit;
  logic [31:0] rdata, wdata;
  logic        rnw;

  assign hit = b2s.select && (b2s.abus >= C_BASEADDR) && (b2s.abus <= C_HIGHADDR);

  always_ff @(posedge clk) begin
    if (rst) begin
      st    <= E_IDLE;
      rdata <= '0;
      wdata <= '0;
      rnw   <= 1'b1;
      zbt_addr <= '0;
      zbt_bw_n <= '1;
    end else begin
      unique case (st)
        E_IDLE: if (hit) begin
          st       <= E_CMD;
          rnw      <= b2s.rnw;
          wdata    <= b2s.dbus;
          zbt_addr <= ZAW'((b2s.abus - C_BASEADDR) >> 2);
          zbt_bw_n <= b2s.rnw ? 4'hF : ~b2s.be;
        end
        E_CMD:  st <= E_WAIT;
        E_WAIT: st <= E_DATA;
        E_DATA: begin
          st <= E_ACK;
          if (rnw) rdata <= zbt_dq_i;
        end
        E_ACK:  st <= E_IDLE;
        default: st <= E_IDLE;
      endcase
    end
  end

  assign zbt_cs_n  = !(st == E_CMD);
  assign zbt_we_n  = !((st == E_CMD) && !rnw);
  assign zbt_dq_oe = (st == E_DATA) && !rnw;
  assign zbt_dq_o  = zbt_dq_oe ? wdata : '0;

  always_comb begin
    s2b = '0;
    s2b.xferack = (st == E_ACK);
    if (st == E_ACK && rnw) s2b.dbus = rdata;
  end

endmodule
