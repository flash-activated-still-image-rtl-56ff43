// opb_master_wr: OPB bus master that writes queued words to memory.
//
// Takes {address, data} pairs from a first-word-fall-through queue and writes
// each one with a single OPB write transfer:
//   IDLE -> REQ   : queue not empty, raise M_request
//   REQ  -> XFER  : OPB_MGrant seen; drop the request, raise M_select and drive
//                   address, data, byte enables 1111 and RNW = 0
//   XFER -> IDLE  : OPB_xferAck: word done, pop the queue
//   XFER -> REQ   : OPB_retry: give up the bus and ask again
//   XFER -> IDLE  : OPB_errAck (or bus timeout): drop the word, count an error
// All outputs are zero while not selected, as the OPB OR-bus requires.
// The description only says the capture core is an OPB master that writes
// 32-bit words; the one-word-per-transfer protocol, no bus locking and the
// error/retry handling are this design's choices.
module opb_master_wr
  import fasic_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  // queue (first word fall through)
  input  logic        q_empty,
  input  logic [63:0] q_data,     // {address, data}
  output logic        q_pop,
  // OPB
  output opb_m2b_t    m2b,
  input  opb_b2m_t    b2m,
  // status
  output logic [31:0] words_written,
  output logic [31:0] words_failed
);

  typedef enum logic [1:0] {M_IDLE, M_REQ, M_XFER} mstate_t;
  mstate_t st;

  always_ff @(posedge clk) begin
    if (rst) begin
      st            <= M_IDLE;
      words_written <= '0;
      words_failed  <= '0;
    end else begin
      unique case (st)
        M_IDLE: if (!q_empty) st <= M_REQ;
        M_REQ:  if (b2m.grant) st <= M_XFER;
        M_XFER: begin
          if (b2m.xferack) begin
            st <= M_IDLE;
            words_written <= words_written + 32'd1;
          end else if (b2m.errack) begin
            st <= M_IDLE;
            words_failed <= words_failed + 32'd1;
          end else if (b2m.retry) begin
            st <= M_REQ;
          end
        end
        default: st <= M_IDLE;
      endcase
    end
  end

  assign q_pop = (st == M_XFER) && (b2m.xferack || b2m.errack);

  always_comb begin
    m2b = '0;
    m2b.request = (st == M_REQ);
    if (st == M_XFER) begin
      m2b.select = 1'b1;
      m2b.rnw    = 1'b0;
      m2b.be     = 4'hF;
      m2b.abus   = q_data[63:32];
      m2b.dbus   = q_data[31:0];
    end
  end

  // The queue must hold the word for the whole transfer.
  a_no_xfer_empty: assert property (@(posedge clk) disable iff (rst) (st == M_XFER) |-> !q_empty);

endmodule
