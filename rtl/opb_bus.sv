// opb_bus: On-chip Peripheral Bus interconnect with arbiter.
//
// NM masters and NS slaves share one bus. Arbitration is fixed priority with
// the highest index winning (the video capture master is placed last so it
// wins over the processor); a grant is a one-clock pulse given only while the
// bus is idle (no master selected and no grant outstanding), and the granted
// master raises M_select on the next clock. Address, data, byte enables and
// RNW are the OR of all masters' outputs gated by their select (masters keep
// them zero when idle); slave responses are OR-ed and returned to the master
// that owns the bus. A transfer not acknowledged within TIMEOUT clocks is
// ended with errAck to the master (bus timeout).
// The description names the bus (mb_opb) and which cores sit on it; the
// arbiter, priorities and timeout are this design's choices.
module opb_bus
  import fasic_pkg::*;
#(
  parameter int NM      = 2,
  parameter int NS      = 2,
  parameter int TIMEOUT = 16
) (
  input  logic     clk,
  input  logic     rst,
  input  opb_m2b_t m2b [NM],
  output opb_b2m_t b2m [NM],
  output opb_b2s_t b2s,
  input  opb_s2b_t s2b [NS]
);

  logic [NM-1:0] grant_q, owner;
  logic          busy, timeout;
  logic [$clog2(TIMEOUT+1)-1:0] tcnt;
  opb_s2b_t      rsp;

  always_comb begin
    busy = 1'b0;
    for (int m = 0; m < NM; m++) begin
      owner[m] = m2b[m].select;
      busy     = busy | m2b[m].select;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      grant_q <= '0;
      tcnt    <= '0;
    end else begin
      grant_q <= '0;
      if (!busy && grant_q == '0) begin
        for (int m = 0; m < NM; m++)
          if (m2b[m].request) grant_q <= NM'(1) << m;   // highest index wins
      end
      if (busy && !rsp.xferack && !rsp.errack && !rsp.retry) tcnt <= tcnt + 1'b1;
      else tcnt <= '0;
    end
  end

  assign timeout = (tcnt >= TIMEOUT[$bits(tcnt)-1:0]);

  always_comb begin
    b2s = '0;
    for (int m = 0; m < NM; m++) begin
      if (m2b[m].select) begin
        b2s.select = 1'b1;
        b2s.rnw    = b2s.rnw  | m2b[m].rnw;
        b2s.be     = b2s.be   | m2b[m].be;
        b2s.abus   = b2s.abus | m2b[m].abus;
        b2s.dbus   = b2s.dbus | m2b[m].dbus;
      end
    end
    rsp = '0;
    for (int s = 0; s < NS; s++) begin
      rsp.xferack = rsp.xferack | s2b[s].xferack;
      rsp.errack  = rsp.errack  | s2b[s].errack;
      rsp.retry   = rsp.retry   | s2b[s].retry;
      rsp.dbus    = rsp.dbus    | s2b[s].dbus;
    end
    for (int m = 0; m < NM; m++) begin
      b2m[m].grant   = grant_q[m];
      b2m[m].xferack = owner[m] & rsp.xferack;
      b2m[m].errack  = owner[m] & (rsp.errack | timeout);
      b2m[m].retry   = owner[m] & rsp.retry;
      b2m[m].dbus    = owner[m] ? rsp.dbus : '0;
    end
  end

  // Only one master may drive the bus at a time.
  a_one_owner: assert property (@(posedge clk) disable iff (rst) $onehot0(owner));

endmodule
