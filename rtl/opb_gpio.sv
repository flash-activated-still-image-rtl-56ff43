// opb_gpio: 32-bit general purpose output register on the OPB.
//
// One register at C_BASEADDR. An OPB write to it loads the register (per byte
// enable); a read returns it. The register drives gpio_d_out, which feeds the
// capture core's inflags: bits [31:2] are the luminance threshold and bits
// [1:0] are the two start bits (both 1 = capture enabled). Writing 0 stops
// and resets the detector.
// OPB timing: the write takes effect and xferAck is given on the clock after
// the select is first seen; the master drops select on the acknowledge. Read
// data is driven only during the acknowledge cycle (zero otherwise).
// From the description: base address 0x80000300, width 32, connection to
// inflags. Own choices: single-cycle acknowledge, reset value 0.
module opb_gpio
  import fasic_pkg::*;
#(
  parameter logic [31:0] C_BASEADDR = GPIO_BASE,
  parameter int          C_GPIO_WIDTH = 32
) (
  input  logic                    clk,
  input  logic                    rst,
  input  opb_b2s_t                b2s,
  output opb_s2b_t                s2b,
  output logic [C_GPIO_WIDTH-1:0] gpio_d_out
);

  logic hit, ack;
  logic [31:0] reg_q;
  assign hit = b2s.select && (b2s.abus[31:2] == C_BASEADDR[31:2]);

  always_ff @(posedge clk) begin
    if (rst) begin
      ack   <= 1'b0;
      reg_q <= '0;
    end else begin
      ack <= hit && !ack;
      if (hit && !ack && !b2s.rnw) begin
        for (int b = 0; b < 4; b++)
          if (b2s.be[b]) reg_q[8*b +: 8] <= b2s.dbus[8*b +: 8];
      end
    end
  end

  always_comb begin
    s2b = '0;
    s2b.xferack = ack;
    if (ack && b2s.rnw) s2b.dbus = reg_q;
  end

  assign gpio_d_out = reg_q[C_GPIO_WIDTH-1:0];

endmodule
