// pixel_packer: turns the active-video word stream into 32-bit memory words.
//
// Active video arrives as Cb, Y, Cr, Y, ... (one word per 27 MHz clock). Every
// four words, one 32-bit word {Y_first, Cr, Y_second, Cb} is emitted (the
// 0xY1CrY2Cb layout read back by the viewer), each field being the 8 most
// significant bits of the 10-bit sample. Words are numbered from 0 at every
// frame start and given the byte address C_FBADDR + 4*index, so each written
// frame lands on the same memory locations; since fields arrive one after the
// other, all lines of field 1 end up ahead of the lines of field 2. A word is
// only emitted while write_frame is high.
// Interface: de/wcnt come from the line-field decoder; out_valid is a one-clock
// strobe with out_addr/out_data. Timing: out_valid the clock after the second
// Y word of a pair.
// From the description: the word layout, interlaced order, C_FBADDR. Own
// choices: only active samples are stored, 8 MSBs of each sample.
module pixel_packer #(
  parameter logic [31:0] C_FBADDR = 32'h8010_0000,
  parameter int          W        = 10,
  parameter int          IDXW     = 18             // word index bits (1 MB window)
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         frame_start,
  input  logic         write_frame,
  input  logic         de,
  input  logic [1:0]   phase,      // wcnt[1:0]: 0 Cb, 1 Y, 2 Cr, 3 Y
  input  logic [W-1:0] vid,
  output logic         out_valid,
  output logic [31:0]  out_addr,
  output logic [31:0]  out_data
);

  logic [7:0]      cb, y0, cr;
  logic [IDXW-1:0] idx;
  logic [7:0]      s8;
  assign s8 = vid[W-1 -: 8];

  always_ff @(posedge clk) begin
    if (rst) begin
      cb <= '0; y0 <= '0; cr <= '0;
      idx       <= '0;
      out_valid <= 1'b0;
      out_addr  <= '0;
      out_data  <= '0;
    end else begin
      out_valid <= 1'b0;
      if (frame_start) idx <= '0;
      if (de) begin
        unique case (phase)
          2'd0: cb <= s8;
          2'd1: y0 <= s8;
          2'd2: cr <= s8;
          2'd3: begin
            if (write_frame) begin
              out_valid <= 1'b1;
              out_data  <= {y0, cr, s8, cb};
              out_addr  <= C_FBADDR + {{(30-IDXW){1'b0}}, idx, 2'b00};
            end
            idx <= idx + 1'b1;
          end
        endcase
      end
    end
  end

endmodule
