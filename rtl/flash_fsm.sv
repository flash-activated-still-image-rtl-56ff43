// flash_fsm: the seven-state controller of the flash-activated capture.
//
// States (A..G) and their outputs follow the capture state diagram:
//   A reset        : idle until write_en = 1                      -> B
//   B looking      : CountEnergy = 1, frame counter held at 0; FoundFrame -> C
//   C wait end     : wait for the end of the bright frame; frame_end -> D
//   D wait start   : WriteFrame = 1; FrameCount >= C_NUM_FRAMES -> G,
//                    stay while frame_end, otherwise -> E
//   E increment    : CountFrame_en = 1, WriteFrame = 1           -> F
//   F write frame  : WriteFrame = 1; frame_end -> D
//   G all done     : stay while write_en = 1; write_en = 0 -> A
// frame_end is "V_falling = 1 and Fo = 0": vertical blanking has just ended
// with the field bit at 0, i.e. the boundary between two frames.
// led1 is lit while searching (state B) and led2 when all frames are written
// (state G). Only the transitions of the diagram are implemented: write_en = 0
// returns to A only from G; rst forces A from anywhere.
// From the description: states, transitions, outputs, the 4-bit frame counter
// (at most 15 frames). Own choices: binary state encoding, the D-state
// priority (G first), the LED mapping to single states.
module flash_fsm
  import fasic_pkg::*;
#(
  parameter int unsigned C_NUM_FRAMES = 4   // frames written after the flash, 1..15
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       write_en,      // both GPIO start bits set
  input  logic       found_frame,   // energy above threshold
  input  logic       frame_end,     // V_falling and Fo = 0
  output cap_state_t state,
  output logic       count_energy,  // CountEnergy
  output logic       write_frame,   // WriteFrame
  output logic [3:0] frame_count,
  output logic       led1,
  output logic       led2
);

  cap_state_t nxt;

  always_comb begin
    nxt = state;
    unique case (state)
      ST_A_RESET:     if (write_en) nxt = ST_B_LOOK;
      ST_B_LOOK:      if (found_frame) nxt = ST_C_WAITEND;
      ST_C_WAITEND:   if (frame_end) nxt = ST_D_WAITSTART;
      ST_D_WAITSTART: if (frame_count >= 4'(C_NUM_FRAMES)) nxt = ST_G_DONE;
                      else if (!frame_end) nxt = ST_E_INC;
      ST_E_INC:       nxt = ST_F_WRITE;
      ST_F_WRITE:     if (frame_end) nxt = ST_D_WAITSTART;
      ST_G_DONE:      if (!write_en) nxt = ST_A_RESET;
      default:        nxt = ST_A_RESET;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= ST_A_RESET;
      frame_count <= '0;
    end else begin
      state <= nxt;
      if (state == ST_B_LOOK)     frame_count <= '0;            // CountFrame_reset
      else if (state == ST_E_INC) frame_count <= frame_count + 4'd1; // CountFrame_en
    end
  end

  assign count_energy = (state == ST_B_LOOK);
  assign write_frame  = (state == ST_D_WAITSTART) || (state == ST_E_INC) || (state == ST_F_WRITE);
  assign led1         = (state == ST_B_LOOK);
  assign led2         = (state == ST_G_DONE);

  // The frame counter never exceeds the configured number of frames.
  a_count_bound: assert property (@(posedge clk) disable iff (rst) frame_count <= 4'(C_NUM_FRAMES));

endmodule
