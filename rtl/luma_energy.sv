// luma_energy: the frame energy counter of the flash detector.
//
// Adds the 8-bit luminance value of every enabled sample to a 32-bit sum and
// compares the sum against the runtime threshold. found goes high (registered)
// as soon as the running sum of the current frame exceeds the threshold; the
// sum is cleared at every frame start so each frame is measured on its own.
// The sum saturates instead of wrapping, so an over-bright frame can never look
// dark. Interface: sample_en qualifies y (a luminance word of active video
// while the state machine asks for counting); clear is the frame-start pulse.
// Timing: energy and found are valid the clock after the sample.
// From the description: luminance samples are summed per frame and compared
// with the threshold set over GPIO. Own choices: 32-bit width, saturation,
// clearing at each frame start and the strict "greater than" compare.
module luma_energy #(
  parameter int YW = 8,          // luminance bits summed per sample
  parameter int EW = 32          // energy counter width
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          clear,       // frame start: restart the sum
  input  logic          sample_en,   // y is a luminance sample to add
  input  logic [YW-1:0] y,
  input  logic [EW-1:0] threshold,
  output logic [EW-1:0] energy,
  output logic          found        // energy > threshold
);

  logic [EW:0] sum_next;
  assign sum_next = {1'b0, energy} + {{(EW+1-YW){1'b0}}, y};

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      energy <= '0;
    end else if (sample_en) begin
      energy <= sum_next[EW] ? '1 : sum_next[EW-1:0];
    end
  end

  assign found = (energy > threshold);

endmodule
