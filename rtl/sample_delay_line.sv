// sample_delay_line: the input register bank of the FIR filter, a tapped
// shift register holding the K most recent samples.
//
// Each cycle with shift high the new sample enters taps[0] and every older
// sample moves one place along; the oldest falls off taps[K-1]. With shift
// low the taps hold. The filter equation needs the set of the K latest
// samples; the shift-register form, the enable and the reset are this
// design's own choices.
//
// Interface: clk, rst_n (synchronous, active low, clears every tap), shift,
// din (W bits signed), taps[K] (taps[0] newest).
// Timing: taps change on the rising edge after shift is seen high.
module sample_delay_line #(
  parameter int unsigned K = 8,
  parameter int unsigned W = 12
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                shift,
  input  logic signed [W-1:0] din,
  output logic signed [W-1:0] taps [K]
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < K; i++) taps[i] <= '0;
    end else if (shift) begin
      taps[0] <= din;
      for (int i = 1; i < K; i++) taps[i] <= taps[i-1];
    end
  end

endmodule
