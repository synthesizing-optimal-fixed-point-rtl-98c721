// mnn_clamp: removes the most-negative number (MNN) from a two's-complement
// stream.
//
// The MNN (1000...0) is the one value whose negation does not fit in the same
// word. Replacing it by MNN+1 at the primary inputs guarantees that negation,
// absolute value and multiplication downstream never produce it, which lets
// every product drop its redundant sign bit. The comparison against the MNN
// and the increment follow the method the design is built from; since the
// MNN has all lower bits zero, the increment reduces to setting bit 0.
//
// Interface: d in, q out (same width W), hit high when d was the MNN.
// Timing: purely combinational. The hit flag is this design's own addition.
module mnn_clamp #(
  parameter int unsigned W = 12
) (
  input  logic signed [W-1:0] d,
  output logic signed [W-1:0] q,
  output logic                hit
);

  localparam logic signed [W-1:0] MNN = {1'b1, {(W-1){1'b0}}};

  always_comb begin
    hit = (d == MNN);
    q   = {d[W-1:1], d[0] | hit};
  end

endmodule
