// fx_mult: signed fixed-point multiplier for operands that are never the
// most-negative number (MNN).
//
// For two's-complement operands of WA and WB bits, the full product needs
// WA+WB bits only when both operands are the MNN. With the MNN excluded the
// top two product bits are always equal, so the MSB is redundant and is
// dropped here: (1/0/11) x (1/0/11) gives (1/0/22), 23 bits, instead of the
// (1/1/22) a general fixed-point library would produce. The fraction bits
// are kept in full; no rounding happens.
//
// Interface: a (WA bits), b (WB bits), p (WA+WB-1 bits), all signed.
// Timing: combinational. The multiply itself is left to the synthesis tool.
// An immediate assertion checks that the dropped bit really was redundant.
module fx_mult #(
  parameter int unsigned WA = 12,
  parameter int unsigned WB = 12
) (
  input  logic signed [WA-1:0]    a,
  input  logic signed [WB-1:0]    b,
  output logic signed [WA+WB-2:0] p
);

  logic signed [WA+WB-1:0] full;

  always_comb begin
    full = a * b;
    p    = full[WA+WB-2:0];
  end

  // The discarded MSB must be a copy of the kept sign bit; it is not only
  // when both operands are the MNN.
  always_comb begin
    a_no_mnn_pair : assert (full[WA+WB-1] == full[WA+WB-2])
      else $error("fx_mult: both operands are the most-negative number");
  end

endmodule
