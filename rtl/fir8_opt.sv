// fir8_opt: 8-tap FIR filter, Y = sum A_i * X_i, with word lengths trimmed
// to what the arithmetic can actually produce.
//
// Samples and coefficients are (1/0/11) two's-complement fractions. Both
// pass through an MNN clamp on the way in, so the most-negative number
// (-1.0) never reaches a multiplier. Every product then fits in (1/0/22),
// one bit narrower than a general library's (1/1/22), and the products are
// summed by a balanced adder tree to (1/3/22): 26 bits, with no redundant
// sign bit, because the sum of eight values each below 1 in magnitude is
// below 8. A straight accumulator chain under general library rules would
// have produced (1/8/22), 31 bits.
//
// Structure: coefficient register bank and input sample delay line -> 8
// combinational multipliers -> combinational adder tree -> output register.
// The multipliers and the tree sit between register banks, as in the
// design's source. The coefficient load port, the valid handshake and the
// reset are this design's own choices.
//
// Interface:
//   coef_load, coef_in[TAPS]  load all coefficients at once (clamped)
//   in_valid, x_in            one new sample per cycle when in_valid is high
//                             (clamped, then shifted into the delay line)
//   out_valid, y_out          filter output in (1/log2(TAPS)/2*(W-1))
//   x_mnn_hit, coef_mnn_hit   pulse when an input had to be clamped
// Timing: a sample accepted at rising edge E enters the delay line at E; the
// output including it is registered at E+1, with out_valid high for the
// cycle after E+1. Throughput is one sample per cycle; in_valid low stalls
// the filter (delay line holds, no output). A coefficient load takes effect
// for the output registered at the next edge after the coefficients are
// latched.
module fir8_opt
  import fx_pkg::*;
#(
  parameter int unsigned TAPS = FIR_TAPS,
  parameter int unsigned W    = FIR_W,
  localparam int unsigned PW  = prod_width(W, W),
  localparam int unsigned YW  = tree_width(PW, TAPS)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 coef_load,
  input  logic signed [W-1:0]  coef_in [TAPS],
  input  logic                 in_valid,
  input  logic signed [W-1:0]  x_in,
  output logic                 out_valid,
  output logic signed [YW-1:0] y_out,
  output logic                 x_mnn_hit,
  output logic                 coef_mnn_hit
);

  localparam logic signed [W-1:0] MNN = {1'b1, {(W-1){1'b0}}};

  // ---- input clamps ----------------------------------------------------
  logic signed [W-1:0] x_clamped;
  logic signed [W-1:0] coef_clamped [TAPS];
  logic [TAPS-1:0]     coef_hit;

  mnn_clamp #(.W(W)) u_x_clamp (.d(x_in), .q(x_clamped), .hit(x_mnn_hit));

  for (genvar i = 0; i < TAPS; i++) begin : g_coef_clamp
    mnn_clamp #(.W(W)) u_clamp (.d(coef_in[i]), .q(coef_clamped[i]), .hit(coef_hit[i]));
  end

  assign coef_mnn_hit = coef_load && (|coef_hit);

  // ---- register banks --------------------------------------------------
  logic signed [W-1:0] coef [TAPS];
  logic signed [W-1:0] taps [TAPS];
  logic                taps_new;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < TAPS; i++) coef[i] <= '0;
    end else if (coef_load) begin
      for (int i = 0; i < TAPS; i++) coef[i] <= coef_clamped[i];
    end
  end

  sample_delay_line #(.K(TAPS), .W(W)) u_delay (
    .clk  (clk),
    .rst_n(rst_n),
    .shift(in_valid),
    .din  (x_clamped),
    .taps (taps)
  );

  // ---- products and adder tree ----------------------------------------
  logic signed [PW-1:0] prod [TAPS];
  logic signed [YW-1:0] sum;

  for (genvar i = 0; i < TAPS; i++) begin : g_mult
    fx_mult #(.WA(W), .WB(W)) u_mult (.a(coef[i]), .b(taps[i]), .p(prod[i]));
  end

  adder_tree #(.N(TAPS), .WI(PW)) u_tree (.terms(prod), .sum(sum));

  // ---- output register -------------------------------------------------
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      taps_new  <= 1'b0;
      out_valid <= 1'b0;
      y_out     <= '0;
    end else begin
      taps_new  <= in_valid;
      out_valid <= taps_new;
      if (taps_new) y_out <= sum;
    end
  end

  // ---- rules the word lengths rely on ----------------------------------
  for (genvar i = 0; i < TAPS; i++) begin : g_chk
    a_tap_no_mnn  : assert property (@(posedge clk) disable iff (!rst_n) taps[i] != MNN);
    a_coef_no_mnn : assert property (@(posedge clk) disable iff (!rst_n) coef[i] != MNN);
  end

endmodule
