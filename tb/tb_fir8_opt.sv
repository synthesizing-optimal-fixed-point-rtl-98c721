// tb_fir8_opt: end-to-end test of the 8-tap filter at its default sizes.
//
// A software model keeps the clamped coefficients and the last eight
// clamped samples and computes Y = sum A_i * X_i exactly in 64-bit
// integers. Each accepted sample must produce exactly one output, two
// rising edges after it was accepted, equal to the model's value.
// Directed phases drive the extremes: all coefficients and samples at -1.0
// (every product is the case that would need an extra product bit without
// the clamp), all at the most-positive value, and mixed signs; a random
// phase adds stalls, mid-stream coefficient reloads and occasional -1.0
// inputs. Each mechanism is counted and must have happened at least once.
module tb_fir8_opt;
  import fx_pkg::*;
  localparam int TAPS = FIR_TAPS, W = FIR_W;
  localparam int PW = prod_width(W, W), YW = tree_width(PW, TAPS);
  localparam int MNNV = -(1 << (W-1));
  localparam int MAXV = (1 << (W-1)) - 1;

  logic clk = 0, rst_n = 0;
  logic coef_load = 0, in_valid = 0;
  logic signed [W-1:0] coef_in [TAPS];
  logic signed [W-1:0] x_in = '0;
  logic out_valid, x_mnn_hit, coef_mnn_hit;
  logic signed [YW-1:0] y_out;

  fir8_opt dut (
    .clk(clk), .rst_n(rst_n), .coef_load(coef_load), .coef_in(coef_in),
    .in_valid(in_valid), .x_in(x_in), .out_valid(out_valid), .y_out(y_out),
    .x_mnn_hit(x_mnn_hit), .coef_mnn_hit(coef_mnn_hit)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_x_clamp = 0, n_coef_clamp = 0, n_stall = 0, n_reload = 0;
  int n_mnn_pair = 0, n_big_pos = 0, n_big_neg = 0, n_back_to_back = 0;

  // reference model
  int     m_coef [TAPS];
  int     m_hist [TAPS];
  longint exp_y [$];
  int     exp_due [$];
  int     edge_no = 0;
  int     last_out_edge = -10;

  function automatic int clampv(int v);
    return (v == MNNV) ? v + 1 : v;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model update on each rising edge, using the inputs driven before it
  always @(posedge clk) begin
    edge_no <= edge_no + 1;
    if (!rst_n) begin
      foreach (m_coef[i]) m_coef[i] = 0;
      foreach (m_hist[i]) m_hist[i] = 0;
    end else begin
      if (coef_load) begin
        foreach (m_coef[i]) m_coef[i] = clampv(int'(coef_in[i]));
        if (coef_mnn_hit) n_coef_clamp++;
      end
      if (in_valid) begin
        automatic longint s = 0;
        for (int i = TAPS - 1; i > 0; i--) m_hist[i] = m_hist[i-1];
        m_hist[0] = clampv(int'(x_in));
        if (x_mnn_hit) n_x_clamp++;
        for (int i = 0; i < TAPS; i++) begin
          s += longint'(m_coef[i]) * longint'(m_hist[i]);
          if (m_coef[i] == MNNV + 1 && m_hist[i] == MNNV + 1) n_mnn_pair++;
        end
        exp_y.push_back(s);
        exp_due.push_back(edge_no + 1);
      end else n_stall++;
    end
  end

  // output check after each rising edge
  always @(negedge clk) begin
    if (rst_n) begin
      if (out_valid) begin
        checks++;
        if (exp_y.size() == 0) begin
          failures++;
          $display("FAIL unexpected output at edge %0d", edge_no - 1);
        end else begin
          automatic longint e = exp_y.pop_front();
          automatic int due = exp_due.pop_front();
          if (longint'(y_out) != e || due != edge_no - 1) begin
            failures++;
            if (failures < 10)
              $display("FAIL edge %0d: y=%0d exp=%0d due=%0d", edge_no - 1, y_out, e, due);
          end
          if (e >= 64'sd4 <<< (2 * (W - 1))) n_big_pos++;
          if (e <= -(64'sd4 <<< (2 * (W - 1)))) n_big_neg++;
          if (last_out_edge == edge_no - 2) n_back_to_back++;
          last_out_edge = edge_no - 1;
        end
      end else if (exp_due.size() != 0 && exp_due[0] == edge_no - 1) begin
        checks++;
        failures++;
        $display("FAIL missing output due at edge %0d", edge_no - 1);
      end
    end
  end

  task automatic load_all(input int v);
    @(negedge clk);
    foreach (coef_in[i]) coef_in[i] = W'(v);
    coef_load = 1;
    @(negedge clk);
    coef_load = 0;
    n_reload++;
  endtask

  task automatic stream(input int v, input int n);
    repeat (n) begin
      @(negedge clk);
      x_in = W'(v);
      in_valid = 1;
    end
    @(negedge clk);
    in_valid = 0;
  endtask

  task automatic require(input string what, input int count);
    checks++;
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    foreach (coef_in[i]) coef_in[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // -1.0 everywhere: every product is (-1+2^-11)^2, the sum near +8
    load_all(MNNV);
    stream(MNNV, TAPS + 2);
    // most-positive everywhere, then mixed signs: sums near +8 and -8
    load_all(MAXV);
    stream(MAXV, TAPS + 2);
    stream(MNNV, TAPS + 2);
    // impulse response returns the coefficients one by one
    @(negedge clk);
    foreach (coef_in[i]) coef_in[i] = W'(100 * i - 350);
    coef_load = 1;
    @(negedge clk);
    coef_load = 0;
    n_reload++;
    stream(0, TAPS);
    stream(MAXV, 1);
    stream(0, TAPS + 1);
    // random traffic with stalls, reloads and -1.0 inputs
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      in_valid = ($urandom_range(3) != 0);
      x_in = ($urandom_range(15) == 0) ? W'(MNNV) : W'($urandom);
      coef_load = ($urandom_range(99) == 0);
      if (coef_load) begin
        n_reload++;
        foreach (coef_in[i]) coef_in[i] = ($urandom_range(7) == 0) ? W'(MNNV) : W'($urandom);
      end
    end
    @(negedge clk);
    in_valid = 0;
    coef_load = 0;
    repeat (4) @(negedge clk);
    checks++;
    if (exp_y.size() != 0) begin
      failures++;
      $display("FAIL %0d outputs never appeared", exp_y.size());
    end
    require("sample clamped from -1.0", n_x_clamp);
    require("coefficient clamped from -1.0", n_coef_clamp);
    require("product of two clamped -1.0 operands", n_mnn_pair);
    require("input stall", n_stall);
    require("coefficient reload", n_reload);
    require("output >= +4.0", n_big_pos);
    require("output <= -4.0", n_big_neg);
    require("back-to-back outputs", n_back_to_back);
    $display("x_clamp=%0d coef_clamp=%0d mnn_pair=%0d stall=%0d reload=%0d big_pos=%0d big_neg=%0d b2b=%0d",
             n_x_clamp, n_coef_clamp, n_mnn_pair, n_stall, n_reload, n_big_pos, n_big_neg, n_back_to_back);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
