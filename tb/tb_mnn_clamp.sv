// tb_mnn_clamp: exhaustive check of the MNN clamp at 12 bits. Every input
// value is applied; the expected output is the input itself, except that
// -2048 becomes -2047 with hit raised.
module tb_mnn_clamp;
  localparam int W = 12;
  logic signed [W-1:0] d, q;
  logic                hit;
  int checks = 0, failures = 0, hits = 0;

  mnn_clamp #(.W(W)) dut (.d(d), .q(q), .hit(hit));

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = -(1 << (W-1)); v < (1 << (W-1)); v++) begin
      int exp_q;
      bit exp_hit;
      d = W'(v);
      #1;
      exp_hit = (v == -(1 << (W-1)));
      exp_q   = exp_hit ? v + 1 : v;
      checks++;
      if (int'(q) != exp_q || hit != exp_hit) begin
        failures++;
        if (failures < 10) $display("FAIL d=%0d q=%0d hit=%0b", v, q, hit);
      end
      if (hit) hits++;
    end
    checks++;
    if (hits != 1) begin failures++; $display("FAIL hit count %0d", hits); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
