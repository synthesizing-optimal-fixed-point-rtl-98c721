// tb_adder_tree: checks the balanced adder tree against an integer sum, for
// extreme inputs (all terms at the most-positive or most-negative value,
// which need every bit of growth) and for random terms over the full range.
module tb_adder_tree;
  localparam int N = 8, WI = 23, WO = WI + $clog2(N);
  logic signed [WI-1:0] terms [N];
  logic signed [WO-1:0] sum;
  int checks = 0, failures = 0;

  adder_tree #(.N(N), .WI(WI)) dut (.terms(terms), .sum(sum));

  task automatic check_sum();
    longint expv = 0;
    #1;
    for (int i = 0; i < N; i++) expv += longint'(terms[i]);
    checks++;
    if (longint'(sum) != expv) begin
      failures++;
      if (failures < 10) $display("FAIL sum=%0d exp=%0d", sum, expv);
    end
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) terms[i] = {1'b0, {(WI-1){1'b1}}};
    check_sum();
    for (int i = 0; i < N; i++) terms[i] = {1'b1, {(WI-1){1'b0}}};
    check_sum();
    for (int i = 0; i < N; i++) terms[i] = (i % 2 != 0) ? {1'b1, {(WI-1){1'b0}}} : {1'b0, {(WI-1){1'b1}}};
    check_sum();
    // one term at a time, to catch a term that is dropped or misrouted
    for (int k = 0; k < N; k++) begin
      for (int i = 0; i < N; i++) terms[i] = '0;
      terms[k] = WI'(k * 1000 + 7);
      check_sum();
      terms[k] = -WI'(k * 1000 + 7);
      check_sum();
    end
    repeat (20000) begin
      for (int i = 0; i < N; i++) terms[i] = WI'($urandom);
      check_sum();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
