// tb_fx_mult: checks the (WA+WB-1)-bit product of MNN-free operands against
// an integer reference. Corner cases (largest magnitudes of both signs,
// zero, one LSB) are applied first, then random operands drawn from the
// MNN-free range.
module tb_fx_mult;
  localparam int WA = 12, WB = 12;
  localparam int AMAX = (1 << (WA-1)) - 1, BMAX = (1 << (WB-1)) - 1;
  logic signed [WA-1:0] a;
  logic signed [WB-1:0] b;
  logic signed [WA+WB-2:0] p;
  int checks = 0, failures = 0;

  fx_mult #(.WA(WA), .WB(WB)) dut (.a(a), .b(b), .p(p));

  task automatic apply(input int av, input int bv);
    longint expv;
    a = WA'(av);
    b = WB'(bv);
    #1;
    expv = longint'(av) * longint'(bv);
    checks++;
    if (longint'(p) != expv) begin
      failures++;
      if (failures < 10) $display("FAIL a=%0d b=%0d p=%0d exp=%0d", av, bv, p, expv);
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
    int corners_a[6] = '{AMAX, -AMAX, 0, 1, -1, AMAX - 1};
    int corners_b[6] = '{BMAX, -BMAX, 0, 1, -1, -BMAX + 1};
    foreach (corners_a[i]) foreach (corners_b[j]) apply(corners_a[i], corners_b[j]);
    repeat (100000) begin
      automatic int av, bv;
      av = int'($urandom_range(2 * AMAX)) - AMAX;
      bv = int'($urandom_range(2 * BMAX)) - BMAX;
      apply(av, bv);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
