// tb_sample_delay_line: drives random samples with a random shift enable
// and compares every tap after every clock with a software model of the
// shift register, including reset clearing all taps.
module tb_sample_delay_line;
  localparam int K = 8, W = 12;
  logic clk = 0, rst_n = 0, shift = 0;
  logic signed [W-1:0] din = '0;
  logic signed [W-1:0] taps [K];
  int model [K];
  int checks = 0, failures = 0, shifts = 0, holds = 0;

  sample_delay_line #(.K(K), .W(W)) dut (.clk(clk), .rst_n(rst_n), .shift(shift), .din(din), .taps(taps));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    for (int i = 0; i < K; i++) begin
      checks++;
      if (int'(taps[i]) != model[i]) begin
        failures++;
        if (failures < 10) $display("FAIL tap %0d = %0d exp %0d", i, taps[i], model[i]);
      end
    end
  endtask

  initial begin
    for (int i = 0; i < K; i++) model[i] = 0;
    @(negedge clk); rst_n = 0;
    @(negedge clk); rst_n = 1;
    compare();
    for (int n = 0; n < 3000; n++) begin
      shift = ($urandom_range(3) != 0);
      din   = W'($urandom);
      if (n == 2000) rst_n = 0;
      @(posedge clk);
      if (!rst_n) begin
        for (int i = 0; i < K; i++) model[i] = 0;
      end else if (shift) begin
        for (int i = K - 1; i > 0; i--) model[i] = model[i-1];
        model[0] = int'(din);
        shifts++;
      end else holds++;
      @(negedge clk);
      rst_n = 1;
      compare();
    end
    checks++;
    if (shifts == 0 || holds == 0) failures++;
    $display("shifts=%0d holds=%0d", shifts, holds);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
