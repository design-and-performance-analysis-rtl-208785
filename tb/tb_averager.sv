// tb_averager: self-checking test of the averager.
//
// Tests the three channel sizes (128, 32 and 16 samples: 19-, 17- and 16-bit
// sums) side by side with random sums, including the full-scale corner. The
// average is the sum divided by AVG_N with the remainder dropped; it must
// appear one clock after the dump strobe and hold until the next one.
module tb_averager;
  import integrator_pkg::*;

  localparam int unsigned N1 = AVG_N_CH1, N2 = AVG_N_CH2, N3 = AVG_N_CH3;
  localparam int unsigned W1 = SAMPLE_W + $clog2(N1);
  localparam int unsigned W2 = SAMPLE_W + $clog2(N2);
  localparam int unsigned W3 = SAMPLE_W + $clog2(N3);
  localparam int unsigned ROUNDS = 200;

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic [W1-1:0] sum1 = '0;
  logic [W2-1:0] sum2 = '0;
  logic [W3-1:0] sum3 = '0;
  logic          dump = 1'b0;
  sample_t       avg1, avg2, avg3;
  logic          v1, v2, v3;

  int checks = 0, failures = 0;

  averager #(.AVG_N(N1)) dut1 (.clk(clk), .rst_n(rst_n), .sum_i(sum1), .dump_i(dump),
                               .avg_o(avg1), .valid_o(v1));
  averager #(.AVG_N(N2)) dut2 (.clk(clk), .rst_n(rst_n), .sum_i(sum2), .dump_i(dump),
                               .avg_o(avg2), .valid_o(v2));
  averager #(.AVG_N(N3)) dut3 (.clk(clk), .rst_n(rst_n), .sum_i(sum3), .dump_i(dump),
                               .avg_o(avg3), .valid_o(v3));

  always #5 clk = ~clk;

  task automatic expect_eq(input string what, input int got, input int want);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL: %s = %0d, want %0d", what, got, want);
    end
  endtask

  initial begin
    int e1, e2, e3;
    e1 = 0; e2 = 0; e3 = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < int'(ROUNDS); r++) begin
      @(negedge clk);
      // Sums an N-sample accumulation can produce: at most N * 4095.
      if (r == 0) begin
        sum1 = W1'(N1 * 4095); sum2 = W2'(N2 * 4095); sum3 = W3'(N3 * 4095);
      end else begin
        sum1 = W1'($urandom_range(N1 * 4095));
        sum2 = W2'($urandom_range(N2 * 4095));
        sum3 = W3'($urandom_range(N3 * 4095));
      end
      dump = ($urandom_range(1) == 1) || (r == 0);
      if (dump) begin
        e1 = int'(sum1) / int'(N1);
        e2 = int'(sum2) / int'(N2);
        e3 = int'(sum3) / int'(N3);
      end
      @(posedge clk);
      #1;
      expect_eq("valid1", int'(v1), int'(dump));
      expect_eq("valid2", int'(v2), int'(dump));
      expect_eq("valid3", int'(v3), int'(dump));
      expect_eq("avg1", int'(avg1), e1);
      expect_eq("avg2", int'(avg2), e2);
      expect_eq("avg3", int'(avg3), e3);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (ROUNDS * 2 + 100) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
