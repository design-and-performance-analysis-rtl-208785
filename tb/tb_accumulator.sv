// tb_accumulator: self-checking test of the sum-and-dump accumulator.
//
// Runs the accumulator at the channel-1 size (AVG_N = 128, 19-bit sums) with
// random samples arriving on random cycles, then with full-scale samples to
// show that the sum reaches 128 * 4095 without overflowing. Each dump must
// come exactly one clock after the 128th sample, carry the exact sum of the
// last 128 samples, and leave the running buffer at zero.
module tb_accumulator;
  import integrator_pkg::*;

  localparam int unsigned N     = AVG_N_CH1;
  localparam int unsigned ACC_W = SAMPLE_W + $clog2(N);
  localparam int unsigned DUMPS = 6;

  logic             clk = 1'b0;
  logic             rst_n = 1'b0;
  sample_t          sample = '0;
  logic             valid = 1'b0;
  logic [ACC_W-1:0] acc, sum;
  logic             dump;

  int checks = 0, failures = 0;
  int dumps_seen = 0;

  accumulator dut (
    .clk(clk), .rst_n(rst_n), .sample_i(sample), .valid_i(valid),
    .acc_o(acc), .sum_o(sum), .dump_o(dump)
  );

  always #5 clk = ~clk;

  // Reference sum kept as a wide integer, independent of ACC_W.
  longint unsigned ref_sum = 0;
  int              ref_cnt = 0;

  task automatic give(input sample_t s);
    @(negedge clk);
    sample = s;
    valid  = 1'b1;
    ref_sum += s;
    ref_cnt++;
    @(posedge clk);
    #1;
    valid = 1'b0;
    if (ref_cnt == int'(N)) begin
      checks += 3;
      if (dump !== 1'b1) begin
        failures++;
        $display("FAIL: no dump after sample %0d", N);
      end
      if (longint'(sum) != ref_sum) begin
        failures++;
        $display("FAIL: sum %0d, want %0d", sum, ref_sum);
      end
      if (acc !== '0) begin
        failures++;
        $display("FAIL: buffer %0d after dump, want 0", acc);
      end
      dumps_seen++;
      ref_sum = 0;
      ref_cnt = 0;
    end else begin
      checks += 2;
      if (dump !== 1'b0) begin
        failures++;
        $display("FAIL: early dump at sample %0d", ref_cnt);
      end
      if (longint'(acc) != ref_sum) begin
        failures++;
        $display("FAIL: buffer %0d, want %0d", acc, ref_sum);
      end
    end
    // Idle cycles between samples: no dump, no change.
    repeat ($urandom_range(2)) begin
      @(posedge clk);
      #1;
      checks++;
      if (dump !== 1'b0) begin
        failures++;
        $display("FAIL: dump without a sample");
      end
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int d = 0; d < int'(DUMPS) - 2; d++)
      for (int i = 0; i < int'(N); i++) give(sample_t'($urandom));
    for (int d = 0; d < 2; d++)
      for (int i = 0; i < int'(N); i++) give('1);
    checks++;
    if (dumps_seen != int'(DUMPS)) begin
      failures++;
      $display("FAIL: %0d dumps, want %0d", dumps_seen, DUMPS);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (DUMPS * N * 4 + 100) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
