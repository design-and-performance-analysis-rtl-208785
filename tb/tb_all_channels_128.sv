// tb_all_channels_128: the integrator with every channel averaging 128
// samples (19-bit sums on all three channels), the case of the reference
// waveform of the original design.
//
// Drives 256 sampling periods (two integrations, 16 ms of signal) of random
// 12-bit samples through the serial input and checks that each channel
// delivers exactly two averages, each equal to the truncated mean of its 128
// samples, and that exactly two output frames leave, 7680 clocks (8 ms)
// apart, each carrying the three new averages marked fresh.
module tb_all_channels_128;
  import integrator_pkg::*;

  localparam int unsigned N       = 128;
  localparam int unsigned PERIODS = 2 * N;
  localparam int unsigned GAP     = FRAME_CLKS - NUM_CH * SAMPLE_W;

  logic              clk = 1'b0;
  logic              rst_n = 1'b0;
  logic              sdata_in = 1'b0;
  logic              sync_in = 1'b0;
  logic              sdata_out, out_valid, out_first, out_fresh;
  ch_idx_t           out_ch;
  sample_t           avg [NUM_CH];
  logic [NUM_CH-1:0] avg_valid;

  int checks = 0, failures = 0;
  int cycle = 0;

  digital_integrator #(.AVG_N1(N), .AVG_N2(N), .AVG_N3(N)) dut (
    .clk(clk), .rst_n(rst_n), .sdata_i(sdata_in), .frame_sync_i(sync_in),
    .sdata_o(sdata_out), .out_valid_o(out_valid), .out_first_o(out_first),
    .out_ch_o(out_ch), .out_fresh_o(out_fresh),
    .avg_o(avg), .avg_valid_o(avg_valid)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  longint unsigned sum [NUM_CH] = '{0, 0, 0};
  int              cnt [NUM_CH] = '{0, 0, 0};
  sample_t         exp_avg [NUM_CH][$];
  sample_t         exp_out [$];       // expected serial words, in order
  int              n_avg [NUM_CH] = '{0, 0, 0};

  always @(negedge clk) begin
    if (rst_n) begin
      for (int c = 0; c < NUM_CH; c++) begin
        if (avg_valid[c]) begin
          n_avg[c]++;
          checks++;
          if (exp_avg[c].size() == 0 || avg[c] !== exp_avg[c][0]) begin
            failures++;
            $display("FAIL: channel %0d average %0d", c + 1, avg[c]);
          end
          if (exp_avg[c].size() != 0) void'(exp_avg[c].pop_front());
        end
      end
    end
  end

  // Serial output decoder.
  sample_t rx;
  int      rx_bits = 0, n_words = 0, n_frames = 0, last_start = -1;
  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      if (rx_bits == 0) begin
        checks++;
        if (out_fresh !== 1'b1) begin
          failures++;
          $display("FAIL: word %0d not marked fresh", n_words);
        end
        if (out_first) begin
          n_frames++;
          if (last_start >= 0) begin
            checks++;
            if (cycle - last_start != int'(N * FRAME_CLKS)) begin
              failures++;
              $display("FAIL: frames %0d clocks apart", cycle - last_start);
            end
          end
          last_start = cycle;
        end
      end
      rx = {rx[SAMPLE_W-2:0], sdata_out};
      rx_bits++;
      if (rx_bits == int'(SAMPLE_W)) begin
        rx_bits = 0;
        n_words++;
        checks++;
        if (exp_out.size() == 0 || rx !== exp_out[0]) begin
          failures++;
          $display("FAIL: serial word %0d = %0d", n_words, rx);
        end
        if (exp_out.size() != 0) void'(exp_out.pop_front());
      end
    end
  end

  task automatic drive_bit(input logic b, input logic s);
    @(negedge clk);
    sdata_in = b;
    sync_in  = s;
  endtask

  initial begin
    sample_t s;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int p = 0; p < int'(PERIODS); p++) begin
      for (int c = 0; c < NUM_CH; c++) begin
        s = sample_t'($urandom);
        for (int b = SAMPLE_W - 1; b >= 0; b--)
          drive_bit(s[b], (c == 0) && (b == SAMPLE_W - 1));
        sum[c] += s;
        cnt[c]++;
        if (cnt[c] == int'(N)) begin
          exp_avg[c].push_back(sample_t'(sum[c] / N));
          exp_out.push_back(sample_t'(sum[c] / N));
          sum[c] = 0;
          cnt[c] = 0;
        end
      end
      for (int g = 0; g < int'(GAP); g++) drive_bit(1'($urandom), 1'b0);
    end
    repeat (100) @(negedge clk);
    checks += 2;
    if (n_avg[0] != 2 || n_avg[1] != 2 || n_avg[2] != 2) begin
      failures++;
      $display("FAIL: averages per channel %0d %0d %0d, want 2", n_avg[0], n_avg[1], n_avg[2]);
    end
    if (n_frames != 2 || exp_out.size() != 0) begin
      failures++;
      $display("FAIL: %0d frames, %0d words missing", n_frames, exp_out.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (PERIODS * FRAME_CLKS + 2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
