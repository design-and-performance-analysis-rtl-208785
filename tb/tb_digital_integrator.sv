// tb_digital_integrator: end-to-end test of the three-channel integrator at
// its default sizes (averaging by 128, 32 and 16 at 16 kHz with a 960 kHz
// clock).
//
// An ADC link model sends one 60-clock frame per sampling period: frame_sync
// and three 12-bit samples, MSB first, then 24 idle clocks of random bits.
// Each channel carries a constant level plus uniform noise, as a detected
// radiometer signal would; sampling periods 128 to 255 are driven at full
// scale (4095 on every channel). 512 sampling periods are run: four
// integrations of channel 1 (32 ms of signal).
//
// A reference model sums each channel's samples as integers and divides by
// the averaging factor. Checks:
//   * every avg_valid_o pulse carries the right average, exactly 4 clocks
//     after the last bit of the channel's N-th sample, and there are 4, 16
//     and 32 of them for channels 1, 2, 3;
//   * every output frame, decoded from sdata_o, holds the current averages
//     of channels 1, 2, 3 in that order with the right channel tags and fresh
//     flags, and starts 6 clocks after the last bit of the sampling period in
//     which a channel dumped;
//   * frames start exactly 960 clocks (1 ms) apart.
// Mechanisms counted (each must happen): a dump of each channel, a
// full-scale integration that fills the 19-bit sum without overflow, an
// average whose discarded low bits were not zero, and fresh and repeated
// words in the output.
module tb_digital_integrator;
  import integrator_pkg::*;

  localparam int unsigned PERIODS = 4 * AVG_N_CH1;
  localparam int unsigned GAP     = FRAME_CLKS - NUM_CH * SAMPLE_W;
  localparam int unsigned AVG_N [NUM_CH] = '{AVG_N_CH1, AVG_N_CH2, AVG_N_CH3};
  localparam int unsigned LEVEL [NUM_CH] = '{1500, 2600, 700};
  localparam int unsigned NOISE [NUM_CH] = '{600, 400, 300};

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

  digital_integrator dut (
    .clk(clk), .rst_n(rst_n), .sdata_i(sdata_in), .frame_sync_i(sync_in),
    .sdata_o(sdata_out), .out_valid_o(out_valid), .out_first_o(out_first),
    .out_ch_o(out_ch), .out_fresh_o(out_fresh),
    .avg_o(avg), .avg_valid_o(avg_valid)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic fail(input string msg);
    failures++;
    $display("FAIL (cycle %0d): %s", cycle, msg);
  endtask

  // ---------------------------------------------------------------- reference
  typedef struct {
    sample_t avg [NUM_CH];
    bit      fresh [NUM_CH];
    int      start;
  } frame_t;

  longint unsigned ref_sum [NUM_CH] = '{0, 0, 0};
  int              ref_cnt [NUM_CH] = '{0, 0, 0};
  sample_t         ref_avg [NUM_CH] = '{0, 0, 0};
  bit              ref_fresh [NUM_CH] = '{0, 0, 0};
  sample_t         exp_avg [NUM_CH][$];
  int              exp_avg_cyc [NUM_CH][$];
  frame_t          exp_frame [$];

  // Mechanism counters.
  int n_dump [NUM_CH] = '{0, 0, 0};
  int n_full_scale = 0, n_truncated = 0, n_fresh_words = 0, n_repeat_words = 0;
  int n_frames = 0;

  // Called with the cycle count at which the last bit of a channel's sample
  // is put on the line.
  task automatic ref_sample(input int c, input sample_t s, input int drive_cyc);
    ref_sum[c] += s;
    ref_cnt[c]++;
    if (ref_cnt[c] == int'(AVG_N[c])) begin
      ref_avg[c]   = sample_t'(ref_sum[c] / AVG_N[c]);
      ref_fresh[c] = 1;
      if (ref_sum[c] == longint'(AVG_N[c]) * 4095) n_full_scale++;
      if (ref_sum[c] % AVG_N[c] != 0) n_truncated++;
      exp_avg[c].push_back(ref_avg[c]);
      exp_avg_cyc[c].push_back(drive_cyc + 4);
      ref_sum[c] = 0;
      ref_cnt[c] = 0;
    end
    // After the last channel's sample of a period, a frame goes out if any
    // channel has a new average.
    if (c == int'(NUM_CH) - 1 && (ref_fresh[0] || ref_fresh[1] || ref_fresh[2])) begin
      frame_t f;
      for (int k = 0; k < NUM_CH; k++) begin
        f.avg[k]     = ref_avg[k];
        f.fresh[k]   = ref_fresh[k];
        ref_fresh[k] = 0;
      end
      f.start = drive_cyc + 4 + 2;
      exp_frame.push_back(f);
    end
  endtask

  // ------------------------------------------------------------ ADC link model
  task automatic drive_bit(input logic b, input logic s);
    @(negedge clk);
    sdata_in = b;
    sync_in  = s;
  endtask

  task automatic send_period(input int p);
    sample_t s [NUM_CH];
    for (int c = 0; c < NUM_CH; c++) begin
      if (p >= int'(AVG_N_CH1) && p < 2 * int'(AVG_N_CH1))
        s[c] = '1;
      else
        s[c] = sample_t'(LEVEL[c] - NOISE[c] + $urandom_range(2 * NOISE[c]));
    end
    for (int c = 0; c < NUM_CH; c++) begin
      for (int b = SAMPLE_W - 1; b >= 0; b--) begin
        drive_bit(s[c][b], (c == 0) && (b == SAMPLE_W - 1));
        if (b == 0) ref_sample(c, s[c], cycle);
      end
    end
    for (int g = 0; g < int'(GAP); g++) drive_bit(1'($urandom), 1'b0);
  endtask

  // ------------------------------------------------------- parallel averages
  always @(negedge clk) begin
    if (rst_n) begin
      for (int c = 0; c < NUM_CH; c++) begin
        if (avg_valid[c]) begin
          n_dump[c]++;
          checks += 2;
          if (exp_avg[c].size() == 0) begin
            fail($sformatf("unexpected average on channel %0d", c + 1));
          end else begin
            sample_t w;
            int      k;
            w = exp_avg[c].pop_front();
            k = exp_avg_cyc[c].pop_front();
            if (avg[c] !== w)
              fail($sformatf("channel %0d average %0d, want %0d", c + 1, avg[c], w));
            if (cycle != k)
              fail($sformatf("channel %0d average at cycle %0d, want %0d", c + 1, cycle, k));
          end
        end
      end
    end
  end

  // ---------------------------------------------------- serial output decoder
  sample_t rx_word;
  int      rx_bits = 0;
  int      rx_idx = 0;
  frame_t  rx_frame;
  int      last_start = -1;

  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      if (rx_bits == 0) begin
        // first bit of a word: its tags
        checks += 2;
        if (out_first !== (rx_idx == 0))
          fail("frame-start marker in the wrong place");
        if (int'(out_ch) != rx_idx)
          fail($sformatf("word tagged channel %0d, want %0d", out_ch + 1, rx_idx + 1));
        rx_frame.fresh[rx_idx] = out_fresh;
        if (out_first) begin
          rx_frame.start = cycle;
          if (last_start >= 0) begin
            checks++;
            if (cycle - last_start != int'(AVG_N_CH3 * FRAME_CLKS))
              fail($sformatf("frames %0d clocks apart, want %0d",
                             cycle - last_start, AVG_N_CH3 * FRAME_CLKS));
          end
          last_start = cycle;
        end
      end
      rx_word = {rx_word[SAMPLE_W-2:0], sdata_out};
      rx_bits++;
      if (rx_bits == int'(SAMPLE_W)) begin
        rx_frame.avg[rx_idx] = rx_word;
        rx_bits = 0;
        rx_idx++;
        if (rx_idx == int'(NUM_CH)) begin
          rx_idx = 0;
          n_frames++;
          checks++;
          if (exp_frame.size() == 0) begin
            fail("unexpected output frame");
          end else begin
            frame_t f;
            f = exp_frame.pop_front();
            if (rx_frame.start != f.start)
              fail($sformatf("frame started at %0d, want %0d", rx_frame.start, f.start));
            for (int c = 0; c < NUM_CH; c++) begin
              checks += 2;
              if (rx_frame.avg[c] !== f.avg[c])
                fail($sformatf("frame word %0d = %0d, want %0d", c + 1, rx_frame.avg[c], f.avg[c]));
              if (rx_frame.fresh[c] != f.fresh[c])
                fail($sformatf("frame word %0d fresh %0d, want %0d", c + 1, rx_frame.fresh[c], f.fresh[c]));
              if (f.fresh[c]) n_fresh_words++;
              else            n_repeat_words++;
            end
          end
        end
      end
    end
  end

  // -------------------------------------------------------------- stimulus
  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (7) @(negedge clk);
    for (int p = 0; p < int'(PERIODS); p++) send_period(p);
    repeat (100) @(negedge clk);

    checks += 3;
    if (exp_frame.size() != 0) fail($sformatf("%0d output frames missing", exp_frame.size()));
    if (rx_bits != 0 || rx_idx != 0) fail("output frame cut short");
    if (n_frames != int'(PERIODS / AVG_N_CH3))
      fail($sformatf("%0d output frames, want %0d", n_frames, PERIODS / AVG_N_CH3));
    for (int c = 0; c < NUM_CH; c++) begin
      checks++;
      if (n_dump[c] != int'(PERIODS / AVG_N[c]) || exp_avg[c].size() != 0)
        fail($sformatf("channel %0d dumped %0d times, want %0d", c + 1, n_dump[c], PERIODS / AVG_N[c]));
    end
    checks += 4;
    if (n_full_scale == 0) fail("no full-scale integration happened");
    if (n_truncated == 0)  fail("no average dropped non-zero low bits");
    if (n_fresh_words == 0) fail("no fresh word was sent");
    if (n_repeat_words == 0) fail("no repeated word was sent");
    $display("dumps ch1=%0d ch2=%0d ch3=%0d frames=%0d full-scale=%0d truncated=%0d fresh=%0d repeated=%0d",
             n_dump[0], n_dump[1], n_dump[2], n_frames, n_full_scale, n_truncated,
             n_fresh_words, n_repeat_words);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (PERIODS * FRAME_CLKS + 2000) @(posedge clk);
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
