// tb_multiplexer: self-checking test of the output multiplexer/sequencer.
//
// A simple serialiser model accepts a word and stays busy for a random 1 to
// 14 cycles. Averages arrive on random channels at random times, and
// period-end strobes at other random times, sometimes while a frame is still
// going out. A frame is due END_DELAY (2) clocks after a period end if some
// channel then has a new average. Checks: each frame is channels 0, 1, 2 in
// order with first_o on channel 0 only; every word equals that channel's
// current average; fresh_o is set exactly when the channel produced a new
// average since its word was last sent; a request during a frame yields one
// more frame; a period end with nothing new yields none; no load is issued
// while the serialiser is busy.
module tb_multiplexer;
  import integrator_pkg::*;

  localparam int unsigned EVENTS = 600;

  logic              clk = 1'b0;
  logic              rst_n = 1'b0;
  sample_t           avg [NUM_CH];
  logic [NUM_CH-1:0] avg_valid = '0;
  logic              period_end = 1'b0;
  logic              ready;
  sample_t           word;
  ch_idx_t           ch;
  logic              first, fresh, load;

  int checks = 0, failures = 0;
  int busy_left = 0;
  int frames = 0, overlap_requests = 0, empty_ends = 0;

  multiplexer dut (
    .clk(clk), .rst_n(rst_n), .avg_i(avg), .avg_valid_i(avg_valid),
    .period_end_i(period_end),
    .ready_i(ready), .word_o(word), .ch_o(ch), .first_o(first),
    .fresh_o(fresh), .load_o(load)
  );

  always #5 clk = ~clk;
  assign ready = (busy_left == 0);

  // Reference state.
  logic [NUM_CH-1:0] ref_fresh = '0;
  int                ref_next  = 0;     // channel expected next
  int                ref_frames_owed = 0;
  bit                in_frame = 0;
  logic [1:0]        ref_end_q = '0;
  int                owed_age = 0;      // cycles an owed frame has waited

  always @(posedge clk) begin
    if (rst_n) begin
      // New averages: a request before channel 0 of the owed frame has
      // gone out merges into that frame; one during a frame owes one more.
      for (int c = 0; c < NUM_CH; c++) if (avg_valid[c]) ref_fresh[c] = 1'b1;
      if (ref_end_q[1]) begin
        if (|ref_fresh) begin
          if (in_frame) overlap_requests++;
          ref_frames_owed = 1;
        end else begin
          empty_ends++;
        end
      end
      ref_end_q = {ref_end_q[0], period_end};
      // An owed frame must start once the frame in flight is out: at most
      // three words of up to 15 cycles each, plus a few cycles of latency.
      if (ref_frames_owed > 0 && !(load && ch == 0)) begin
        owed_age++;
        if (owed_age == 60) begin
          failures++;
          $display("FAIL: owed frame not started after %0d cycles", owed_age);
        end
      end else begin
        owed_age = 0;
      end
      if (load) begin
        checks += 4;
        if (!ready) begin
          failures++;
          $display("FAIL: load while serialiser busy");
        end
        if (int'(ch) != ref_next) begin
          failures++;
          $display("FAIL: channel %0d sent, want %0d", ch, ref_next);
        end
        if (word !== avg[ch] || first !== (ch == 0)) begin
          failures++;
          $display("FAIL: word %h first %b for ch%0d", word, first, ch);
        end
        if (fresh !== ref_fresh[ch]) begin
          failures++;
          $display("FAIL: fresh %b for ch%0d, want %b", fresh, ch, ref_fresh[ch]);
        end
        ref_fresh[ch] = 1'b0;
        if (ch == 0) begin
          in_frame = 1;
          if (ref_frames_owed == 0) begin
            failures++;
            $display("FAIL: frame nobody asked for");
          end else begin
            ref_frames_owed--;
          end
        end
        if (int'(ch) == int'(NUM_CH) - 1) begin
          in_frame = 0;
          frames++;
        end
        ref_next = (int'(ch) + 1) % int'(NUM_CH);
        busy_left <= $urandom_range(14, 1);
      end else if (busy_left > 0) begin
        busy_left <= busy_left - 1;
      end
    end
  end

  initial begin
    for (int c = 0; c < NUM_CH; c++) avg[c] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int e = 0; e < int'(EVENTS); e++) begin
      repeat ($urandom_range(25)) @(negedge clk);
      @(negedge clk);
      if ($urandom_range(1) == 0) begin
        for (int c = 0; c < NUM_CH; c++) begin
          avg_valid[c] = ($urandom_range(2) == 0);
          if (avg_valid[c]) avg[c] = sample_t'($urandom);
        end
      end else begin
        period_end = 1'b1;
      end
      @(negedge clk);
      avg_valid  = '0;
      period_end = 1'b0;
    end
    repeat (300) @(negedge clk);
    checks += 4;
    if (empty_ends == 0) begin
      failures++;
      $display("FAIL: no period end without a new average");
    end
    if (ref_frames_owed != 0 || in_frame) begin
      failures++;
      $display("FAIL: %0d frames never sent", ref_frames_owed);
    end
    if (frames < int'(EVENTS) / 5) begin
      failures++;
      $display("FAIL: only %0d frames", frames);
    end
    if (overlap_requests == 0) begin
      failures++;
      $display("FAIL: no request arrived during a frame");
    end
    $display("frames=%0d overlapping requests=%0d empty period ends=%0d",
             frames, overlap_requests, empty_ends);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (EVENTS * 30 + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
