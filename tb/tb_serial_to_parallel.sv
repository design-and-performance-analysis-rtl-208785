// tb_serial_to_parallel: self-checking test of the input deserialiser.
//
// Sends 40 frames of three random 12-bit words in 60-clock sampling periods,
// with random bits in the idle gap, plus one frame broken off after its first
// word by an early frame_sync. Every word must come out once with the right channel index,
// exactly one clock after its last bit; nothing may come out of the gap.
module tb_serial_to_parallel;
  import integrator_pkg::*;

  localparam int unsigned FRAMES = 40;

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic          sdata = 1'b0;
  logic          sync = 1'b0;
  sample_t       word;
  ch_idx_t       ch;
  logic          word_valid;

  int checks = 0, failures = 0;
  int cycle = 0;

  serial_to_parallel dut (
    .clk(clk), .rst_n(rst_n), .sdata_i(sdata), .frame_sync_i(sync),
    .word_o(word), .ch_o(ch), .word_valid_o(word_valid)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  // Expected words, queued when their last bit is driven.
  sample_t exp_word[$];
  ch_idx_t exp_ch[$];
  int      exp_cyc[$];

  always @(posedge clk) begin
    if (rst_n && word_valid) begin
      checks++;
      if (exp_word.size() == 0) begin
        failures++;
        $display("FAIL: unexpected word %h at cycle %0d", word, cycle);
      end else begin
        sample_t w;
        ch_idx_t c;
        int      k;
        w = exp_word.pop_front();
        c = exp_ch.pop_front();
        k = exp_cyc.pop_front();
        if (w !== word || c !== ch || k + 1 != cycle) begin
          failures++;
          $display("FAIL: got %h ch%0d at %0d, want %h ch%0d at %0d",
                   word, ch, cycle, w, c, k + 1);
        end
      end
    end
  end

  // Drive one bit in the low phase of the clock; cycle counts the rising
  // edge at which the bit is taken.
  task automatic drive_bit(input logic b, input logic s);
    @(negedge clk);
    sdata = b;
    sync  = s;
  endtask

  task automatic send_frame(input int nwords);
    sample_t w;
    for (int c = 0; c < nwords; c++) begin
      w = sample_t'($urandom);
      for (int b = SAMPLE_W - 1; b >= 0; b--) begin
        drive_bit(w[b], (c == 0) && (b == SAMPLE_W - 1));
        if (b == 0) begin
          exp_word.push_back(w);
          exp_ch.push_back(ch_idx_t'(c));
          exp_cyc.push_back(cycle);
        end
      end
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // A broken frame: one word only, then a new frame starts at once.
    send_frame(1);
    for (int b = 0; b < 5; b++) drive_bit(1'($urandom), 1'b0);
    for (int f = 0; f < FRAMES; f++) begin
      send_frame(NUM_CH);
      for (int g = 0; g < int'(FRAME_CLKS) - int'(NUM_CH * SAMPLE_W); g++)
        drive_bit(1'($urandom), 1'b0);
    end
    repeat (5) @(negedge clk);
    checks++;
    if (exp_word.size() != 0) begin
      failures++;
      $display("FAIL: %0d words never came out", exp_word.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (FRAMES * FRAME_CLKS + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
