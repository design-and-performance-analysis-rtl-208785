// tb_demultiplexer: self-checking test of the channel demultiplexer.
//
// Presents 300 random words with random channel indices, some cycles empty.
// One clock after each word, exactly the lane of its channel must strobe and
// carry it, and every other lane must keep its previous value.
module tb_demultiplexer;
  import integrator_pkg::*;

  localparam int unsigned N_WORDS = 300;

  logic              clk = 1'b0;
  logic              rst_n = 1'b0;
  sample_t           word = '0;
  ch_idx_t           ch = '0;
  logic              valid = 1'b0;
  sample_t           data [NUM_CH];
  logic [NUM_CH-1:0] lane_valid;

  int checks = 0, failures = 0;

  demultiplexer dut (
    .clk(clk), .rst_n(rst_n), .word_i(word), .ch_i(ch), .word_valid_i(valid),
    .data_o(data), .valid_o(lane_valid)
  );

  always #5 clk = ~clk;

  sample_t model [NUM_CH];

  initial begin
    logic [NUM_CH-1:0] exp_valid;
    for (int c = 0; c < NUM_CH; c++) model[c] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < N_WORDS; i++) begin
      @(negedge clk);
      valid = ($urandom_range(3) != 0);
      word  = sample_t'($urandom);
      ch    = ch_idx_t'($urandom_range(NUM_CH - 1));
      exp_valid = '0;
      if (valid) begin
        model[ch]     = word;
        exp_valid[ch] = 1'b1;
      end
      @(posedge clk);
      #1;
      checks++;
      if (lane_valid !== exp_valid) begin
        failures++;
        $display("FAIL: word %0d lane strobes %b, want %b", i, lane_valid, exp_valid);
      end
      for (int c = 0; c < NUM_CH; c++) begin
        checks++;
        if (data[c] !== model[c]) begin
          failures++;
          $display("FAIL: word %0d lane %0d = %h, want %h", i, c, data[c], model[c]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (N_WORDS * 2 + 100) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
