// tb_parallel_to_serial: self-checking test of the output serialiser.
//
// Loads 200 random words with random tags, sometimes back to back (load held
// high so each word is taken on the last-bit cycle of the one before) and
// sometimes with idle gaps. A receiver model rebuilds every word from
// sdata_o while bit_valid_o is high, MSB first, and checks it, its tag, the
// first-bit marker, that the first bit leaves one clock after the load, and
// that a back-to-back word follows with no idle cycle.
module tb_parallel_to_serial;
  import integrator_pkg::*;

  localparam int unsigned TAG_W = 4;
  localparam int unsigned WORDS = 200;

  logic             clk = 1'b0;
  logic             rst_n = 1'b0;
  sample_t          word = '0;
  logic [TAG_W-1:0] tag = '0;
  logic             load = 1'b0;
  logic             ready, sdata, bit_valid, first_bit;
  logic [TAG_W-1:0] tag_out;

  int checks = 0, failures = 0;
  int cycle = 0;
  int back_to_back = 0;

  parallel_to_serial #(.TAG_W(TAG_W)) dut (
    .clk(clk), .rst_n(rst_n), .word_i(word), .tag_i(tag), .load_i(load),
    .ready_o(ready), .sdata_o(sdata), .bit_valid_o(bit_valid),
    .first_bit_o(first_bit), .tag_o(tag_out)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  sample_t          exp_word[$];
  logic [TAG_W-1:0] exp_tag[$];
  int               exp_start[$];

  // Receiver model, looking at the outputs just before each rising edge.
  sample_t rx;
  int      nbits = 0;
  int      last_end = -10;
  always @(negedge clk) begin
    if (rst_n && bit_valid) begin
      if (nbits == 0) begin
        checks += 3;
        if (first_bit !== 1'b1) begin
          failures++;
          $display("FAIL: first bit not marked at cycle %0d", cycle);
        end
        if (exp_start.size() == 0 || exp_start[0] != cycle) begin
          failures++;
          $display("FAIL: word starts at cycle %0d", cycle);
        end
        if (exp_tag.size() == 0 || tag_out !== exp_tag[0]) begin
          failures++;
          $display("FAIL: tag %h", tag_out);
        end
        if (last_end == cycle - 1) back_to_back++;
      end else if (first_bit !== 1'b0) begin
        failures++;
        $display("FAIL: first-bit marker on bit %0d", nbits);
      end
      rx = {rx[SAMPLE_W-2:0], sdata};
      nbits++;
      if (nbits == int'(SAMPLE_W)) begin
        checks++;
        if (exp_word.size() == 0 || rx !== exp_word[0]) begin
          failures++;
          $display("FAIL: received %h", rx);
        end
        if (exp_word.size() != 0) begin
          void'(exp_word.pop_front());
          void'(exp_tag.pop_front());
          void'(exp_start.pop_front());
        end
        nbits    = 0;
        last_end = cycle;
      end
    end else if (rst_n) begin
      if (nbits != 0) begin
        failures++;
        $display("FAIL: word broken off after %0d bits", nbits);
        nbits = 0;
      end
      if (sdata !== 1'b0) begin
        failures++;
        $display("FAIL: line not low while idle");
      end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < int'(WORDS); i++) begin
      // Offer the word; it is taken at the first rising edge with ready high.
      @(negedge clk);
      word = sample_t'($urandom);
      tag  = TAG_W'($urandom);
      load = 1'b1;
      do @(posedge clk); while (!ready);
      #1;
      // cycle now counts the accepting edge; the first bit is on the line
      // in the clock period that follows it.
      exp_word.push_back(word);
      exp_tag.push_back(tag);
      exp_start.push_back(cycle);
      load = 1'b0;
      if ($urandom_range(1) == 0) repeat ($urandom_range(20)) @(negedge clk);
    end
    repeat (SAMPLE_W + 5) @(negedge clk);
    checks += 2;
    if (exp_word.size() != 0) begin
      failures++;
      $display("FAIL: %0d words never sent", exp_word.size());
    end
    if (back_to_back == 0) begin
      failures++;
      $display("FAIL: no back-to-back words");
    end
    $display("back-to-back words=%0d", back_to_back);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WORDS * 40 + 200) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
