// accumulator: sum-and-dump of one radiometer channel.
//
// An ACC_W-bit buffer, cleared at reset, adds every incoming sample
// (valid_i strobe) to its previous contents. On the AVG_N-th sample the
// complete sum (buffer plus that sample) is copied to sum_o, dump_o pulses
// for one clock, and the buffer restarts from zero, so the next integration
// period loses no sample and needs no extra clearing cycle. sum_o and dump_o
// follow the AVG_N-th sample by one clock; sum_o holds until the next dump.
// ACC_W = W + log2(AVG_N) bits are enough for AVG_N full-scale unsigned
// samples, so the sum never overflows: 19 bits for the 128 samples of
// channel 1, 17 bits for 32 and 16 bits for 16.
//
// The adder, the buffer that is cleared and then fed back, the sample count
// and the 19-bit width for 128 samples follow the radiometer design. Unsigned
// samples and the zero-latency restart of the buffer are this design's own
// choices.
module accumulator
  import integrator_pkg::*;
#(
  parameter int unsigned W     = SAMPLE_W,
  parameter int unsigned AVG_N = AVG_N_CH1,
  parameter int unsigned ACC_W = W + $clog2(AVG_N)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [W-1:0]     sample_i,
  input  logic             valid_i,
  output logic [ACC_W-1:0] acc_o,    // running buffer contents
  output logic [ACC_W-1:0] sum_o,    // sum of the last AVG_N samples
  output logic             dump_o
);

  localparam int unsigned CNT_W = (AVG_N > 1) ? $clog2(AVG_N) : 1;

  logic [CNT_W-1:0] cnt;
  logic [ACC_W-1:0] next_sum;

  assign next_sum = acc_o + ACC_W'(sample_i);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_o  <= '0;
      sum_o  <= '0;
      dump_o <= 1'b0;
      cnt    <= '0;
    end else begin
      dump_o <= 1'b0;
      if (valid_i) begin
        if (cnt == CNT_W'(AVG_N - 1)) begin
          sum_o  <= next_sum;
          dump_o <= 1'b1;
          acc_o  <= '0;
          cnt    <= '0;
        end else begin
          acc_o <= next_sum;
          cnt   <= cnt + 1'b1;
        end
      end
    end
  end

  initial begin
    assert (ACC_W >= W + $clog2(AVG_N))
      else $error("accumulator: ACC_W too small for AVG_N samples");
  end

endmodule
