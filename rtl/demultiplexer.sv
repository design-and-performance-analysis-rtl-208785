// demultiplexer: routes each deserialised sample to the lane of its channel.
//
// A sample arrives on word_i with its channel index ch_i and a one-cycle
// word_valid_i strobe. One clock later it appears on data_o[ch_i] with a
// one-cycle valid_o[ch_i] strobe; the other lanes keep their last sample and
// see no strobe. Each lane therefore receives one sample per sampling period.
//
// The block follows the de-multiplexer of the integrator's block diagram (one
// 12-bit input, three 12-bit channel outputs); the register stage and the
// per-lane strobes are this design's own choices.
module demultiplexer
  import integrator_pkg::*;
#(
  parameter int unsigned W     = SAMPLE_W,
  parameter int unsigned CHANS = NUM_CH
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [W-1:0]             word_i,
  input  logic [$clog2(CHANS)-1:0] ch_i,
  input  logic                     word_valid_i,
  output logic [W-1:0]             data_o  [CHANS],
  output logic [CHANS-1:0]         valid_o
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < CHANS; c++) data_o[c] <= '0;
      valid_o <= '0;
    end else begin
      for (int c = 0; c < CHANS; c++) begin
        if (word_valid_i && (int'(ch_i) == c)) begin
          data_o[c]  <= word_i;
          valid_o[c] <= 1'b1;
        end else begin
          valid_o[c] <= 1'b0;
        end
      end
    end
  end

  a_one_lane: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0(valid_o));

endmodule
