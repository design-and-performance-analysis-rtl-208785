// parallel_to_serial: output serialiser of the digital integrator.
//
// A W-bit word is taken on a load_i strobe and sent MSB first on sdata_o, one
// bit per main-clock cycle, during the W cycles after the load; bit_valid_o
// is high during those cycles and first_bit_o marks the MSB. A TAG_W-bit
// sideband (tag_i, here the channel index and flags of the word) is captured
// with the word and held on tag_o while it is being sent. ready_o is high when
// the block is idle and also in the cycle of the last bit, so words loaded on
// every ready_o cycle leave back to back with no gap. load_i works as a
// valid signal: a word offered while ready_o is low is ignored, so the sender
// may hold it until ready_o rises. sdata_o is low while idle.
//
// The serialiser of the 12-bit multiplexed data follows the radiometer
// design; bit order, timing, the tag and the ready handshake are this
// design's own choices.
module parallel_to_serial
  import integrator_pkg::*;
#(
  parameter int unsigned W     = SAMPLE_W,
  parameter int unsigned TAG_W = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [W-1:0]     word_i,
  input  logic [TAG_W-1:0] tag_i,
  input  logic             load_i,
  output logic             ready_o,
  output logic             sdata_o,
  output logic             bit_valid_o,
  output logic             first_bit_o,
  output logic [TAG_W-1:0] tag_o
);

  localparam int unsigned CNT_W = $clog2(W + 1);

  logic [W-1:0]     shreg;
  logic [CNT_W-1:0] left;     // bits still to send, including the current one

  always_comb begin
    bit_valid_o = (left != '0);
    ready_o     = (left == '0) || (left == CNT_W'(1));
    sdata_o     = bit_valid_o && shreg[W-1];
    first_bit_o = (left == CNT_W'(W));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg <= '0;
      left  <= '0;
      tag_o <= '0;
    end else if (load_i && ready_o) begin
      shreg <= word_i;
      left  <= CNT_W'(W);
      tag_o <= tag_i;
    end else if (left != '0) begin
      shreg <= {shreg[W-2:0], 1'b0};
      left  <= left - 1'b1;
    end
  end

  // A word offered while ready_o is low is not taken; the bit count never
  // exceeds the word length.
  a_count_range: assert property (@(posedge clk) disable iff (!rst_n)
    left <= CNT_W'(W));

endmodule
