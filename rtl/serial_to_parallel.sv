// serial_to_parallel: input deserialiser of the digital integrator.
//
// The ADC side sends, once per sampling period, a frame of NUM_CH words of
// SAMPLE_W bits, channel 1 first, each word MSB first, one bit per main-clock
// cycle. frame_sync is high for one cycle together with the first bit of a
// frame. The block shifts the bits into a SAMPLE_W-bit register and, after
// the last bit of each word, presents the word on word_o with its channel
// index on ch_o and a one-cycle word_valid_o strobe (one clock after that last
// bit). Bits that arrive after the last word of a frame and before the next
// frame_sync (the idle part of the 60-clock sampling period) are ignored. A
// frame_sync in the middle of a frame restarts reception at channel 1.
//
// The block's role (12-bit samples out of a serial stream) follows the
// radiometer design; the frame layout, the frame_sync strobe, MSB-first order
// and the idle gap are this design's own choices.
module serial_to_parallel
  import integrator_pkg::*;
#(
  parameter int unsigned W     = SAMPLE_W,
  parameter int unsigned CHANS = NUM_CH
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       sdata_i,
  input  logic                       frame_sync_i,
  output logic [W-1:0]               word_o,
  output logic [$clog2(CHANS)-1:0]   ch_o,
  output logic                       word_valid_o
);

  localparam int unsigned BIT_W = $clog2(W);
  localparam int unsigned CH_BW = $clog2(CHANS);

  logic [W-1:0]     shreg;
  logic [BIT_W-1:0] bit_cnt;
  logic [CH_BW-1:0] ch_cnt;
  logic             active;

  // Bit being received this cycle, counting a frame_sync as the start of a word.
  logic             take;
  logic [BIT_W-1:0] bit_now;
  logic [CH_BW-1:0] ch_now;
  logic [W-1:0]     shifted;

  always_comb begin
    take    = frame_sync_i || active;
    bit_now = frame_sync_i ? '0 : bit_cnt;
    ch_now  = frame_sync_i ? '0 : ch_cnt;
    shifted = {shreg[W-2:0], sdata_i};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg        <= '0;
      bit_cnt      <= '0;
      ch_cnt       <= '0;
      active       <= 1'b0;
      word_o       <= '0;
      ch_o         <= '0;
      word_valid_o <= 1'b0;
    end else begin
      word_valid_o <= 1'b0;
      if (take) begin
        shreg <= shifted;
        if (bit_now == BIT_W'(W - 1)) begin
          word_o       <= shifted;
          ch_o         <= ch_now;
          word_valid_o <= 1'b1;
          bit_cnt      <= '0;
          if (ch_now == CH_BW'(CHANS - 1)) begin
            ch_cnt <= '0;
            active <= 1'b0;
          end else begin
            ch_cnt <= ch_now + 1'b1;
            active <= 1'b1;
          end
        end else begin
          bit_cnt <= bit_now + 1'b1;
          ch_cnt  <= ch_now;
          active  <= 1'b1;
        end
      end
    end
  end

  // The channel index handed on is always a valid channel.
  a_ch_range: assert property (@(posedge clk) disable iff (!rst_n)
    word_valid_o |-> (ch_o < CH_BW'(CHANS)));

endmodule
