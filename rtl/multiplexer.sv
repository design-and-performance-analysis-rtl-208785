// multiplexer: output multiplexer and sequencer of the digital integrator.
//
// The samples of the three channels arrive one after another within each
// sampling period, so their averages (avg_valid_i) arrive a few clocks apart.
// period_end_i marks that the last channel's sample of a period has left the
// demultiplexer; END_DELAY clocks later (the latency of accumulator plus
// averager) every average of that period is in. If any channel has then
// produced a new average, the block sends one output frame: the current
// averages of channels 1, 2 and 3, in that order, handed one at a time to the
// output serialiser. Each word is offered on word_o with a one-cycle load_o
// strobe in a cycle where the serialiser reports ready_i; alongside it go the
// channel index (ch_o), first_o (the word opens a frame) and fresh_o (this
// channel has produced a new average since its word was last sent). A
// request that arrives while a frame is being sent is remembered and sends
// one more frame afterwards; an average that arrives before the channel-1
// word of a scheduled frame has gone out is sent in that frame.
// With the default averaging factors a frame leaves every 16 sampling
// periods (1 ms), and channel 1 carries a fresh average in every eighth frame
// and channel 2 in every fourth.
//
// A 3-to-1 multiplexer of 12-bit truncated averages feeding the serialiser is
// the radiometer design's; when frames are sent, their order and the fresh
// flag are this design's own choices.
module multiplexer
  import integrator_pkg::*;
#(
  parameter int unsigned W     = SAMPLE_W,
  parameter int unsigned CHANS     = NUM_CH,
  parameter int unsigned END_DELAY = 2
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [W-1:0]             avg_i       [CHANS],
  input  logic [CHANS-1:0]         avg_valid_i,
  input  logic                     period_end_i,
  input  logic                     ready_i,
  output logic [W-1:0]             word_o,
  output logic [$clog2(CHANS)-1:0] ch_o,
  output logic                     first_o,
  output logic                     fresh_o,
  output logic                     load_o
);

  localparam int unsigned CH_BW = $clog2(CHANS);

  typedef enum logic [0:0] {IDLE, SEND} state_t;

  state_t           state;
  logic [CH_BW-1:0] sel;
  logic             pending;
  logic [CHANS-1:0] fresh;
  logic [CHANS-1:0] fresh_now;   // fresh, counting an average arriving now
  logic [END_DELAY-1:0] end_q;   // period_end_i delayed by 1..END_DELAY clocks
  logic             request;     // a frame is due now

  always_comb begin
    fresh_now = fresh | avg_valid_i;
    word_o    = avg_i[sel];
    ch_o      = sel;
    first_o   = (sel == '0);
    fresh_o   = fresh_now[sel];
    load_o    = (state == SEND) && ready_i;
    request   = end_q[END_DELAY-1] && (|fresh_now);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      end_q <= '0;
    end else begin
      end_q[0] <= period_end_i;
      for (int d = 1; d < END_DELAY; d++) end_q[d] <= end_q[d-1];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= IDLE;
      sel     <= '0;
      pending <= 1'b0;
      fresh   <= '0;
    end else begin
      // Fresh flags: set by a new average, cleared when that channel's word
      // is handed on.
      for (int c = 0; c < CHANS; c++)
        fresh[c] <= fresh_now[c] && !(load_o && (int'(sel) == c));

      unique case (state)
        IDLE: begin
          if (pending || request) begin
            state   <= SEND;
            sel     <= '0;
            pending <= 1'b0;
          end
        end
        SEND: begin
          // Until channel 1 has gone out, the frame still picks up the new
          // averages; afterwards one more frame is needed.
          if (request && (sel != '0)) pending <= 1'b1;
          if (load_o) begin
            if (sel == CH_BW'(CHANS - 1)) begin
              state <= IDLE;
              sel   <= '0;
            end else begin
              sel <= sel + 1'b1;
            end
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  initial begin
    assert (END_DELAY >= 1) else $error("multiplexer: END_DELAY must be at least 1");
  end

  a_sel_range: assert property (@(posedge clk) disable iff (!rst_n)
    sel < CH_BW'(CHANS));

endmodule
