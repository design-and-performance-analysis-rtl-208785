// digital_integrator: three-channel digital integrate-and-dump filter of a
// microwave radiometer.
//
// The 12-bit samples of three radiometer channels arrive on one serial line,
// one frame of three words per 16 kHz sampling period (60 cycles of the
// 960 kHz main clock; see serial_to_parallel for the frame). The chain is
//   serial_to_parallel -> demultiplexer -> per channel: accumulator -> averager
//   -> multiplexer -> parallel_to_serial.
// Each channel sums AVG_N consecutive samples (128, 32 and 16 by default,
// i.e. 8 ms, 2 ms and 1 ms of integration at 16 kHz), dumps the sum, and the
// averager keeps the top 12 bits of it (the mean, truncated). At the end of a
// sampling period in which any channel dumped, the three current averages go
// out on sdata_o as one frame of three 12-bit words, channel 1 first, MSB
// first, one bit per clock. Sideband outputs mark the bits: out_valid_o for every data bit, out_first_o for the
// first bit of a frame, out_ch_o for the channel of the current word and
// out_fresh_o when that word is a new average rather than a repeat. The
// averages themselves are also brought out on avg_o / avg_valid_o.
//
// Latency: the last bit of the AVG_N-th sample of a channel is followed four
// clocks later by avg_valid_o. An output frame starts six clocks after the
// last bit of the period's channel-3 sample, when the serialiser is idle; at
// the default sizes that is one frame every 16 sampling periods (1 ms, 960
// clocks).
//
// Block structure, sample width, averaging factors, accumulator widths and
// truncation follow the radiometer design. The serial frame formats, the
// frame_sync input, the sideband outputs and the frame schedule are this
// design's own choices.
module digital_integrator
  import integrator_pkg::*;
#(
  parameter int unsigned AVG_N1 = AVG_N_CH1,
  parameter int unsigned AVG_N2 = AVG_N_CH2,
  parameter int unsigned AVG_N3 = AVG_N_CH3
) (
  input  logic                clk,
  input  logic                rst_n,
  // serial sample input
  input  logic                sdata_i,
  input  logic                frame_sync_i,
  // serial averaged output
  output logic                sdata_o,
  output logic                out_valid_o,
  output logic                out_first_o,
  output logic [CH_W-1:0]     out_ch_o,
  output logic                out_fresh_o,
  // parallel view of the channel averages
  output logic [SAMPLE_W-1:0] avg_o       [NUM_CH],
  output logic [NUM_CH-1:0]   avg_valid_o
);

  localparam int unsigned AVG_N [NUM_CH] = '{AVG_N1, AVG_N2, AVG_N3};
  localparam int unsigned TAG_W = CH_W + 2;

  // Deserialiser to demultiplexer
  sample_t             s2p_word;
  ch_idx_t             s2p_ch;
  logic                s2p_valid;

  // Demultiplexer lanes
  sample_t             lane_data  [NUM_CH];
  logic [NUM_CH-1:0]   lane_valid;

  // Multiplexer to serialiser
  sample_t             mux_word;
  ch_idx_t             mux_ch;
  logic                mux_first, mux_fresh, mux_load, p2s_ready;
  logic [TAG_W-1:0]    p2s_tag;
  logic                p2s_first_bit;

  serial_to_parallel #(.W(SAMPLE_W), .CHANS(NUM_CH)) u_s2p (
    .clk          (clk),
    .rst_n        (rst_n),
    .sdata_i      (sdata_i),
    .frame_sync_i (frame_sync_i),
    .word_o       (s2p_word),
    .ch_o         (s2p_ch),
    .word_valid_o (s2p_valid)
  );

  demultiplexer #(.W(SAMPLE_W), .CHANS(NUM_CH)) u_demux (
    .clk          (clk),
    .rst_n        (rst_n),
    .word_i       (s2p_word),
    .ch_i         (s2p_ch),
    .word_valid_i (s2p_valid),
    .data_o       (lane_data),
    .valid_o      (lane_valid)
  );

  for (genvar c = 0; c < NUM_CH; c++) begin : g_ch
    localparam int unsigned N     = AVG_N[c];
    localparam int unsigned ACC_W = SAMPLE_W + $clog2(N);

    logic [ACC_W-1:0] acc_run;
    logic [ACC_W-1:0] acc_sum;
    logic             acc_dump;

    accumulator #(.W(SAMPLE_W), .AVG_N(N), .ACC_W(ACC_W)) u_acc (
      .clk      (clk),
      .rst_n    (rst_n),
      .sample_i (lane_data[c]),
      .valid_i  (lane_valid[c]),
      .acc_o    (acc_run),
      .sum_o    (acc_sum),
      .dump_o   (acc_dump)
    );

    averager #(.W(SAMPLE_W), .AVG_N(N), .ACC_W(ACC_W)) u_avg (
      .clk     (clk),
      .rst_n   (rst_n),
      .sum_i   (acc_sum),
      .dump_i  (acc_dump),
      .avg_o   (avg_o[c]),
      .valid_o (avg_valid_o[c])
    );
  end

  // The last lane's strobe ends a sampling period; accumulator and averager
  // add two clocks before that period's averages are all in.
  multiplexer #(.W(SAMPLE_W), .CHANS(NUM_CH), .END_DELAY(2)) u_mux (
    .clk          (clk),
    .rst_n        (rst_n),
    .avg_i        (avg_o),
    .avg_valid_i  (avg_valid_o),
    .period_end_i (lane_valid[NUM_CH-1]),
    .ready_i     (p2s_ready),
    .word_o      (mux_word),
    .ch_o        (mux_ch),
    .first_o     (mux_first),
    .fresh_o     (mux_fresh),
    .load_o      (mux_load)
  );

  parallel_to_serial #(.W(SAMPLE_W), .TAG_W(TAG_W)) u_p2s (
    .clk         (clk),
    .rst_n       (rst_n),
    .word_i      (mux_word),
    .tag_i       ({mux_first, mux_fresh, mux_ch}),
    .load_i      (mux_load),
    .ready_o     (p2s_ready),
    .sdata_o     (sdata_o),
    .bit_valid_o (out_valid_o),
    .first_bit_o (p2s_first_bit),
    .tag_o       (p2s_tag)
  );

  always_comb begin
    out_first_o = p2s_first_bit && p2s_tag[TAG_W-1];
    out_fresh_o = out_valid_o && p2s_tag[TAG_W-2];
    out_ch_o    = p2s_tag[CH_W-1:0];
  end

endmodule
