// averager: turns a dumped channel sum into a SAMPLE_W-bit average.
//
// AVG_N must be a power of two, so dividing by it is a right shift: the
// average is the top W bits of the ACC_W-bit sum, i.e. the sum with its
// log2(AVG_N) least significant bits discarded (7 bits for the 128 samples of
// channel 1). The result is truncated, not rounded. avg_o is registered on
// dump_i and holds until the next dump; valid_o pulses for one clock with it,
// one clock after dump_i.
//
// Truncation by discarding the low bits follows the radiometer design; the
// register stage and the strobe are this design's own choices.
module averager
  import integrator_pkg::*;
#(
  parameter int unsigned W     = SAMPLE_W,
  parameter int unsigned AVG_N = AVG_N_CH1,
  parameter int unsigned ACC_W = W + $clog2(AVG_N)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [ACC_W-1:0] sum_i,
  input  logic             dump_i,
  output logic [W-1:0]     avg_o,
  output logic             valid_o
);

  localparam int unsigned SHIFT = $clog2(AVG_N);

  logic [ACC_W-1:0] shifted;
  assign shifted = sum_i >> SHIFT;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      avg_o   <= '0;
      valid_o <= 1'b0;
    end else begin
      valid_o <= dump_i;
      if (dump_i) avg_o <= shifted[W-1:0];
    end
  end

  initial begin
    assert ((1 << SHIFT) == AVG_N)
      else $error("averager: AVG_N must be a power of two");
    assert (ACC_W == W + SHIFT)
      else $error("averager: ACC_W must be W + log2(AVG_N)");
  end

endmodule
