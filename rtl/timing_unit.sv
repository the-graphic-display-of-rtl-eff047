// timing_unit: word-time sequencer.
//
// Master clock, four-stage bit counter and decoders, connected as in the
// original unit: every word time is 16 T pulses, and the pulses T0, T1..T12,
// T13 and T14 mark the compare strobe, the twelve data-bit shifts, the
// counter advance and the compare clear. bit_count is the bit time of the
// current T pulse. The bit period is CLK_DIV system clock cycles.
module timing_unit
  import display_pkg::*;
#(
  parameter int unsigned CLK_DIV = 50
) (
  input  logic       clk,
  input  logic       rst,
  output logic       t,
  output timing_t    tp,
  output logic [3:0] bit_count
);

  master_clock #(.CLK_DIV(CLK_DIV)) u_clock (.clk, .rst, .t);
  bit_counter  #(.STAGES(4))        u_count (.clk, .rst, .t, .count(bit_count));
  timing_decoder                    u_dec   (.t, .count(bit_count), .tp);

endmodule
