// timing_decoder: decodes the bit count into the word-time pulses.
//
// During the T pulse of bit time n:
//   n = 0      -> t0      (compare strobe)
//   n = 1..12  -> t1_12   (one shift pulse per data bit)
//   n = 13     -> t13     (counter advance, DAC transfer)
//   n = 14     -> t14     (compare flip-flop clear; active low in the original)
// Bit times 15 and 0, 13, 14 carry the spacer bits of the serial memory.
// Combinational; each output is as wide as t (one clock cycle).
module timing_decoder
  import display_pkg::*;
(
  input  logic       t,
  input  logic [3:0] count,
  output timing_t    tp
);

  always_comb begin
    tp.t0    = t & (count == 4'd0);
    tp.t1_12 = t & (count >= 4'd1) & (count <= 4'd12);
    tp.t13   = t & (count == 4'd13);
    tp.t14   = t & (count == 4'd14);
  end

endmodule
