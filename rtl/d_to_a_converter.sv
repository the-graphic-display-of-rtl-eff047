// d_to_a_converter: behavioural model of the 8-bit D-to-A converter.
//
// Behavioural model, not synthesizable logic: the real part is analogue
// (three A601 converter modules with a -10 V reference). All ones give 0 V,
// all zeros give VREF (-10 V), linear in between:
//   vout = VREF * (2^BITS - 1 - code) / (2^BITS - 1)
// so one step is about 0.04 V. The end points are the original unit's; the
// exact step size (1/255 rather than 1/256 of the range) is this model's.
// Combinational, no delay.
module d_to_a_converter #(
  parameter int unsigned BITS = 8,
  parameter real         VREF = -10.0
) (
  input  logic [BITS-1:0] code,
  output real             vout
);

  localparam real FULL = real'((2 ** BITS) - 1);

  always_comb vout = VREF * (FULL - real'(code)) / FULL;

endmodule
