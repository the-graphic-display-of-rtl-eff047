// dac_gating: transfer of the read word to the D-to-A converter.
//
// At T13, just after the twelfth shift, the DAC_BITS least significant bits
// of the output shift register are copied into a holding register whose
// outputs drive the converter inputs for the next word time. The T13 transfer
// and the choice of the 8 low bits follow the original unit; the holding
// register is this design's way of keeping the converter input steady.
// The upper word bits are not displayed, so word[11:8] is unused by design.
module dac_gating
  import display_pkg::*;
#(
  parameter int unsigned DAC_BITS = N_DAC_BITS
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 t13,
  input  logic [DATA_BITS-1:0] word,
  output logic [DAC_BITS-1:0]  code
);

  always_ff @(posedge clk) begin
    if (rst)      code <= '0;
    else if (t13) code <= word[DAC_BITS-1:0];
  end

endmodule
