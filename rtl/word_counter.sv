// word_counter: number of the word now passing the serial memory output.
//
// Six stages counting the T13 pulses from 0 to WORDS-1 (60) and wrapping to 0,
// so that it stays locked to the 61-word recirculation. wrap is a one-cycle
// pulse on the T13 that returns the count to 0; it is the start of a new
// display sweep. Count range and six stages follow the original unit.
module word_counter
  import display_pkg::*;
#(
  parameter int unsigned WORDS = N_WORDS
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 t13,
  output logic [ADDR_BITS-1:0] count,
  output logic                 wrap
);

  assign wrap = t13 & (count == ADDR_BITS'(WORDS - 1));

  always_ff @(posedge clk) begin
    if (rst)       count <= '0;
    else if (wrap) count <= '0;
    else if (t13)  count <= count + 1'b1;
  end

endmodule
