// ma_counter: memory address counter (word slot for the next store).
//
// Six binary stages. clear (a level, from the first instruction's widened
// IOT2) forces it to 0; advance (T13 while COMP, i.e. after a word has been
// written) adds one. clear wins. Addresses above the last word never match
// the word counter, so a store at such an address never completes.
module ma_counter
  import display_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 clear,
  input  logic                 advance,
  output logic [ADDR_BITS-1:0] count
);

  always_ff @(posedge clk) begin
    if (rst || clear) count <= '0;
    else if (advance) count <= count + 1'b1;
  end

endmodule
