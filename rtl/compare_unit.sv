// compare_unit: decides in which word time the stored word is written.
//
// Bitwise equality of the word counter w and the MA counter n, gated with T0
// and the write flag, sets the COMP flip-flop; T14 of the same word time
// clears it. COMP is therefore high from bit time 1 to bit time 14 of the one
// word time whose number equals the MA address, and only while a write is
// pending. comp_n is its complement. Structure as in the original unit.
module compare_unit
  import display_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst,
  input  logic [ADDR_BITS-1:0] w,
  input  logic [ADDR_BITS-1:0] n,
  input  logic                 t0,
  input  logic                 t14,
  input  logic                 write_flag,
  output logic                 comp,
  output logic                 comp_n
);

  logic match;

  always_comb match = &(w ~^ n);

  always_ff @(posedge clk) begin
    if (rst)                           comp <= 1'b0;
    else if (t14)                      comp <= 1'b0;
    else if (t0 && match && write_flag) comp <= 1'b1;
  end

  assign comp_n = ~comp;

endmodule
