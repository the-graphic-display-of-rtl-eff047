// delay_line_store: 976-bit recirculating serial memory.
//
// The original store is a magnetostrictive delay line of 4880 us, 976 bit
// times at 5 us, holding 61 words of 16 bits. Here it is a BITS-stage shift
// register advanced once per T pulse; the last stage plays the line's output
// flip-flop (dout). The entry gating is the original's AND-OR: comp AND enter
// OR comp_n AND dout, so while comp is high the bit on enter goes into the
// line and otherwise the output bit is written back. comp_n must be the
// complement of comp. A bit written on a T pulse is at
// dout during the T pulse exactly BITS pulses later, so every position keeps
// a fixed place relative to the word and bit counters.
module delay_line_store
  import display_pkg::*;
#(
  parameter int unsigned BITS = LINE_BITS
) (
  input  logic clk,
  input  logic rst,
  input  logic t,
  input  logic comp,
  input  logic comp_n,
  input  logic enter,
  output logic dout
);

  logic [BITS-1:0] line;
  logic            din;

  always_comb din = (comp & enter) | (comp_n & dout);

  always_ff @(posedge clk) begin
    if (rst)    line <= '0;
    else if (t) line <= {line[BITS-2:0], din};
  end

  assign dout = line[BITS-1];

endmodule
