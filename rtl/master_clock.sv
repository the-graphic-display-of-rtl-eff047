// master_clock: the 200 kHz bit clock of the unit.
//
// The original unit has a free-running 200 kHz oscillator producing the
// pulse train T, one pulse per 5 us bit time. Here T is derived from the
// system clock: a counter divides by CLK_DIV and t is high for one cycle in
// every CLK_DIV. With the default 100 ns system clock, CLK_DIV = 50 gives the
// original 5 us bit time. The divider is this design's own; the rate is the
// original's.
module master_clock #(
  parameter int unsigned CLK_DIV = 50
) (
  input  logic clk,
  input  logic rst,
  output logic t
);

  localparam int unsigned CW = (CLK_DIV > 1) ? $clog2(CLK_DIV) : 1;
  logic [CW-1:0] div;

  always_ff @(posedge clk) begin
    if (rst) begin
      div <= '0;
    end else if (div == CW'(CLK_DIV - 1)) begin
      div <= '0;
    end else begin
      div <= div + 1'b1;
    end
  end

  assign t = (div == CW'(CLK_DIV - 1));

endmodule
