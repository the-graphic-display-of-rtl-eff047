// pulse_converter: widens a short command pulse into a longer one.
//
// In the original unit a 100 ns DEC pulse sets a flip-flop, a delay unit
// resets the same flip-flop from the delayed pulse, and a level converter
// passes the flip-flop output to the slower 3C logic. Here the flip-flop is
// level_out and the delay is a down-counter: pulse_in sets level_out on the
// next clock, and it clears WIDTH cycles later. A pulse arriving while the
// output is high restarts the count. The width (2.5 us, the 3C pulse width,
// at a 100 ns clock) is this design's choice; the voltage translation itself
// has no logic function and is not modelled.
module pulse_converter #(
  parameter int unsigned WIDTH = 25
) (
  input  logic clk,
  input  logic rst,
  input  logic pulse_in,
  output logic level_out
);

  localparam int unsigned CW = $clog2(WIDTH + 1);
  logic [CW-1:0] remaining;

  always_ff @(posedge clk) begin
    if (rst) begin
      remaining <= '0;
      level_out <= 1'b0;
    end else if (pulse_in) begin
      remaining <= CW'(WIDTH - 1);
      level_out <= 1'b1;
    end else if (remaining != '0) begin
      remaining <= remaining - 1'b1;
    end else begin
      level_out <= 1'b0;
    end
  end

endmodule
