// bit_counter: four-stage counter of the bit times within a word time.
//
// Counts the T pulses from 0 to 15 and wraps, so that count names the bit
// position (0..15) of the 16-bit word time that the current T pulse belongs
// to. It advances on the clock edge at which t is high. Four binary stages,
// as in the original unit.
module bit_counter #(
  parameter int unsigned STAGES = 4
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              t,
  output logic [STAGES-1:0] count
);

  always_ff @(posedge clk) begin
    if (rst)    count <= '0;
    else if (t) count <= count + 1'b1;
  end

endmodule
