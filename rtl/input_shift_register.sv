// input_shift_register: parallel-in, serial-out register toward the memory.
//
// Each 1 on set_bits sets the matching stage (the stages are only ever set
// from the AC side, never cleared). Each shift pulse moves the word one place
// toward bit 0 and brings a 0 in at the top, so twelve shifts send the word
// out least significant bit first and leave the register empty. enter is
// bit 0, the serial output to the delay line entry gate. A shift takes
// priority over the set inputs. Twelve stages and right shifting follow the
// original unit.
module input_shift_register
  import display_pkg::*;
#(
  parameter int unsigned BITS = DATA_BITS
) (
  input  logic            clk,
  input  logic            rst,
  input  logic [BITS-1:0] set_bits,
  input  logic            shift,
  output logic            enter,
  output logic [BITS-1:0] q
);

  always_ff @(posedge clk) begin
    if (rst)        q <= '0;
    else if (shift) q <= {1'b0, q[BITS-1:1]};
    else            q <= q | set_bits;
  end

  assign enter = q[0];

endmodule
