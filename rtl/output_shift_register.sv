// output_shift_register: serial-in, parallel-out register from the memory.
//
// On every shift pulse (T1..T12 of every word time) the delay-line output
// bit enters at the top and the word moves one place toward bit 0. As the
// line delivers the least significant bit first, after the twelfth shift q
// holds the word just read with its least significant bit in q[0]. Twelve
// stages and right shifting follow the original unit.
module output_shift_register
  import display_pkg::*;
#(
  parameter int unsigned BITS = DATA_BITS
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            din,
  input  logic            shift,
  output logic [BITS-1:0] q
);

  always_ff @(posedge clk) begin
    if (rst)        q <= '0;
    else if (shift) q <= {din, q[BITS-1:1]};
  end

endmodule
