// ac_gating: transfer of the accumulator into the input shift register.
//
// The gated IOT2 (load) opens twelve gates and copies the AC into twelve
// holding flip-flops. After HOLD cycles (3 us at a 100 ns clock, as in the
// original unit, where a delay unit clears the flip-flops from the delayed
// IOT2) the holding register is cleared. While a bit is held at 1 it keeps
// the matching input-register stage set; `holding` is high for the whole
// interval. Interface: load is a one-cycle pulse; set_bits follows one cycle
// later and lasts HOLD cycles. Bit 0 is the least significant AC bit.
module ac_gating
  import display_pkg::*;
#(
  parameter int unsigned HOLD = 30,
  parameter int unsigned BITS = DATA_BITS
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            load,
  input  logic [BITS-1:0] ac,
  output logic [BITS-1:0] set_bits,
  output logic            holding
);

  localparam int unsigned CW = $clog2(HOLD + 1);
  logic [CW-1:0] remaining;

  always_ff @(posedge clk) begin
    if (rst) begin
      set_bits  <= '0;
      remaining <= '0;
      holding   <= 1'b0;
    end else if (load) begin
      set_bits  <= ac;
      remaining <= CW'(HOLD - 1);
      holding   <= 1'b1;
    end else if (remaining != '0) begin
      remaining <= remaining - 1'b1;
    end else begin
      set_bits  <= '0;
      holding   <= 1'b0;
    end
  end

endmodule
