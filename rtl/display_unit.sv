// display_unit: memory-display peripheral for a PDP-8/S.
//
// A program hands the unit up to 61 twelve-bit words, one per IOT sequence.
// Each word is parked in the input shift register and then written, least
// significant bit first, into a 976-bit recirculating serial memory during
// the word time whose number (word counter) equals the memory address (MA
// counter). The memory is read continuously: every word time the word at its
// output is shifted into the output register, and at T13 its 8 low bits go to
// the D-to-A converter. The converter voltage drives the oscilloscope's
// vertical input, while the word counter gives the horizontal position, so the
// 61 words appear as 61 dots, refreshed every 4880 us.
//
// Interface: mb_sel/iop1/iop2/iop4 are the processor's select code and IOP
// pulses (one system clock wide), ac its accumulator, skip the pulse to its
// skip bus. dac_code and v_vertical go to the display, word_count and
// sweep_sync give the horizontal position and the start of each sweep;
// bit_time is the bit position within the current word time.
// Timing: one bit time = CLK_DIV clock cycles (5 us at the default 100 ns
// clock), one word time = 16 bit times, a store completes within one
// recirculation (61 word times) after the write flag is set.
//
// The block structure, counts and pulse timing are the original unit's. The
// single synchronous clock, the reset, the pulse widths STRETCH and the
// holding register in front of the converter are this design's choices.
module display_unit
  import display_pkg::*;
#(
  parameter int unsigned CLK_DIV     = 50,
  parameter int unsigned WORDS       = N_WORDS,
  parameter logic [5:0]  CODE        = DEVICE_CODE,
  parameter int unsigned STRETCH     = 25,
  parameter int unsigned AC_HOLD     = 30
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [5:0]           mb_sel,
  input  logic                 iop1,
  input  logic                 iop2,
  input  logic                 iop4,
  input  logic [DATA_BITS-1:0] ac,
  output logic                 skip,
  output logic [N_DAC_BITS-1:0] dac_code,
  output real                  v_vertical,
  output logic [ADDR_BITS-1:0] word_count,
  output logic                 sweep_sync,
  output logic                 write_flag,
  output logic                 comp,
  output logic [3:0]           bit_time
);

  logic iot1, iot2, iot4;
  logic ma_clear, load_sr, write_done;
  logic [DATA_BITS-1:0] set_bits, osr_q;
  logic ac_holding;
  logic t, enter, dl_out, comp_n;
  logic [ADDR_BITS-1:0] ma;
  timing_t tp;

  device_selector #(.CODE(CODE)) u_ds (
    .mb_sel, .iop1, .iop2, .iop4, .iot1, .iot2, .iot4
  );

  iot_control #(.STRETCH(STRETCH)) u_ctl (
    .clk, .rst, .iot1, .iot2, .iot4, .write_done,
    .ma_clear, .load_sr, .write_flag, .skip
  );

  ac_gating #(.HOLD(AC_HOLD)) u_acg (
    .clk, .rst, .load(load_sr), .ac, .set_bits, .holding(ac_holding)
  );

  timing_unit #(.CLK_DIV(CLK_DIV)) u_tim (
    .clk, .rst, .t, .tp, .bit_count(bit_time)
  );

  word_counter #(.WORDS(WORDS)) u_wc (
    .clk, .rst, .t13(tp.t13), .count(word_count), .wrap(sweep_sync)
  );

  assign write_done = tp.t13 & comp;

  ma_counter u_ma (
    .clk, .rst, .clear(ma_clear), .advance(write_done), .count(ma)
  );

  compare_unit u_cmp (
    .clk, .rst, .w(word_count), .n(ma), .t0(tp.t0), .t14(tp.t14),
    .write_flag, .comp, .comp_n
  );

  input_shift_register u_isr (
    .clk, .rst, .set_bits, .shift(tp.t1_12 & comp), .enter, .q()
  );

  delay_line_store #(.BITS(WORDS * WORD_TIME)) u_dl (
    .clk, .rst, .t, .comp, .comp_n, .enter, .dout(dl_out)
  );

  output_shift_register u_osr (
    .clk, .rst, .din(dl_out), .shift(tp.t1_12), .q(osr_q)
  );

  dac_gating u_dg (
    .clk, .rst, .t13(tp.t13), .word(osr_q), .code(dac_code)
  );

  d_to_a_converter #(.BITS(N_DAC_BITS)) u_dac (
    .code(dac_code), .vout(v_vertical)
  );

  // The AC hold (3 us) must be over before the first shift of the store,
  // which comes at least one bit time after the write flag is set.
  a_no_shift_while_loading: assert property (
    @(posedge clk) disable iff (rst) !(tp.t1_12 && comp && ac_holding));

  // COMP only rises at T0 with the write flag on.
  a_comp_rise: assert property (
    @(posedge clk) disable iff (rst) $rose(comp) |-> $past(tp.t0 && write_flag));

endmodule
