// iot_control: command decoding for the three display instructions.
//
// The driving program uses three IOT instructions of device 44:
//   6447  IOT1, IOT2, IOT4 - initialise: clear the MA counter, arm the unit
//   6446  IOT2, IOT4       - load the AC into the input register, set write flag
//   6442  IOT2             - skip when the word has been written
// Flip-flops, after the original circuit:
//   FF1  reset by IOT1, set by IOT4. While reset, IOT2 belongs to the first
//        instruction and clears the MA counter (through FF3, a widened pulse).
//   FF2  "ready for a word": set by IOT4 and by the skip pulse, reset by IOT1
//        and while the write flag is on.
//   FF4  set by IOT4 of the second instruction (FF1 and FF2 set); its widened
//        pulse sets the write flag on its rising edge.
//   write flag  set as above, cleared by write_done (T13 while COMP), i.e.
//        when the word has been written into the serial memory.
// load_sr = IOT2 with FF1, FF2 set and the write flag off (second instruction).
// skip    = IOT2 with FF1 set, FF2 reset and the write flag off (third
//           instruction, after the word was stored); it sets FF2 again.
// The flip-flop names and their IOT1/IOT4 behaviour follow the original
// description; how FF2, the skip gate and the load gate combine is this
// design's reading of the schematic. Outputs load_sr and skip are
// combinational pulses of the IOT2 width; ma_clear is STRETCH cycles long.
module iot_control #(
  parameter int unsigned STRETCH = 25
) (
  input  logic clk,
  input  logic rst,
  input  logic iot1,
  input  logic iot2,
  input  logic iot4,
  input  logic write_done,
  output logic ma_clear,
  output logic load_sr,
  output logic write_flag,
  output logic skip
);

  logic ff1, ff2;
  logic clr_pulse, ff4_pulse;
  logic ff4_level, ff4_level_q;

  always_comb begin
    clr_pulse = iot2 & ~ff1;
    ff4_pulse = iot4 & ff1 & ff2;
    load_sr   = iot2 & ff1 & ff2 & ~write_flag;
    skip      = iot2 & ff1 & ~ff2 & ~write_flag;
  end

  // FF3 + delay + converter 1
  pulse_converter #(.WIDTH(STRETCH)) u_ff3 (
    .clk, .rst, .pulse_in(clr_pulse), .level_out(ma_clear)
  );

  // FF4 + delay + converter 2
  pulse_converter #(.WIDTH(STRETCH)) u_ff4 (
    .clk, .rst, .pulse_in(ff4_pulse), .level_out(ff4_level)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      ff1         <= 1'b1;
      ff2         <= 1'b0;
      ff4_level_q <= 1'b0;
      write_flag  <= 1'b0;
    end else begin
      ff4_level_q <= ff4_level;

      if (iot1)      ff1 <= 1'b0;
      else if (iot4) ff1 <= 1'b1;

      if (iot1 || write_flag) ff2 <= 1'b0;
      else if (iot4 || skip)  ff2 <= 1'b1;

      if (write_done)                      write_flag <= 1'b0;
      else if (ff4_level && !ff4_level_q)  write_flag <= 1'b1;
    end
  end

  // A word is loaded only when no store is pending, and an IOT2 either loads
  // or skips, never both.
  a_load_idle:   assert property (@(posedge clk) disable iff (rst) load_sr |-> !write_flag);
  a_one_meaning: assert property (@(posedge clk) disable iff (rst) !(load_sr && skip));
  // write_done only ends a pending store.
  a_done_busy:   assert property (@(posedge clk) disable iff (rst) write_done |-> write_flag);

endmodule
