// display_pkg: constants and types shared by the memory-display peripheral.
//
// The peripheral stores up to 61 words of 12 bits in a recirculating serial
// memory and replays them, one word every 16 bit times, to an 8-bit D-to-A
// converter that drives an oscilloscope's vertical input. The numbers below
// (61 words, 16-bit word times, 12 data bits, 8 converter bits, 976 line
// bits, device code 44 octal) are those of the original unit. timing_t is
// this design's own bundling of the word-time pulses into one struct.
package display_pkg;

  localparam int unsigned N_WORDS    = 61;   // words held by the serial memory
  localparam int unsigned WORD_TIME  = 16;   // bit times per word (12 data + 4 spacer)
  localparam int unsigned DATA_BITS  = 12;   // PDP-8/S word length
  localparam int unsigned N_DAC_BITS = 8;    // bits taken by the D-to-A converter
  localparam int unsigned LINE_BITS  = N_WORDS * WORD_TIME;  // 976
  localparam int unsigned ADDR_BITS  = 6;    // word counter and MA counter stages
  localparam logic [5:0]  DEVICE_CODE = 6'o44;

  // Bit-time pulses of the timing unit; each field is a one-cycle enable.
  typedef struct packed {
    logic t0;      // bit time 0: compare strobe
    logic t1_12;   // bit times 1..12: shift pulses
    logic t13;     // bit time 13: word counter, MA counter, DAC transfer
    logic t14;     // bit time 14: compare flip-flop clear
  } timing_t;

endpackage
