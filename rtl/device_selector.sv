// device_selector: PDP-8/S I/O device selector.
//
// The processor puts the select code (memory buffer bits 3-8) on the I/O bus
// and issues up to three IOP pulses. When the code equals DEVICE_CODE, each
// IOP pulse is passed on as the matching IOT command pulse; otherwise nothing
// is produced. Purely combinational: an IOT pulse has the width and timing of
// its IOP pulse. Device code 44 (octal) is the one the original unit used; the
// gate-level form of the selector is not given, so this is the plain
// compare-and-gate.
module device_selector
  import display_pkg::*;
#(
  parameter logic [5:0] CODE = DEVICE_CODE
) (
  input  logic [5:0] mb_sel,   // MB bit 3 in [5] ... MB bit 8 in [0]
  input  logic       iop1,
  input  logic       iop2,
  input  logic       iop4,
  output logic       iot1,
  output logic       iot2,
  output logic       iot4
);

  logic selected;

  always_comb begin
    selected = (mb_sel == CODE);
    iot1 = selected & iop1;
    iot2 = selected & iop2;
    iot4 = selected & iop4;
  end

endmodule
