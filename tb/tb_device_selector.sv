// tb_device_selector: exhaustive check of the device selector.
// Every select code (64) with every IOP combination (8): an IOT pulse must
// appear exactly when the code is 44 octal and its IOP pulse is present.
module tb_device_selector;
  int checks = 0, failures = 0;
  logic [5:0] mb_sel;
  logic iop1, iop2, iop4, iot1, iot2, iot4;

  device_selector dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int code = 0; code < 64; code++) begin
      for (int p = 0; p < 8; p++) begin
        mb_sel = 6'(code);
        {iop4, iop2, iop1} = 3'(p);
        #1;
        checks++;
        if ({iot4, iot2, iot1} !== ((code == 'o44) ? 3'(p) : 3'b000)) begin
          failures++;
          $display("FAIL code=%o iop=%b iot=%b", code, p[2:0], {iot4, iot2, iot1});
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
