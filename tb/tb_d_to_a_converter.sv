// tb_d_to_a_converter: all 256 codes: 0 V for all ones, -10 V for all zeros,
// monotonic, steps of about 0.04 V.
module tb_d_to_a_converter;
  int checks = 0, failures = 0;
  logic [7:0] code;
  real vout, prev, expv;

  d_to_a_converter dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    prev = -20.0;
    for (int c = 0; c < 256; c++) begin
      code = 8'(c); #1;
      expv = -10.0 + 10.0 * c / 255.0;
      checks++;
      if (vout - expv > 1e-9 || expv - vout > 1e-9) begin failures++; $display("FAIL code %0d v=%f", c, vout); end
      if (c > 0) begin
        checks++;
        if (vout - prev < 0.035 || vout - prev > 0.045) begin failures++; $display("FAIL step at %0d: %f", c, vout - prev); end
      end
      prev = vout;
    end
    code = 8'hFF; #1; checks++;
    if (vout != 0.0) begin failures++; $display("FAIL all ones %f", vout); end
    code = 8'h00; #1; checks++;
    if (vout != -10.0) begin failures++; $display("FAIL all zeros %f", vout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
