// tb_timing_decoder: all 32 combinations of T and bit count against the table
// T0 = count 0, T1-T12 = counts 1..12, T13 = count 13, T14 = count 14.
module tb_timing_decoder;
  import display_pkg::*;
  int checks = 0, failures = 0;
  logic t;
  logic [3:0] count;
  timing_t tp;

  timing_decoder dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [3:0] exp;
  initial begin
    for (int tt = 0; tt < 2; tt++) begin
      for (int c = 0; c < 16; c++) begin
        t = 1'(tt); count = 4'(c); #1;
        exp = '0;
        if (tt == 1) begin
          exp[3] = (c == 0);
          exp[2] = (c >= 1 && c <= 12);
          exp[1] = (c == 13);
          exp[0] = (c == 14);
        end
        checks++;
        if (tp !== exp) begin failures++; $display("FAIL t=%0d count=%0d tp=%b", tt, c, tp); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
