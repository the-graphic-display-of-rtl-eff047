// tb_dac_gating: the code takes the 8 low word bits on T13 and holds them
// between T13 pulses.
module tb_dac_gating;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, t13 = 0;
  logic [11:0] word;
  logic [7:0] code;

  dac_gating dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] exp;
  initial begin
    word = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    exp = '0;
    repeat (500) begin
      word <= 12'($urandom);
      t13 <= ($urandom_range(0, 3) == 0);
      @(posedge clk);
      if (t13) exp = word[7:0];
      #1; checks++;
      if (code !== exp) begin failures++; $display("FAIL code %h expected %h", code, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
