// tb_ma_counter: random clear and advance pulses against a reference count
// (clear wins over advance, six-bit wrap).
module tb_ma_counter;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, clear = 0, advance = 0;
  logic [5:0] count;

  ma_counter dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n;
  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    n = 0;
    repeat (1000) begin
      clear   <= ($urandom_range(0, 60) == 0);
      advance <= ($urandom_range(0, 1) == 0);
      @(posedge clk);
      if (clear) n = 0; else if (advance) n = (n + 1) % 64;
      #1; checks++;
      if (count !== 6'(n)) begin failures++; $display("FAIL count %0d expected %0d", count, n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
