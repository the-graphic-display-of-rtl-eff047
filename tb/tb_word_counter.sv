// tb_word_counter: counts T13 pulses 0..60 and wraps to 0, with wrap high on
// exactly the T13 that returns it to 0.
module tb_word_counter;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, t13 = 0, wrap;
  logic [5:0] count;

  word_counter dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n, wraps;
  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    n = 0; wraps = 0;
    repeat (400) begin
      t13 <= ($urandom_range(0, 1) == 0);
      #1;
      checks++;
      if (wrap !== (t13 && n == 60)) begin failures++; $display("FAIL wrap=%b at n=%0d", wrap, n); end
      @(posedge clk);
      if (t13) begin n = (n + 1) % 61; if (n == 0) wraps++; end
      #1; checks++;
      if (count !== 6'(n)) begin failures++; $display("FAIL count %0d expected %0d", count, n); end
    end
    checks++;
    if (wraps < 2) begin failures++; $display("FAIL only %0d wraps", wraps); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
