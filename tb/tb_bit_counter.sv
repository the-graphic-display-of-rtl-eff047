// tb_bit_counter: the count follows the number of T pulses modulo 16, with T
// pulses at random intervals.
module tb_bit_counter;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, t = 0;
  logic [3:0] count;

  bit_counter dut (.*);

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
    repeat (500) begin
      t <= ($urandom_range(0, 2) == 0);
      @(posedge clk);
      if (t) n++;
      #1; checks++;
      if (count !== 4'(n % 16)) begin failures++; $display("FAIL count %0d expected %0d", count, n % 16); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
