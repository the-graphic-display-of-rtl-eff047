// tb_pulse_converter: the widened pulse must start one cycle after the input
// pulse and last exactly WIDTH cycles; a second pulse restarts it.
module tb_pulse_converter;
  localparam int W = 7;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, pulse_in = 0, level_out;

  pulse_converter #(.WIDTH(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic exp, input string what);
    checks++;
    if (level_out !== exp) begin
      failures++;
      $display("FAIL %s: level_out=%b expected %b at %0t", what, level_out, exp, $time);
    end
  endtask

  int high;
  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk); #1 check(0, "idle");
    for (int n = 0; n < 5; n++) begin
      pulse_in <= 1; @(posedge clk); pulse_in <= 0;
      high = 0;
      #1;
      while (level_out) begin high++; @(posedge clk); #1; end
      checks++;
      if (high != W) begin failures++; $display("FAIL width %0d expected %0d", high, W); end
      repeat (n) @(posedge clk);
    end
    // retrigger: pulse 3 cycles into a widened pulse extends it to 3 + W
    pulse_in <= 1; @(posedge clk); pulse_in <= 0;
    repeat (2) @(posedge clk);
    pulse_in <= 1; @(posedge clk); pulse_in <= 0;
    high = 3; #1;
    while (level_out) begin high++; @(posedge clk); #1; end
    checks++;
    if (high != W + 3) begin failures++; $display("FAIL retrigger width %0d", high); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
