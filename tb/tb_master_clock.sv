// tb_master_clock: T must come exactly once every CLK_DIV cycles, one cycle
// wide (checked at the default divide ratio of 50, i.e. 200 kHz from 10 MHz).
module tb_master_clock;
  localparam int DIV = 50;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, t;

  master_clock dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int last, cyc, seen;
  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    last = -1; cyc = 0; seen = 0;
    while (seen < 60) begin
      @(posedge clk); cyc++;
      if (t) begin
        if (last >= 0) begin
          checks++;
          if (cyc - last != DIV) begin failures++; $display("FAIL period %0d", cyc - last); end
        end
        last = cyc; seen++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
