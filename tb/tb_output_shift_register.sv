// tb_output_shift_register: twelve serial bits, least significant first,
// must stand as the parallel word after the twelfth shift; no shift, no change.
module tb_output_shift_register;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, din = 0, shift = 0;
  logic [11:0] q;

  output_shift_register dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [11:0] v;
  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (50) begin
      v = 12'($urandom);
      for (int i = 0; i < 12; i++) begin
        @(negedge clk); din = v[i]; shift = 1;
        @(negedge clk); shift = 0; din = 1'($urandom);
        repeat ($urandom_range(0, 2)) @(negedge clk);
      end
      checks++;
      if (q !== v) begin failures++; $display("FAIL q=%h expected %h", q, v); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
