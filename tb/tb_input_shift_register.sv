// tb_input_shift_register: a word set in parallel comes out on enter least
// significant bit first over twelve shifts, after which the register is empty.
module tb_input_shift_register;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, shift = 0, enter;
  logic [11:0] set_bits, q;

  input_shift_register dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [11:0] v, got;
  initial begin
    set_bits = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (50) begin
      v = 12'($urandom);
      set_bits <= v; @(posedge clk); @(posedge clk); set_bits <= '0;
      @(posedge clk);
      #1; checks++;
      if (q !== v) begin failures++; $display("FAIL loaded %h expected %h", q, v); end
      got = '0;
      for (int i = 0; i < 12; i++) begin
        #1 got[i] = enter;
        shift <= 1; @(posedge clk); shift <= 0;
        repeat ($urandom_range(0, 3)) @(posedge clk);
      end
      checks++;
      if (got !== v) begin failures++; $display("FAIL serial %h expected %h", got, v); end
      #1; checks++;
      if (q !== '0) begin failures++; $display("FAIL not cleared %h", q); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
