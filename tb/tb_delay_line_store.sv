// tb_delay_line_store: the store against a reference array of 976 bits.
// T comes on random cycles; on each T the reference writes enter (comp high)
// or recirculates, and dout must always show the bit written 976 T pulses
// earlier. Also checks that with comp low the contents survive whole
// recirculations unchanged.
module tb_delay_line_store;
  localparam int N = 976;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, t = 0, comp = 0, comp_n, enter = 0, dout;

  assign comp_n = ~comp;
  delay_line_store dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic refmem [N];
  int pos, ticks;
  initial begin
    foreach (refmem[i]) refmem[i] = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    pos = 0; ticks = 0;
    // phase 1: random writes; phase 2: pure recirculation
    while (ticks < 6 * N) begin
      t <= ($urandom_range(0, 1) == 0);
      comp <= (ticks < 3 * N) ? ($urandom_range(0, 2) == 0) : 1'b0;
      enter <= 1'($urandom);
      #1;
      if (t) begin
        checks++;
        if (dout !== refmem[pos]) begin
          failures++;
          if (failures < 10) $display("FAIL pos %0d dout=%b expected %b", pos, dout, refmem[pos]);
        end
        if (comp) refmem[pos] = enter;
        pos = (pos + 1) % N;
        ticks++;
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
