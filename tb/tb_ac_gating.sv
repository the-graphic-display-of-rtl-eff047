// tb_ac_gating: a load copies the AC into set_bits for exactly HOLD cycles,
// after which the holding register is cleared; without a load nothing is set.
module tb_ac_gating;
  localparam int HOLD = 6;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, load = 0, holding;
  logic [11:0] ac, set_bits;

  ac_gating #(.HOLD(HOLD)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [11:0] v;
  initial begin
    ac = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 40; n++) begin
      v = 12'($urandom);
      ac <= v; load <= 1; @(posedge clk); load <= 0;
      ac <= 12'($urandom);            // AC may change after the pulse
      for (int c = 0; c < HOLD; c++) begin
        #1; checks++;
        if (set_bits !== v || !holding) begin
          failures++; $display("FAIL hold cycle %0d: %h expected %h", c, set_bits, v);
        end
        @(posedge clk);
      end
      #1; checks++;
      if (set_bits !== '0 || holding) begin failures++; $display("FAIL not cleared: %h", set_bits); end
      repeat ($urandom_range(0, 4)) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
