// tb_timing_unit: over several word times, T0, twelve T1-T12 pulses, T13 and
// T14 come in that order, one word time is 16 T pulses = 16*CLK_DIV cycles,
// T1-T12 pulses are CLK_DIV cycles apart, and each pulse comes in the bit
// time bit_count names.
module tb_timing_unit;
  import display_pkg::*;
  localparam int DIV = 4;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, t;
  timing_t tp;
  logic [3:0] bit_count;

  timing_unit #(.CLK_DIV(DIV)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc, t0_at, n_shift, last_shift, words;
  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    cyc = 0; t0_at = -1; n_shift = 0; words = 0;
    while (words < 20) begin
      @(posedge clk); cyc++;
      if (t) begin
        checks++;
        if (tp.t0 != (bit_count == 4'd0) || tp.t13 != (bit_count == 4'd13) || tp.t14 != (bit_count == 4'd14))
          begin failures++; $display("FAIL pulse/bit count mismatch %b at %0d", tp, bit_count); end
      end
      if (tp.t0) begin
        if (t0_at >= 0) begin
          checks++;
          if (cyc - t0_at != 16 * DIV) begin failures++; $display("FAIL word time %0d", cyc - t0_at); end
          checks++;
          if (n_shift != 12) begin failures++; $display("FAIL %0d shift pulses", n_shift); end
          words++;
        end
        t0_at = cyc; n_shift = 0;
      end
      if (tp.t1_12 && t0_at >= 0) begin
        n_shift++;
        checks++;
        if (cyc - t0_at != n_shift * DIV) begin failures++; $display("FAIL shift %0d at %0d", n_shift, cyc - t0_at); end
      end
      if (tp.t13 && t0_at >= 0) begin
        checks++;
        if (cyc - t0_at != 13 * DIV) begin failures++; $display("FAIL T13 at %0d", cyc - t0_at); end
      end
      if (tp.t14 && t0_at >= 0) begin
        checks++;
        if (cyc - t0_at != 14 * DIV) begin failures++; $display("FAIL T14 at %0d", cyc - t0_at); end
      end
      checks++;
      if ($countones(tp) > 1 || ($countones(tp) == 1 && !t)) begin failures++; $display("FAIL overlap %b", tp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
