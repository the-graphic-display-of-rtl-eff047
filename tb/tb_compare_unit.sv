// tb_compare_unit: COMP sets only on T0 with equal counters and the write
// flag on, clears on T14, holds otherwise; comp_n is its complement.
module tb_compare_unit;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, t0 = 0, t14 = 0, write_flag = 0, comp, comp_n;
  logic [5:0] w, n;

  compare_unit dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic ref_comp;
  logic [5:0] ww, nn;
  int sets;
  initial begin
    w = '0; n = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    ref_comp = 0; sets = 0;
    repeat (3000) begin
      ww = 6'($urandom);
      case ($urandom_range(0, 2))
        0: nn = ww;
        1: nn = ww ^ 6'(1 << $urandom_range(0, 5));
        default: nn = 6'($urandom);
      endcase
      w <= ww; n <= nn;
      t0 <= ($urandom_range(0, 3) == 0);
      t14 <= ($urandom_range(0, 7) == 0);
      write_flag <= ($urandom_range(0, 1) == 0);
      @(posedge clk);
      if (t14) ref_comp = 0;
      else if (t0 && (w == n) && write_flag) begin ref_comp = 1; sets++; end
      #1; checks++;
      if (comp !== ref_comp || comp_n !== ~ref_comp) begin
        failures++; $display("FAIL comp=%b expected %b", comp, ref_comp);
      end
    end
    checks++;
    if (sets < 10) begin failures++; $display("FAIL only %0d sets", sets); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
