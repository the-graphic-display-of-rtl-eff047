// tb_iot_control: drives the IOT sequences of the display program and checks
// the decoded commands:
//   6447 -> ma_clear (STRETCH cycles), no load, no skip, no write flag
//   6446 -> load_sr on IOT2, write flag set shortly after IOT4
//   6442 -> no skip while the write flag is on; after write_done one skip,
//           and a second 6442 does not skip again; no load on 6442.
module tb_iot_control;
  localparam int ST = 4;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, iot1 = 0, iot2 = 0, iot4 = 0, write_done = 0;
  logic ma_clear, load_sr, write_flag, skip;

  iot_control #(.STRETCH(ST)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_clear, n_load, n_skip, clear_len;
  always @(posedge clk) begin
    if (!rst) begin
      if (ma_clear) clear_len++;
      if (load_sr) n_load++;
      if (skip) n_skip++;
    end
  end

  task automatic pulse(input int which);
    case (which)
      1: iot1 <= 1;
      2: iot2 <= 1;
      4: iot4 <= 1;
      default: ;
    endcase
    @(posedge clk);
    iot1 <= 0; iot2 <= 0; iot4 <= 0;
    repeat (9) @(posedge clk);
  endtask

  task automatic instr(input logic [2:0] bits);
    if (bits[0]) pulse(1);
    if (bits[1]) pulse(2);
    if (bits[2]) pulse(4);
    repeat (20) @(posedge clk);
  endtask

  task automatic expect_eq(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: %0d expected %0d", what, got, exp); end
  endtask

  initial begin
    n_load = 0; n_skip = 0; clear_len = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (2) @(posedge clk);
    for (int round = 0; round < 3; round++) begin
      clear_len = 0; n_load = 0; n_skip = 0;
      instr(3'b111);                       // 6447
      expect_eq(clear_len, ST, "ma_clear width");
      expect_eq(n_load, 0, "load on 6447");
      expect_eq(n_skip, 0, "skip on 6447");
      expect_eq(int'(write_flag), 0, "write flag after 6447");
      for (int w = 0; w < 4; w++) begin
        n_load = 0; n_skip = 0;
        instr(3'b110);                     // 6446
        expect_eq(n_load, 1, "load on 6446");
        expect_eq(int'(write_flag), 1, "write flag after 6446");
        repeat (w + 1) instr(3'b010);      // 6442 while busy
        expect_eq(n_skip, 0, "skip while busy");
        write_done <= 1; @(posedge clk); write_done <= 0; @(posedge clk);
        expect_eq(int'(write_flag), 0, "write flag after write_done");
        instr(3'b010);                     // 6442 after store
        expect_eq(n_skip, 1, "skip after store");
        expect_eq(n_load, 1, "no load on 6442");
        instr(3'b010);                     // a second 6442 must not skip
        expect_eq(n_skip, 1, "second 6442");
      end
      expect_eq(clear_len, ST, "no clear after 6447");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
