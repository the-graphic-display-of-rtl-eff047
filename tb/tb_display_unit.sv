// tb_display_unit: end-to-end run of the display peripheral at its default
// parameters (5 us bit time at a 100 ns clock, 61 words, device 44).
//
// A small model of the processor side issues the IOT pulses of the display
// program: 6447 (initialise), then for each of 61 words 6446 (load AC, set
// the write flag) followed by 6442 (skip when done) until it skips. Two
// tables are loaded one after the other: a triangle (255 falling to 0 and
// rising again, two periods over the 61 words) and a sawtooth that restarts
// half way. After each table the testbench waits for two full
// recirculations and then checks, word by word over one sweep, the word read
// from the serial memory, the converter code and the converter voltage.
// Timing checks: one sweep (61 word times) is exactly 976 bit times, and each
// store finishes within one recirculation plus one word time of the write
// flag going on. Every mechanism (MA clear, load, write flag, store, busy
// 6442, skip, sweep wrap) is counted and must occur.
module tb_display_unit;
  import display_pkg::*;
  localparam int DIV = 50;                    // default bit time in clocks
  localparam int SWEEP = LINE_BITS * DIV;     // 48800 clocks = 4880 us
  int checks = 0, failures = 0;

  logic clk = 0, rst = 1;
  logic [5:0] mb_sel = '0;
  logic iop1 = 0, iop2 = 0, iop4 = 0;
  logic [11:0] ac = '0;
  logic skip, sweep_sync, write_flag, comp;
  logic [7:0] dac_code;
  real v_vertical;
  logic [5:0] word_count;
  logic [3:0] bit_time;

  display_unit dut (.*);

  always #50 clk = ~clk;                      // one cycle stands for 100 ns

  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("FAIL %s at %0t", msg, $time);
  endtask

  // ---------------- mechanism counters and timing checks ----------------
  int n_clear, n_load, n_wset, n_store, n_skip, n_busy, n_sweep, cyc;
  int last_sweep, wset_at;
  logic clear_q, wf_q;
  always @(posedge clk) begin
    if (rst) begin
      n_clear <= 0; n_load <= 0; n_wset <= 0; n_store <= 0; n_skip <= 0; n_sweep <= 0;
      cyc <= 0; last_sweep <= -1; clear_q <= 0; wf_q <= 0;
    end else begin
      cyc <= cyc + 1;
      clear_q <= dut.ma_clear;
      wf_q <= write_flag;
      if (dut.ma_clear && !clear_q) n_clear <= n_clear + 1;
      if (dut.load_sr) n_load <= n_load + 1;
      if (skip) n_skip <= n_skip + 1;
      if (write_flag && !wf_q) begin n_wset <= n_wset + 1; wset_at <= cyc; end
      if (!write_flag && wf_q) begin
        checks++;
        if (cyc - wset_at > (LINE_BITS + WORD_TIME) * DIV) fail($sformatf("store took %0d clocks", cyc - wset_at));
      end
      if (dut.write_done) n_store <= n_store + 1;
      if (sweep_sync) begin
        n_sweep <= n_sweep + 1;
        if (last_sweep >= 0) begin
          checks++;
          if (cyc - last_sweep != SWEEP) fail($sformatf("sweep period %0d clocks", cyc - last_sweep));
        end
        last_sweep <= cyc;
      end
    end
  end

  // ---------------- processor model ----------------
  task automatic iop(input int which);
    @(negedge clk);
    mb_sel = 6'o44;
    case (which)
      1: iop1 = 1;
      2: iop2 = 1;
      default: iop4 = 1;
    endcase
    @(negedge clk);
    iop1 = 0; iop2 = 0; iop4 = 0;
    repeat (10) @(negedge clk);               // 1 us between IOP pulses
  endtask

  // one IOT instruction; returns 1 if the unit pulsed the skip bus
  task automatic iot(input logic [2:0] bits, output logic skipped);
    int n_before;
    n_before = n_skip;
    if (bits[0]) iop(1);
    if (bits[1]) iop(2);
    if (bits[2]) iop(4);
    repeat (60) @(negedge clk);               // rest of the instruction
    skipped = (n_skip != n_before);
  endtask

  logic [11:0] table_mem [N_WORDS];

  task automatic run_program();
    logic s;
    iot(3'b111, s);                           // 6447
    if (s) fail("6447 skipped");
    checks++;
    if (dut.u_ma.count != 0) fail("MA not cleared");
    for (int i = 0; i < N_WORDS; i++) begin
      @(negedge clk) ac = table_mem[i];       // CLA CLL; TAD I 10
      repeat (40) @(negedge clk);
      iot(3'b110, s);                         // 6446
      if (s) fail("6446 skipped");
      do begin
        iot(3'b010, s);                       // 6442
        if (!s) begin n_busy++; repeat (40) @(negedge clk); end   // JMP .-1
      end while (!s);
      checks++;
      if (dut.u_ma.count != 6'(i + 1)) fail($sformatf("MA=%0d after word %0d", dut.u_ma.count, i));
    end
  endtask

  task automatic check_sweep();
    int w;
    logic [5:0] prev;
    // wait for two complete recirculations after the last store
    repeat (2) @(posedge sweep_sync);
    @(negedge clk);
    prev = word_count;
    for (int k = 0; k < N_WORDS; k++) begin
      // the word counter advances on T13, together with the DAC transfer
      @(negedge clk iff word_count != prev);
      w = int'(prev);
      checks++;
      if (dut.u_osr.q !== table_mem[w]) fail($sformatf("word %0d read %h expected %h", w, dut.u_osr.q, table_mem[w]));
      checks++;
      if (dac_code !== table_mem[w][7:0]) fail($sformatf("word %0d code %h expected %h", w, dac_code, table_mem[w][7:0]));
      checks++;
      if (v_vertical - (-10.0 + 10.0 * table_mem[w][7:0] / 255.0) > 1e-6 ||
          (-10.0 + 10.0 * table_mem[w][7:0] / 255.0) - v_vertical > 1e-6)
        fail($sformatf("word %0d voltage %f", w, v_vertical));
      prev = word_count;
    end
  endtask

  int tri_v;
  initial begin
    n_busy = 0;
    repeat (5) @(negedge clk);
    rst = 0;
    // table 1: triangle, 8 low bits 255 falling in steps of 17, then rising
    tri_v = 255;
    for (int i = 0; i < N_WORDS; i++) begin
      int ph;
      ph = i % 30;
      tri_v = (ph <= 15) ? 255 - 17 * ph : 17 * (ph - 15);
      table_mem[i] = {4'($urandom), 8'(tri_v)};
    end
    run_program();
    check_sweep();
    // table 2: sawtooth rising, restarting half way
    for (int i = 0; i < N_WORDS; i++)
      table_mem[i] = {4'($urandom), 8'((i % 31) * 8)};
    run_program();
    check_sweep();

    $display("mechanisms: ma_clear=%0d load=%0d write_set=%0d store=%0d busy_6442=%0d skip=%0d sweeps=%0d",
             n_clear, n_load, n_wset, n_store, n_busy, n_skip, n_sweep);
    checks++; if (n_clear != 2) fail("MA clear count");
    checks++; if (n_load != 2 * N_WORDS) fail("load count");
    checks++; if (n_wset != 2 * N_WORDS) fail("write flag count");
    checks++; if (n_store != 2 * N_WORDS) fail("store count");
    checks++; if (n_skip != 2 * N_WORDS) fail("skip count");
    checks++; if (n_busy == 0) fail("skip was never refused");
    checks++; if (n_sweep < 4) fail("too few sweeps");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
