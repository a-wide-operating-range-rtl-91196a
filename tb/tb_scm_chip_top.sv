// End-to-end testbench of scm_chip_top at its default size (256 x 32).
//
// Takes the chip through the tester flow:
//  1. scan mode: writes random words through the scan chain and reads them
//     back through it,
//  2. switches to BIST mode and runs March C- on the fault-free array,
//     checking the pass result and its length of 10*WORDS + 1 cycles,
//  3. switches back to scan mode and reads words through the chain: the BIST
//     must have left every word zero,
//  4. writes through the scan chain again, to show the mode switch handed the
//     ports back,
//  5. runs the BIST once more and, partway through, hands the ports to the
//     scan chain for one write; the lost March writes and the foreign word
//     must make the BIST report a failure.
// Each mechanism (scan write, scan read, BIST pass, BIST fail, mode switch) is
// counted and a mechanism that never happened is a failure.
module tb_scm_chip_top;
  import scm_pkg::*;

  localparam int unsigned WORDS = SCM_WORDS;
  localparam int unsigned WIDTH = SCM_WIDTH;
  localparam int unsigned AW    = $clog2(WORDS);
  localparam int unsigned LEN   = SCAN_CMD_W + AW + WIDTH;

  logic          clk = 1'b0;
  logic          rst_n;
  logic          scan_en, scan_in, scan_update, scan_out;
  logic          bist_mode, bist_start, bist_busy, bist_done, bist_fail;
  logic [AW-1:0] bist_fail_addr;

  logic [WIDTH-1:0] model [WORDS];
  int checks = 0, failures = 0;
  int n_scan_wr = 0, n_scan_rd = 0, n_bist_pass = 0, n_bist_fail = 0, n_mode_sw = 0;

  scm_chip_top dut (
    .clk, .rst_n, .scan_en, .scan_in, .scan_update, .scan_out,
    .bist_mode, .bist_start, .bist_busy, .bist_done, .bist_fail, .bist_fail_addr
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    #20000000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic shift(input logic [LEN-1:0] v, output logic [LEN-1:0] got);
    scan_en = 1'b1;
    for (int i = 0; i < LEN; i++) begin
      scan_in = v[i];
      got[i]  = scan_out;
      @(posedge clk); #1;
    end
    scan_en = 1'b0;
  endtask

  task automatic pulse_update();
    scan_update = 1'b1;
    @(posedge clk); #1;
    scan_update = 1'b0;
    @(posedge clk); #1;
  endtask

  task automatic scan_write(input logic [AW-1:0] a, input logic [WIDTH-1:0] d);
    logic [LEN-1:0] got;
    shift({SCAN_WRITE, a, d}, got);
    pulse_update();
    n_scan_wr++;
  endtask

  task automatic scan_read(input logic [AW-1:0] a, output logic [WIDTH-1:0] d);
    logic [LEN-1:0] got;
    shift({SCAN_READ, a, WIDTH'(0)}, got);
    pulse_update();
    shift({SCAN_NOP, AW'(0), WIDTH'(0)}, got);
    d = got[WIDTH-1:0];
    n_scan_rd++;
  endtask

  task automatic set_mode(input logic m);
    bist_mode = m;
    n_mode_sw++;
    @(posedge clk); #1;
  endtask

  task automatic bist_run(output int cycles);
    bist_start = 1'b1;
    @(posedge clk); #1;
    bist_start = 1'b0;
    cycles = 0;
    while (!bist_done && cycles < 20 * WORDS) begin
      @(posedge clk); #1;
      cycles++;
    end
  endtask

  initial begin
    logic [WIDTH-1:0] d;
    logic [AW-1:0]    a;
    int               cycles;
    rst_n = 1'b0; scan_en = 1'b0; scan_in = 1'b0; scan_update = 1'b0;
    bist_mode = 1'b0; bist_start = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;

    // 1. Scan writes and reads.
    for (int i = 0; i < WORDS; i++) begin
      model[i] = $urandom;
      scan_write(AW'(i), model[i]);
    end
    for (int i = 0; i < 64; i++) begin
      a = AW'($urandom);
      scan_read(a, d);
      check(d == model[a], $sformatf("scan read word %0d: %h, expected %h", a, d, model[a]));
    end
    // A BIST start outside BIST mode is ignored.
    bist_start = 1'b1;
    @(posedge clk); #1;
    bist_start = 1'b0;
    check(!bist_busy, "BIST start ignored in scan mode");

    // 2. BIST on the good array.
    set_mode(1'b1);
    bist_run(cycles);
    check(bist_done && !bist_fail, "BIST passes on a good array");
    check(cycles == MARCH_OPS_PER_WORD * WORDS + 1, $sformatf("BIST length %0d cycles, expected %0d", cycles, MARCH_OPS_PER_WORD * WORDS + 1));
    if (bist_done && !bist_fail) n_bist_pass++;
    for (int i = 0; i < WORDS; i++) model[i] = '0;

    // 3. Back to scan: the BIST leaves all words zero.
    set_mode(1'b0);
    for (int i = 0; i < 32; i++) begin
      a = AW'($urandom);
      scan_read(a, d);
      check(d == '0, $sformatf("word %0d zero after BIST: %h", a, d));
    end

    // 4. Scan access again after the mode switch.
    for (int i = 0; i < 32; i++) begin
      a = AW'($urandom); d = $urandom;
      model[a] = d;
      scan_write(a, d);
    end
    for (int i = 0; i < WORDS; i++) begin
      if (model[i] != '0) begin
        scan_read(AW'(i), d);
        check(d == model[i], $sformatf("scan read after mode switch, word %0d", i));
      end
    end

    // 5. BIST with the array disturbed: partway through the test, the ports
    //    are handed to the scan chain for one write of a non-March word, so
    //    March writes issued meanwhile are lost and the array no longer holds
    //    what the BIST expects.
    set_mode(1'b1);
    bist_start = 1'b1;
    @(posedge clk); #1;
    bist_start = 1'b0;
    repeat (WORDS + 40) @(posedge clk);
    #1;
    set_mode(1'b0);
    scan_write(AW'(WORDS - 1), 32'ha5a5_a5a5);
    set_mode(1'b1);
    cycles = 0;
    while (!bist_done && cycles < 20 * WORDS) begin
      @(posedge clk); #1;
      cycles++;
    end
    check(bist_done && bist_fail, "BIST flags the disturbed array");
    if (bist_done && bist_fail) n_bist_fail++;
    set_mode(1'b0);

    $display("scan writes=%0d scan reads=%0d bist pass=%0d bist fail=%0d mode switches=%0d",
             n_scan_wr, n_scan_rd, n_bist_pass, n_bist_fail, n_mode_sw);
    check(n_scan_wr > 0, "scan write happened");
    check(n_scan_rd > 0, "scan read happened");
    check(n_bist_pass > 0, "BIST pass happened");
    check(n_bist_fail > 0, "BIST fail happened");
    check(n_mode_sw > 0, "mode switch happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
