// Self-checking testbench of scm_bist, run against the real scm_memory at
// the default size (256 x 32).
//
// Run 1 checks a fault-free memory: fail stays low, done rises exactly
// 10*WORDS + 1 clock edges after start is sampled, the BIST issues 5*WORDS
// writes and 5*WORDS reads, and the memory is left all zero.
// Runs 2 and 3 insert a fault in the read data path between memory and BIST:
// a stuck-at-0 bit in one word and a stuck-at-1 bit in another. March C- must
// flag both and report the faulty word as the first failing address.
module tb_scm_bist;
  import scm_pkg::*;

  localparam int unsigned WORDS = SCM_WORDS;
  localparam int unsigned WIDTH = SCM_WIDTH;
  localparam int unsigned AW    = $clog2(WORDS);

  logic             clk = 1'b0;
  logic             rst_n;
  logic             start, busy, done, fail;
  logic [AW-1:0]    fail_addr;
  logic             mem_we, mem_re;
  logic [AW-1:0]    mem_waddr, mem_raddr;
  logic [WIDTH-1:0] mem_wdata, mem_rdata, bist_rdata;

  // Fault insertion on the read path.
  logic             f_on, f_val;
  logic [AW-1:0]    f_addr;
  logic [$clog2(WIDTH)-1:0] f_bit;
  logic [AW-1:0]    raddr_seen;

  int checks = 0, failures = 0, n_we = 0, n_re = 0;

  scm_memory mem (.clk, .rst_n, .we(mem_we), .waddr(mem_waddr), .wdata(mem_wdata),
                  .re(mem_re), .raddr(mem_raddr), .rdata(mem_rdata));

  scm_bist dut (.clk, .rst_n, .start, .busy, .done, .fail, .fail_addr,
                .mem_we, .mem_waddr, .mem_wdata, .mem_re, .mem_raddr,
                .mem_rdata(bist_rdata));

  always_ff @(posedge clk) begin
    if (mem_re) raddr_seen <= mem_raddr;
    if (mem_we) n_we <= n_we + 1;
    if (mem_re) n_re <= n_re + 1;
  end

  always_comb begin
    bist_rdata = mem_rdata;
    if (f_on && raddr_seen == f_addr) bist_rdata[f_bit] = f_val;
  end

  always #5 clk = ~clk;

  initial begin : watchdog
    #((4 * (10 * WORDS + 50) + 100) * 10);
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

  task automatic run(output int cycles);
    start = 1'b1;
    @(posedge clk); #1;
    start = 1'b0;
    cycles = 0;  // clock edges after the one that sampled start
    check(busy && !done, "busy after start");
    while (!done && cycles < 20 * WORDS) begin
      @(posedge clk); #1;
      cycles++;
    end
    check(!busy, "not busy when done");
  endtask

  initial begin
    int cycles;
    rst_n = 1'b0; start = 1'b0; f_on = 1'b0; f_val = 1'b0; f_addr = '0; f_bit = '0;
    raddr_seen = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;
    check(!busy && !done, "idle after reset");

    // Run 1: fault free.
    n_we = 0; n_re = 0;
    run(cycles);
    check(cycles == MARCH_OPS_PER_WORD * WORDS + 1, $sformatf("test length %0d cycles, expected %0d", cycles, MARCH_OPS_PER_WORD * WORDS + 1));
    check(!fail, "no fail on a good memory");
    check(n_we == 5 * WORDS && n_re == 5 * WORDS,
          $sformatf("operation count: %0d writes, %0d reads", n_we, n_re));
    for (int a = 0; a < WORDS; a++) begin
      logic [WIDTH-1:0] w;
      w = '1;
      // Read the array through the memory port after the test.
      force mem_re    = 1'b1;
      force mem_raddr = AW'(a);
      @(posedge clk); #1;
      w = mem_rdata;
      release mem_re;
      release mem_raddr;
      check(w == '0, $sformatf("word %0d zero after March C-", a));
    end

    // Run 2: stuck-at-0.
    f_on = 1'b1; f_val = 1'b0; f_addr = AW'(37 % WORDS); f_bit = 5;
    run(cycles);
    check(fail, "stuck-at-0 detected");
    check(fail_addr == f_addr, $sformatf("stuck-at-0 address %0d, expected %0d", fail_addr, f_addr));

    // Run 3: stuck-at-1.
    f_val = 1'b1; f_addr = AW'(200 % WORDS); f_bit = WIDTH - 1;
    run(cycles);
    check(fail, "stuck-at-1 detected");
    check(fail_addr == f_addr, $sformatf("stuck-at-1 address %0d, expected %0d", fail_addr, f_addr));
    check(cycles == MARCH_OPS_PER_WORD * WORDS + 1, "test length with a fault");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
