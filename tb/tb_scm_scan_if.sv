// Self-checking testbench of scm_scan_if at its default size (256 x 32).
//
// A small reference memory with the same one-cycle read latency as scm_memory
// sits behind the scan interface. The testbench shifts write and read
// commands into the chain, pulses scan_update, and checks
//  - that each write reaches the memory port with the scanned address and
//    data, in the update cycle and only then,
//  - that each read returns, after shifting out, the word held at the address,
//  - that the chain is a plain shift register: the bits shifted in come out
//    of scan_out in order after one chain length.
module tb_scm_scan_if;
  import scm_pkg::*;

  localparam int unsigned WORDS = SCM_WORDS;
  localparam int unsigned WIDTH = SCM_WIDTH;
  localparam int unsigned AW    = $clog2(WORDS);
  localparam int unsigned LEN   = SCAN_CMD_W + AW + WIDTH;

  logic             clk = 1'b0;
  logic             rst_n;
  logic             scan_en, scan_in, scan_update, scan_out;
  logic             mem_we, mem_re;
  logic [AW-1:0]    mem_waddr, mem_raddr;
  logic [WIDTH-1:0] mem_wdata, mem_rdata;

  // Reference memory: synchronous write, registered read address.
  logic [WIDTH-1:0] mem [WORDS];
  logic [AW-1:0]    raddr_q;
  int               n_mem_writes = 0;

  always_ff @(posedge clk) begin
    if (mem_we) begin
      mem[mem_waddr] <= mem_wdata;
      n_mem_writes   <= n_mem_writes + 1;
    end
    if (mem_re) raddr_q <= mem_raddr;
  end
  assign mem_rdata = mem[raddr_q];

  logic [WIDTH-1:0] model [WORDS];
  int checks = 0, failures = 0;

  scm_scan_if dut (
    .clk, .rst_n, .scan_en, .scan_in, .scan_update, .scan_out,
    .mem_we, .mem_waddr, .mem_wdata, .mem_re, .mem_raddr, .mem_rdata
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    #2000000;
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

  // Shift a full chain in (data[0] first); return what came out of scan_out.
  task automatic shift(input logic [LEN-1:0] v, output logic [LEN-1:0] got);
    scan_en = 1'b1;
    for (int i = 0; i < LEN; i++) begin
      scan_in = v[i];
      got[i]  = scan_out;
      @(posedge clk); #1;
    end
    scan_en = 1'b0;
  endtask

  task automatic update(input logic exp_we, input logic [AW-1:0] a, input logic [WIDTH-1:0] d);
    scan_update = 1'b1;
    #1;
    check(mem_we == exp_we, "write strobe in update cycle");
    if (exp_we) check(mem_waddr == a && mem_wdata == d, "write address and data");
    @(posedge clk); #1;
    scan_update = 1'b0;
    #1;
    check(!mem_we && !mem_re, "strobes only in the update cycle");
    @(posedge clk); #1;  // capture cycle of a read
  endtask

  initial begin
    logic [LEN-1:0]   got, prev;
    logic [AW-1:0]    a;
    logic [WIDTH-1:0] d;
    rst_n = 1'b0; scan_en = 1'b0; scan_in = 1'b0; scan_update = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;

    // Fill a set of words through the chain.
    for (int i = 0; i < WORDS; i++) begin
      a = AW'(i); d = $urandom;
      model[a] = d;
      shift({SCAN_WRITE, a, d}, got);
      update(1'b1, a, d);
    end
    check(n_mem_writes == WORDS, "one memory write per scan write");

    // Random reads and writes; the chain contents of the previous command
    // must come out while the next one is shifted in.
    prev = 'x;
    for (int i = 0; i < 300; i++) begin
      logic [LEN-1:0] cmdv;
      logic           is_wr;
      a = AW'($urandom); d = $urandom;
      is_wr = 1'($urandom);
      cmdv  = is_wr ? {SCAN_WRITE, a, d} : {SCAN_READ, a, WIDTH'(0)};
      shift(cmdv, got);
      if (i > 0) check(got == prev, "chain shifts out previous contents");
      update(is_wr, a, d);
      if (is_wr) begin
        model[a] = d;
        prev = cmdv;
      end else begin
        prev = {SCAN_READ, a, model[a]};
      end
    end

    // Read every word back and compare the shifted-out data.
    for (int i = 0; i < WORDS; i++) begin
      a = AW'(i);
      shift({SCAN_READ, a, WIDTH'(0)}, got);
      update(1'b0, a, '0);
      shift({SCAN_NOP, AW'(0), WIDTH'(0)}, got);
      check(got[WIDTH-1:0] == model[a] && got[WIDTH +: AW] == a &&
            got[LEN-1 -: SCAN_CMD_W] == SCAN_READ, $sformatf("read back word %0d", i));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
