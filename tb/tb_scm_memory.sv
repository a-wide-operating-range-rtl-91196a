// Self-checking testbench of scm_memory at its default size (256 x 32).
//
// First writes every word, then issues random simultaneous writes and reads
// for several thousand cycles. A reference array models the memory: a write
// captured at a rising edge is visible to a read captured at the same edge
// (write-through) and later. Read data is checked one clock cycle after the
// read is captured, just before the next rising edge, which is the one-cycle
// read latency of the design. While re is low the read address is held, and
// the output must keep following that word. A second check per read looks at
// the output in the high phase of the cycle, before the low-phase write, when
// it must still show the word as it was before a same-address write.
module tb_scm_memory;
  import scm_pkg::*;

  localparam int unsigned WORDS = SCM_WORDS;
  localparam int unsigned WIDTH = SCM_WIDTH;
  localparam int unsigned AW    = $clog2(WORDS);
  localparam int unsigned CYCLES = 6000;

  logic             clk = 1'b0;
  logic             rst_n;
  logic             we, re;
  logic [AW-1:0]    waddr, raddr;
  logic [WIDTH-1:0] wdata, rdata;

  logic [WIDTH-1:0] model [WORDS];
  logic [AW-1:0]    model_raddr;
  logic [WIDTH-1:0] old_word;
  int checks = 0, failures = 0, n_reads = 0, n_writes = 0, n_wt = 0;

  scm_memory dut (.clk, .rst_n, .we, .waddr, .wdata, .re, .raddr, .rdata);

  always #5 clk = ~clk;

  initial begin : watchdog
    #((CYCLES + WORDS + 100) * 10);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Apply the operations just captured at a rising edge to the model.
  task automatic capture();
    if (re) model_raddr = raddr;
    old_word = model[model_raddr];
    if (we) begin
      model[waddr] = wdata;
      n_writes++;
      if (re && raddr == waddr) n_wt++;
    end
    if (re) n_reads++;
  endtask

  initial begin
    rst_n = 1'b0; we = 1'b0; re = 1'b0; waddr = '0; raddr = '0; wdata = '0;
    model_raddr = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;

    // Fill.
    for (int a = 0; a < WORDS; a++) begin
      we = 1'b1; waddr = AW'(a); wdata = $urandom;
      @(posedge clk); capture(); #1;
    end
    we = 1'b0;

    for (int i = 0; i < CYCLES; i++) begin
      we    = ($urandom % 4) != 0;
      re    = ($urandom % 4) != 0;
      waddr = AW'($urandom);
      raddr = ($urandom % 4 == 0) ? waddr : AW'($urandom);
      wdata = $urandom;
      @(posedge clk);
      capture();
      // High phase: a same-address write is not in the array yet.
      #2;
      checks++;
      if (rdata !== old_word) begin
        failures++;
        $display("FAIL high phase addr %0d: got %h expected %h", model_raddr, rdata, old_word);
      end
      // End of the cycle: one-cycle read latency, write-through.
      #7;
      checks++;
      if (rdata !== model[model_raddr]) begin
        failures++;
        $display("FAIL read addr %0d: got %h expected %h", model_raddr, rdata, model[model_raddr]);
      end
    end

    checks++;
    if (n_wt == 0 || n_reads == 0 || n_writes == 0) begin
      failures++;
      $display("FAIL coverage: reads=%0d writes=%0d write-through=%0d", n_reads, n_writes, n_wt);
    end
    $display("reads=%0d writes=%0d same-cycle same-address=%0d", n_reads, n_writes, n_wt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
