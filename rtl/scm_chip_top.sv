// Test chip around the 8 kb standard-cell based memory.
//
// The memory (scm_memory, 256 x 32 pass-latch bitcells by default) can be
// driven from two sources: the scan interface, through which a tester writes
// and reads single words serially, and the built-in self test, which runs a
// March C- over the whole array. bist_mode selects the source of the write
// and read ports: 0 gives them to the scan interface, 1 to the BIST. Read data
// goes to both; the scan interface captures it only after its own reads.
// Change bist_mode only while neither source is active.
//
// Interface: clk, rst_n (asynchronous, active low); scan_en, scan_in,
// scan_update, scan_out (see scm_scan_if); bist_mode, bist_start, bist_busy,
// bist_done, bist_fail, bist_fail_addr (see scm_bist). Supply voltage and body
// bias, which set the speed of the memory on silicon, are not logic and are
// not ports here.
//
// The two access paths follow the chip description; the source multiplexer
// and the mode pin are this design's own. The chip's second, reference
// memory built from library latches is not part of this design.
module scm_chip_top #(
  parameter int unsigned WORDS = scm_pkg::SCM_WORDS,
  parameter int unsigned WIDTH = scm_pkg::SCM_WIDTH,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic          rst_n,
  // scan access
  input  logic          scan_en,
  input  logic          scan_in,
  input  logic          scan_update,
  output logic          scan_out,
  // self test
  input  logic          bist_mode,
  input  logic          bist_start,
  output logic          bist_busy,
  output logic          bist_done,
  output logic          bist_fail,
  output logic [AW-1:0] bist_fail_addr
);

  // Memory port of each source and of the memory.
  logic             s_we, b_we, m_we;
  logic             s_re, b_re, m_re;
  logic [AW-1:0]    s_waddr, b_waddr, m_waddr;
  logic [AW-1:0]    s_raddr, b_raddr, m_raddr;
  logic [WIDTH-1:0] s_wdata, b_wdata, m_wdata;
  logic [WIDTH-1:0] m_rdata;

  scm_scan_if #(.WORDS(WORDS), .WIDTH(WIDTH)) u_scan (
    .clk, .rst_n,
    .scan_en, .scan_in, .scan_update, .scan_out,
    .mem_we(s_we), .mem_waddr(s_waddr), .mem_wdata(s_wdata),
    .mem_re(s_re), .mem_raddr(s_raddr), .mem_rdata(m_rdata)
  );

  scm_bist #(.WORDS(WORDS), .WIDTH(WIDTH)) u_bist (
    .clk, .rst_n,
    .start(bist_start & bist_mode), .busy(bist_busy), .done(bist_done),
    .fail(bist_fail), .fail_addr(bist_fail_addr),
    .mem_we(b_we), .mem_waddr(b_waddr), .mem_wdata(b_wdata),
    .mem_re(b_re), .mem_raddr(b_raddr), .mem_rdata(m_rdata)
  );

  always_comb begin
    if (bist_mode) begin
      m_we = b_we; m_waddr = b_waddr; m_wdata = b_wdata;
      m_re = b_re; m_raddr = b_raddr;
    end else begin
      m_we = s_we; m_waddr = s_waddr; m_wdata = s_wdata;
      m_re = s_re; m_raddr = s_raddr;
    end
  end

  scm_memory #(.WORDS(WORDS), .WIDTH(WIDTH)) u_mem (
    .clk, .rst_n,
    .we(m_we), .waddr(m_waddr), .wdata(m_wdata),
    .re(m_re), .raddr(m_raddr), .rdata(m_rdata)
  );

endmodule
