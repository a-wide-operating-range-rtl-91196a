// Scan-chain access port of the memory.
//
// A tester reaches the memory through one serial chain of
// SCAN_CMD_W + AW + WIDTH bits, laid out {cmd, addr, data} with data[0] at the
// scan_out end. While scan_en is high the chain shifts one bit per clock:
// scan_in enters at the cmd MSB and data[0] leaves first on scan_out.
// A one-cycle pulse on scan_update (with scan_en low) executes the command in
// the chain:
//   SCAN_WRITE  writes data to addr (mem_we high for that cycle),
//   SCAN_READ   reads addr (mem_re high for that cycle); at the next clock
//               edge the data field is overwritten with the word read, ready
//               to be shifted out,
//   SCAN_NOP    does nothing.
// The memory-side outputs are combinational from the chain and scan_update,
// and are sampled by the memory at the rising edge that ends the update cycle.
// The capture uses the one-cycle read latency of scm_memory.
//
// That the chip is tested through a scan chain follows its description; the
// chain layout, command encoding and update/capture protocol are this
// design's own.
module scm_scan_if #(
  parameter int unsigned WORDS = scm_pkg::SCM_WORDS,
  parameter int unsigned WIDTH = scm_pkg::SCM_WIDTH,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic             clk,
  input  logic             rst_n,
  // tester side
  input  logic             scan_en,
  input  logic             scan_in,
  input  logic             scan_update,
  output logic             scan_out,
  // memory side
  output logic             mem_we,
  output logic [AW-1:0]    mem_waddr,
  output logic [WIDTH-1:0] mem_wdata,
  output logic             mem_re,
  output logic [AW-1:0]    mem_raddr,
  input  logic [WIDTH-1:0] mem_rdata
);
  import scm_pkg::*;

  localparam int unsigned LEN = SCAN_CMD_W + AW + WIDTH;

  logic [LEN-1:0]   chain;
  logic             capture;
  scan_cmd_e        cmd;
  logic [AW-1:0]    addr;
  logic [WIDTH-1:0] data;

  assign cmd  = scan_cmd_e'(chain[LEN-1 -: SCAN_CMD_W]);
  assign addr = chain[WIDTH +: AW];
  assign data = chain[WIDTH-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      chain   <= '0;
      capture <= 1'b0;
    end else begin
      capture <= scan_update && (cmd == SCAN_READ);
      if (scan_en) begin
        chain <= {scan_in, chain[LEN-1:1]};
      end else if (capture) begin
        chain[WIDTH-1:0] <= mem_rdata;
      end
    end
  end

  assign scan_out  = chain[0];
  assign mem_we    = scan_update && (cmd == SCAN_WRITE);
  assign mem_waddr = addr;
  assign mem_wdata = data;
  assign mem_re    = scan_update && (cmd == SCAN_READ);
  assign mem_raddr = addr;

  // The chain must not shift while a command is executed or captured.
  a_no_shift_on_update: assert property (@(posedge clk) disable iff (!rst_n)
    !(scan_en && (scan_update || capture)));

endmodule
