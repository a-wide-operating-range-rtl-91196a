// Built-in self test of the memory: a March C- sequence.
//
// A pulse on start (while not busy) runs
//   any(w0); up(r0,w1); up(r1,w0); down(r0,w1); down(r1,w0); any(r0)
// over all WORDS addresses, with all-zero and all-one data words. That is 10
// operations per word, one per clock cycle, issued to the write or read port
// of the memory. Each read is compared in the following cycle, when the
// memory's read data is valid (one-cycle read latency); a mismatch sets fail
// and records the address of the first failing read in fail_addr.
//
// Timing: with start sampled high at clock edge E0, the operations occupy the
// 10*WORDS cycles after E0, one more cycle checks the last read, and done goes
// high at edge E0 + 10*WORDS + 1. busy is high from E0 until done. done and
// fail hold their value until the next start, which clears them.
//
// That the chip carries a BIST follows its description; the choice of the
// March C- algorithm, the data backgrounds and the handshake are this
// design's own.
module scm_bist #(
  parameter int unsigned WORDS = scm_pkg::SCM_WORDS,
  parameter int unsigned WIDTH = scm_pkg::SCM_WIDTH,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  output logic             busy,
  output logic             done,
  output logic             fail,
  output logic [AW-1:0]    fail_addr,
  // memory side
  output logic             mem_we,
  output logic [AW-1:0]    mem_waddr,
  output logic [WIDTH-1:0] mem_wdata,
  output logic             mem_re,
  output logic [AW-1:0]    mem_raddr,
  input  logic [WIDTH-1:0] mem_rdata
);
  import scm_pkg::*;

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_FLUSH, S_DONE} state_e;

  localparam logic [AW-1:0] ADDR_LAST = AW'(WORDS - 1);
  localparam int unsigned   EW        = $clog2(MARCH_ELEMS);

  state_e        state;
  logic [EW-1:0] elem;
  logic          second;     // executing op_b of a two-op element
  logic [AW-1:0] addr;

  march_elem_t   cur;
  march_op_e     op;
  logic          is_read, is_write, last_op, last_addr;

  // Expected word of the read issued in the previous cycle.
  logic          chk_valid;
  logic          chk_one;
  logic [AW-1:0] chk_addr;

  always_comb begin
    cur       = MARCH_C_MINUS[elem];
    op        = second ? cur.op_b : cur.op_a;
    is_read   = (state == S_RUN) && (op == MOP_R0 || op == MOP_R1);
    is_write  = (state == S_RUN) && (op == MOP_W0 || op == MOP_W1);
    last_op   = !cur.two_ops || second;
    last_addr = cur.down ? (addr == '0) : (addr == ADDR_LAST);
  end

  assign mem_we    = is_write;
  assign mem_waddr = addr;
  assign mem_wdata = {WIDTH{op == MOP_W1}};
  assign mem_re    = is_read;
  assign mem_raddr = addr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      elem      <= '0;
      second    <= 1'b0;
      addr      <= '0;
      chk_valid <= 1'b0;
      chk_one   <= 1'b0;
      chk_addr  <= '0;
      fail      <= 1'b0;
      fail_addr <= '0;
      done      <= 1'b0;
    end else begin
      chk_valid <= is_read;
      chk_one   <= (op == MOP_R1);
      chk_addr  <= addr;

      if (chk_valid && mem_rdata != {WIDTH{chk_one}}) begin
        if (!fail) fail_addr <= chk_addr;
        fail <= 1'b1;
      end

      unique case (state)
        S_IDLE, S_DONE: begin
          if (start) begin
            state     <= S_RUN;
            elem      <= '0;
            second    <= 1'b0;
            addr      <= MARCH_C_MINUS[0].down ? ADDR_LAST : '0;
            fail      <= 1'b0;
            fail_addr <= '0;
            done      <= 1'b0;
          end
        end
        S_RUN: begin
          if (!last_op) begin
            second <= 1'b1;
          end else begin
            second <= 1'b0;
            if (!last_addr) begin
              addr <= cur.down ? addr - 1'b1 : addr + 1'b1;
            end else if (elem == EW'(MARCH_ELEMS - 1)) begin
              state <= S_FLUSH;
            end else begin
              elem <= elem + 1'b1;
              addr <= MARCH_C_MINUS[elem + 1'b1].down ? ADDR_LAST : '0;
            end
          end
        end
        S_FLUSH: begin
          state <= S_DONE;
          done  <= 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state == S_RUN) || (state == S_FLUSH);

endmodule
