// Standard-cell based memory (SCM): WORDS x WIDTH array of pass-latch bitcells.
//
// Every storage bit is an scm_bitcell, a latch with the first read-multiplexer
// stage built in; the write and read logic around the array is made of
// ordinary standard cells. The memory has one write port and one read port.
//
// Write: we, waddr and wdata are captured in flip-flops at the rising edge of
// clk. During the following low phase of clk the write enable (IE) of the
// addressed row is high, so that row's latches take the registered data; all
// other rows hold. The row enable is the AND of the inverted clock, the
// registered write strobe and the row decode, which changes only while clk is
// high, so it cannot glitch open a row.
//
// Read: raddr is captured at the rising edge of clk when re is high (it is
// held otherwise, so the read tree does not toggle). The address LSB drives the
// select S of every bitcell: even rows get ~raddr[0], odd rows raddr[0].
// AND-ing the two cells of a row pair therefore gives a 2:1 multiplexer whose
// first half is inside the cells. The remaining WORDS/2:1 multiplexer, made of
// standard cells, picks the pair with raddr[AW-1:1]. rdata is combinational
// from the address register: a read requested in cycle t is valid in cycle t+1
// and sampled by the reader at the end of it (one cycle of latency). A write
// in cycle t is visible to a read requested in cycle t or later.
//
// Contents are not reset (latches have no reset); the write registers are.
// The organisation (256 x 32), the latch bitcell with integrated first mux
// stage and the multiplexer read logic follow the chip; the port count, the
// clock-phase write scheme, the 2:1 first stage and the read latency are
// choices of this design.
//
// The latches come from the bitcells and are the storage of the memory.
module scm_memory #(
  parameter int unsigned WORDS = scm_pkg::SCM_WORDS,
  parameter int unsigned WIDTH = scm_pkg::SCM_WIDTH,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic             clk,
  input  logic             rst_n,
  // write port
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  // read port
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  if (WORDS < 2 || (WORDS & (WORDS - 1)) != 0) begin : g_bad_words
    $error("scm_memory: WORDS must be a power of two of at least 2");
  end

  localparam int unsigned PAIRS = WORDS / 2;

  // ---------------------------------------------------------------- write
  logic             we_q;
  logic [AW-1:0]    waddr_q;
  logic [WIDTH-1:0] wdata_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      we_q    <= 1'b0;
      waddr_q <= '0;
      wdata_q <= '0;
    end else begin
      we_q <= we;
      if (we) begin
        waddr_q <= waddr;
        wdata_q <= wdata;
      end
    end
  end

  logic [WORDS-1:0] row_ie;
  always_comb begin
    row_ie = '0;
    row_ie[waddr_q] = we_q & ~clk;
  end

  // ----------------------------------------------------------------- read
  logic [AW-1:0] raddr_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  raddr_q <= '0;
    else if (re) raddr_q <= raddr;
  end

  logic sel_odd;
  assign sel_odd = raddr_q[0];

  // ---------------------------------------------------------------- array
  logic [WIDTH-1:0] cell_out [WORDS];
  logic [WIDTH-1:0] pair_out [PAIRS];

  for (genvar r = 0; r < WORDS; r++) begin : g_row
    for (genvar b = 0; b < WIDTH; b++) begin : g_bit
      scm_bitcell u_cell (
        .ie  (row_ie[r]),
        .d   (wdata_q[b]),
        .s   ((r % 2 == 1) ? sel_odd : ~sel_odd),
        .out (cell_out[r][b])
      );
    end
  end

  // First multiplexer stage: completes the 2:1 selection started in the cells.
  for (genvar p = 0; p < PAIRS; p++) begin : g_pair
    assign pair_out[p] = cell_out[2*p] & cell_out[2*p+1];
  end

  // Remaining PAIRS:1 multiplexer tree.
  if (AW > 1) begin : g_tree
    assign rdata = pair_out[raddr_q[AW-1:1]];
  end else begin : g_single
    assign rdata = pair_out[0];
  end

endmodule
