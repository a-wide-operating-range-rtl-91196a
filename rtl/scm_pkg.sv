// Shared constants and types of the standard-cell based memory (SCM) test chip.
//
// The default organisation, 256 words of 32 bits (8 kb), is the one of the
// prototype. The scan command encoding and the March C- element list used by
// the self test are choices of this design; they are not fixed by the chip
// description.
package scm_pkg;

  // Default organisation of the memory array.
  localparam int unsigned SCM_WORDS = 256;
  localparam int unsigned SCM_WIDTH = 32;

  // Command field of the scan chain.
  typedef enum logic [1:0] {
    SCAN_NOP   = 2'd0,
    SCAN_WRITE = 2'd1,
    SCAN_READ  = 2'd2
  } scan_cmd_e;
  localparam int unsigned SCAN_CMD_W = 2;

  // One operation of a March element.
  typedef enum logic [1:0] {
    MOP_W0 = 2'd0,   // write the all-zero word
    MOP_W1 = 2'd1,   // write the all-one word
    MOP_R0 = 2'd2,   // read, expect all zeros
    MOP_R1 = 2'd3    // read, expect all ones
  } march_op_e;

  // One March element: up to two operations on each address, in ascending
  // or descending address order.
  typedef struct packed {
    logic      down;     // 1: descending address order
    logic      two_ops;  // 1: op_a then op_b on each address
    march_op_e op_a;
    march_op_e op_b;
  } march_elem_t;

  // March C-: {any(w0); up(r0,w1); up(r1,w0); down(r0,w1); down(r1,w0); any(r0)}
  localparam int unsigned MARCH_ELEMS = 6;
  localparam march_elem_t MARCH_C_MINUS [MARCH_ELEMS] = '{
    '{down: 1'b0, two_ops: 1'b0, op_a: MOP_W0, op_b: MOP_W0},
    '{down: 1'b0, two_ops: 1'b1, op_a: MOP_R0, op_b: MOP_W1},
    '{down: 1'b0, two_ops: 1'b1, op_a: MOP_R1, op_b: MOP_W0},
    '{down: 1'b1, two_ops: 1'b1, op_a: MOP_R0, op_b: MOP_W1},
    '{down: 1'b1, two_ops: 1'b1, op_a: MOP_R1, op_b: MOP_W0},
    '{down: 1'b0, two_ops: 1'b0, op_a: MOP_R0, op_b: MOP_R0}
  };
  // Operations per address over the whole test (1+2+2+2+2+1).
  localparam int unsigned MARCH_OPS_PER_WORD = 10;

endpackage
