// Pass-transistor latch bitcell with integrated first read-multiplexer stage.
//
// The full-custom storage cell of the memory. Write: an NMOS pass device (M1)
// gated by IE connects D to the storage node while IE is high; a feedback
// device gated by IE (M2) closes the loop of two inverters (M3/M4, M5/M6)
// while IE is low, so the cell behaves as a level-sensitive latch that is
// transparent while IE is high and holds while IE is low. Read: a NAND gate
// (M7-M10) combines the inverted storage node with the select S, so that
//   out = stored bit  when s = 1,
//   out = 1           when s = 0.
// The cell therefore already acts as the first stage of the read multiplexer:
// AND-ing the outputs of cells whose selects are mutually exclusive picks the
// selected bit.
//
// Interface: ie (write enable, active high), d (write data), s (read select),
// out (NAND output). Timing: purely level sensitive; d must be stable around
// the falling edge of ie.
//
// The transistor structure, port names and the NAND follow the published cell.
// Which inverter output feeds the NAND was read from the schematic and sets
// the output polarity given above. The degraded '1' written through the NMOS
// pass device, and its compensation by body bias, are electrical effects and
// are not modelled.
//
// The latch inferred here is the storage element itself and is intended.
module scm_bitcell (
  input  logic ie,
  input  logic d,
  input  logic s,
  output logic out
);

  logic q;   // storage node behind M1
  logic qb;  // output of the first inverter, feeds the NAND

  always_latch begin
    if (ie) q = d;
  end

  assign qb  = ~q;
  assign out = ~(qb & s);

endmodule
