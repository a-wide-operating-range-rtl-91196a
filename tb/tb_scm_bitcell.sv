// Self-checking testbench of scm_bitcell.
//
// Drives random sequences of write enable, data and select and compares the
// cell output with a reference model of a level-sensitive latch followed by
// the select NAND: out is the stored bit when s is high and 1 when s is low.
// Checks transparency while ie is high, hold while ie is low, and the output
// with the cell both selected and deselected.
module tb_scm_bitcell;

  logic ie, d, s, out;
  logic model_q;
  int   checks   = 0;
  int   failures = 0;

  scm_bitcell dut (.ie, .d, .s, .out);

  task automatic check(input string what);
    logic exp;
    exp = s ? model_q : 1'b1;
    checks++;
    if (out !== exp) begin
      failures++;
      $display("FAIL %s: ie=%0b d=%0b s=%0b out=%0b expected %0b", what, ie, d, s, out, exp);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Write a 0 and a 1 and check both output polarities.
    for (int v = 0; v < 2; v++) begin
      ie = 1'b1; d = v[0]; s = 1'b1; model_q = v[0];
      #1 check("transparent write");
      ie = 1'b0;
      #1 check("hold after write");
      d = ~d;
      #1 check("hold with changed data");
      s = 1'b0;
      #1 check("deselected");
      s = 1'b1;
      #1 check("reselected");
    end
    // Random sequence.
    for (int i = 0; i < 2000; i++) begin
      ie = 1'($urandom);
      d  = 1'($urandom);
      s  = 1'($urandom);
      if (ie) model_q = d;
      #1 check("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
