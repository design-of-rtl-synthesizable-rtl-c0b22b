// tb_mem_cell: self-checking test of the 1-bit memory cell.
//
// Drives random write enable, data and read enable for many cycles and
// compares the read line with a one-bit reference that stores d when we is
// high. Also checks that reset clears the bit and that the read line is 0
// whenever re is low.
module tb_mem_cell;
  logic clk = 1'b0, reset = 1'b0, we = 1'b0, d = 1'b0, re = 1'b0;
  logic q_rd;
  logic ref_q;
  int checks = 0, failures = 0;

  mem_cell dut (.clk, .reset, .we, .d, .re, .q_rd);

  always #5 clk = ~clk;

  task automatic check(input logic exp, input string what);
    checks++;
    if (q_rd !== exp) begin
      failures++;
      $display("FAIL %s: q_rd=%0b expected %0b", what, q_rd, exp);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_q = 1'b0;
    repeat (2) @(posedge clk);
    #1 re = 1'b1;
    #1 check(1'b0, "after reset");
    reset = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      we = 1'($urandom_range(0, 1));
      d  = 1'($urandom_range(0, 1));
      re = 1'($urandom_range(0, 1));
      #1 check(re & ref_q, "before edge");
      @(posedge clk);
      if (we) ref_q = d;
      #1 check(re & ref_q, "after edge");
    end
    // Asynchronous reset clears a stored 1.
    @(negedge clk); we = 1'b1; d = 1'b1; re = 1'b1;
    @(posedge clk); #1 check(1'b1, "stored one");
    we = 1'b0; reset = 1'b0;
    #1 check(1'b0, "async reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
