// tb_word_buffer: self-checking test of one 32-bit FIFO word.
//
// Writes random words under random write and read enables and compares the
// gated read output with a reference register: the stored word while re is
// high, all zeros while it is low.
module tb_word_buffer;
  localparam int W = 32;
  logic         clk = 1'b0, reset = 1'b0, we = 1'b0, re = 1'b0;
  logic [W-1:0] d = '0, q_rd, ref_q;
  int checks = 0, failures = 0;

  word_buffer #(.WIDTH(W)) dut (.clk, .reset, .we, .d, .re, .q_rd);

  always #5 clk = ~clk;

  task automatic check(input string what);
    logic [W-1:0] exp;
    exp = re ? ref_q : '0;
    checks++;
    if (q_rd !== exp) begin
      failures++;
      $display("FAIL %s: q_rd=%h expected %h", what, q_rd, exp);
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
    ref_q = '0;
    repeat (2) @(posedge clk);
    re = 1'b1;
    #1 check("after reset");
    reset = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      we = 1'($urandom_range(0, 1));
      d  = $urandom;
      re = ($urandom_range(0, 3) != 0);
      @(posedge clk);
      if (we) ref_q = d;
      #1 check("after edge");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
