// tb_write_control_logic: self-checking test of the write-side controller.
//
// The testbench plays the read side: it holds a read pointer and advances
// it at random while the FIFO is not empty. Random write requests are
// applied. A reference fill level gives the expected wr, waddr, wfull and
// almost_full (high at 7 or 8 stored words of 8) each cycle.
module tb_write_control_logic;
  localparam int AW = 3, D = 8;
  logic          clk = 1'b0, reset = 1'b0, winc = 1'b0;
  logic [AW:0]   rptr = '0, wptr;
  logic          wr, wfull, almost_full;
  logic [AW-1:0] waddr;
  int level = 0, ref_wp = 0;
  int checks = 0, failures = 0, n_full = 0, n_almost = 0, n_blocked = 0;

  write_control_logic #(.ADDR_W(AW)) dut (.clk, .reset, .winc, .rptr, .wptr, .wr, .waddr,
                                          .wfull, .almost_full);

  always #5 clk = ~clk;

  task automatic expect_eq(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d (level %0d)", what, got, exp, level);
    end
  endtask

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 expect_eq(int'(wptr), 0, "wptr after reset");
    reset = 1'b1;
    for (int i = 0; i < 4000; i++) begin
      bit rd_now;
      @(negedge clk);
      // Bias toward writes in the first half (reach full), reads later.
      winc   = (i < 2000) ? ($urandom_range(0, 3) != 0) : ($urandom_range(0, 3) == 0);
      rd_now = (level > 0) && ((i < 2000) ? ($urandom_range(0, 3) == 0)
                                          : ($urandom_range(0, 3) != 0));
      #1;
      expect_eq(int'(wfull), int'(level == D), "wfull");
      expect_eq(int'(almost_full), int'(level >= D - 1), "almost_full");
      expect_eq(int'(wr), int'(winc && level < D), "wr");
      expect_eq(int'(waddr), ref_wp % D, "waddr");
      if (level == D) n_full++;
      if (level == D - 1) n_almost++;
      if (winc && level == D) n_blocked++;
      @(posedge clk);
      #1;
      if (winc && level < D) begin level++; ref_wp = (ref_wp + 1) % (2 * D); end
      if (rd_now) begin level--; rptr = rptr + 1'b1; end
      expect_eq(int'(wptr), ref_wp, "wptr");
    end
    expect_eq(int'(n_full > 0), 1, "full reached");
    expect_eq(int'(n_almost > 0), 1, "almost full reached");
    expect_eq(int'(n_blocked > 0), 1, "write while full seen");
    $display("full cycles %0d, almost-full cycles %0d, blocked writes %0d", n_full, n_almost, n_blocked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
