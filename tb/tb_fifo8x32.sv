// tb_fifo8x32: end-to-end test of the 8x32 synchronous FIFO at its default
// size.
//
// A reference queue models the FIFO. Every cycle the testbench sets winc,
// wdata and rinc before the rising edge, checks the flags against the
// queue's fill level (almostFull at 7 or more words, wfull at 8, rempty at
// 0), and after the edge checks rdata: the popped word after an accepted
// read, the previous value otherwise.
//
// Phases: reset values; a directed run that writes an incrementing count
// until the FIFO is full (with extra writes that must be dropped), then reads
// it all back and reads once more while empty; a one-cycle read latency
// check; long random traffic with changing read/write mixes; a reset in the
// middle of traffic. Each mechanism (full, almost full, empty, dropped write,
// dropped read, simultaneous read and write, pointer wrap, reset while busy)
// is counted and must occur at least once.
module tb_fifo8x32;
  localparam int W = 32, D = 8;
  logic         clk = 1'b0, reset = 1'b0, winc = 1'b0, rinc = 1'b0;
  logic [W-1:0] wdata = '0, rdata;
  logic         almostFull, wfull, rempty;

  logic [W-1:0] q[$];
  logic [W-1:0] ref_rdata;
  int checks = 0, failures = 0;
  int n_full = 0, n_almost = 0, n_empty = 0, n_wdrop = 0, n_rdrop = 0;
  int n_both = 0, n_wrap = 0, n_reset_busy = 0, n_writes = 0;

  fifo8x32 dut (.clk, .reset, .winc, .wdata, .rinc, .rdata, .almostFull, .wfull, .rempty);

  always #5 clk = ~clk;

  task automatic expect_eq(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h (level %0d) at %0t", what, got, exp, q.size(), $time);
    end
  endtask

  // One clock cycle: apply the request at the falling edge, check the flags,
  // let the rising edge act, update the model and check rdata.
  task automatic cycle(input bit w, input logic [W-1:0] data, input bit r);
    bit acc_w, acc_r;
    @(negedge clk);
    winc = w; wdata = data; rinc = r;
    #1;
    expect_eq(longint'(wfull), longint'(q.size() == D), "wfull");
    expect_eq(longint'(almostFull), longint'(q.size() >= D - 1), "almostFull");
    expect_eq(longint'(rempty), longint'(q.size() == 0), "rempty");
    if (q.size() == D) n_full++;
    if (q.size() == D - 1) n_almost++;
    if (q.size() == 0) n_empty++;
    acc_w = w && q.size() < D;
    acc_r = r && q.size() > 0;
    if (w && !acc_w) n_wdrop++;
    if (r && !acc_r) n_rdrop++;
    if (acc_w && acc_r) n_both++;
    @(posedge clk);
    if (acc_r) ref_rdata = q.pop_front();
    if (acc_w) begin
      q.push_back(data);
      n_writes++;
      if (n_writes % D == 0) n_wrap++;
    end
    #1 expect_eq(longint'(rdata), longint'(ref_rdata), "rdata");
  endtask

  task automatic do_reset();
    @(negedge clk);
    winc = 1'b0; rinc = 1'b0;
    reset = 1'b0;
    #1;
    q.delete();
    ref_rdata = '0;
    expect_eq(longint'(rdata), longint'(0), "rdata in reset");
    expect_eq(longint'(rempty), longint'(1), "rempty in reset");
    expect_eq(longint'(wfull), longint'(0), "wfull in reset");
    expect_eq(longint'(almostFull), longint'(0), "almostFull in reset");
    @(negedge clk);
    reset = 1'b1;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat;
    ref_rdata = '0;
    do_reset();

    // Directed: fill with an incrementing count, overfill, drain, overdrain.
    for (int i = 0; i < D + 3; i++) cycle(1'b1, W'(i), 1'b0);
    expect_eq(longint'(q.size()), longint'(D), "filled to depth");
    for (int i = 0; i < D + 2; i++) cycle(1'b0, '0, 1'b1);
    expect_eq(longint'(ref_rdata), longint'(int'(D - 1)), "last word of the count");

    // Read latency: a word written at one edge is read at the next and is on
    // rdata right after it.
    cycle(1'b1, 32'hCAFE_0001, 1'b0);
    lat = 0;
    @(negedge clk);
    winc = 1'b0; rinc = 1'b1;
    #1 expect_eq(longint'(rempty), longint'(0), "not empty one cycle after write");
    while (rdata != 32'hCAFE_0001 && lat < 10) begin
      @(posedge clk); #1 lat++;
    end
    q.delete();
    ref_rdata = 32'hCAFE_0001;
    n_writes++;
    expect_eq(longint'(lat), longint'(1), "read latency in cycles");

    // Random traffic, changing the balance between writes and reads.
    for (int blk = 0; blk < 40; blk++) begin
      int pw, pr;
      pw = $urandom_range(20, 95);
      pr = $urandom_range(20, 95);
      for (int i = 0; i < 100; i++)
        cycle($urandom_range(0, 99) < pw, $urandom, $urandom_range(0, 99) < pr);
    end

    // Reset while the FIFO holds data.
    for (int i = 0; i < 5; i++) cycle(1'b1, $urandom, 1'b0);
    if (q.size() > 0) n_reset_busy++;
    do_reset();
    for (int i = 0; i < 300; i++)
      cycle(1'($urandom_range(0, 1)), $urandom, 1'($urandom_range(0, 1)));

    $display("full %0d, almost full %0d, empty %0d, dropped writes %0d, dropped reads %0d",
             n_full, n_almost, n_empty, n_wdrop, n_rdrop);
    $display("read+write %0d, pointer wraps %0d, reset while busy %0d",
             n_both, n_wrap, n_reset_busy);
    expect_eq(longint'(n_full > 0), longint'(1), "full seen");
    expect_eq(longint'(n_almost > 0), longint'(1), "almost full seen");
    expect_eq(longint'(n_empty > 0), longint'(1), "empty seen");
    expect_eq(longint'(n_wdrop > 0), longint'(1), "dropped write seen");
    expect_eq(longint'(n_rdrop > 0), longint'(1), "dropped read seen");
    expect_eq(longint'(n_both > 0), longint'(1), "simultaneous read and write seen");
    expect_eq(longint'(n_wrap > 0), longint'(1), "pointer wrap seen");
    expect_eq(longint'(n_reset_busy > 0), longint'(1), "reset while busy seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
