// tb_read_control_logic: self-checking test of the read-side controller.
//
// The testbench plays the write side and the memory: it advances a write
// pointer at random while fewer than 8 words are stored, and answers each
// read address with a word from its own array, refreshed at every write.
// A reference queue gives the expected rempty, raddr and rdata; rdata must
// hold its value across cycles without an accepted read.
module tb_read_control_logic;
  localparam int W = 32, AW = 3, D = 8;
  logic          clk = 1'b0, reset = 1'b0, rinc = 1'b0;
  logic [AW:0]   wptr = '0, rptr;
  logic [AW-1:0] raddr;
  logic [W-1:0]  mem_rdata, rdata;
  logic          rempty;
  logic [W-1:0]  mem [D];
  logic [W-1:0]  ref_rdata;
  int level = 0, ref_rp = 0;
  int checks = 0, failures = 0, n_empty_req = 0, n_reads = 0;

  read_control_logic #(.WIDTH(W), .ADDR_W(AW)) dut (.clk, .reset, .rinc, .wptr, .rptr, .raddr,
                                                    .mem_rdata, .rdata, .rempty);

  always #5 clk = ~clk;
  assign mem_rdata = mem[raddr];

  task automatic expect_eq(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h (level %0d)", what, got, exp, level);
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
    for (int i = 0; i < D; i++) mem[i] = '0;
    ref_rdata = '0;
    repeat (2) @(posedge clk);
    #1 expect_eq(longint'(rdata), longint'(0), "rdata after reset");
    reset = 1'b1;
    for (int i = 0; i < 4000; i++) begin
      bit wr_now;
      @(negedge clk);
      rinc   = 1'($urandom_range(0, 1));
      wr_now = (level < D) && ($urandom_range(0, 1) == 1);
      #1;
      expect_eq(longint'(rempty), longint'(level == 0), "rempty");
      expect_eq(longint'(raddr), longint'(int'(ref_rp % D)), "raddr");
      if (rinc && level == 0) n_empty_req++;
      @(posedge clk);
      #1;
      if (rinc && level > 0) begin
        ref_rdata = mem[ref_rp % D];
        ref_rp = (ref_rp + 1) % (2 * D);
        level--;
        n_reads++;
      end
      if (wr_now) begin
        mem[wptr[AW-1:0]] = $urandom;
        wptr = wptr + 1'b1;
        level++;
      end
      expect_eq(longint'(rdata), longint'(ref_rdata), "rdata");
      expect_eq(longint'(rptr), longint'(ref_rp), "rptr");
    end
    expect_eq(longint'(n_empty_req > 0), longint'(1), "read while empty seen");
    $display("reads %0d, reads refused while empty %0d", n_reads, n_empty_req);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
