// tb_fifo_memory8x32: self-checking test of the 8x32 memory array.
//
// After reset every word must read 0. Then random writes (random wr,
// address and data) and random read addresses are applied; an array
// model is updated on each write, and rdata is compared with the model's
// word at raddr both before the edge (combinational read) and after it
// (write visible in the next cycle).
module tb_fifo_memory8x32;
  localparam int W = 32, D = 8, AW = 3;
  logic          clk = 1'b0, reset = 1'b0, wr = 1'b0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [W-1:0]  wdata = '0, rdata;
  logic [W-1:0]  model [D];
  int checks = 0, failures = 0;

  fifo_memory8x32 #(.WIDTH(W), .DEPTH(D)) dut (.clk, .reset, .wr, .waddr, .wdata, .raddr, .rdata);

  always #5 clk = ~clk;

  task automatic check(input string what);
    checks++;
    if (rdata !== model[raddr]) begin
      failures++;
      $display("FAIL %s: raddr=%0d rdata=%h expected %h", what, raddr, rdata, model[raddr]);
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
    for (int i = 0; i < D; i++) model[i] = '0;
    repeat (2) @(posedge clk);
    for (int i = 0; i < D; i++) begin
      raddr = AW'(i);
      #1 check("after reset");
    end
    reset = 1'b1;
    // Fill every word with a distinct value, then read all back.
    for (int i = 0; i < D; i++) begin
      @(negedge clk);
      wr = 1'b1; waddr = AW'(i); wdata = 32'hA5000000 | 32'(i * 32'h01010101);
      @(posedge clk);
      model[i] = wdata;
    end
    @(negedge clk); wr = 1'b0;
    for (int i = 0; i < D; i++) begin
      raddr = AW'(i);
      #1 check("readback");
    end
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      wr    = 1'($urandom_range(0, 1));
      waddr = AW'($urandom_range(0, D - 1));
      wdata = $urandom;
      raddr = AW'($urandom_range(0, D - 1));
      #1 check("before edge");
      @(posedge clk);
      if (wr) model[waddr] = wdata;
      #1 check("after edge");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
