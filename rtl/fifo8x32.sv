// fifo8x32: synchronous FIFO, 8 words of 32 bits, one clock.
//
// Three parts on one clock: the write control logic (write pointer, the
// memory write strobe and address, the full and almost-full flags), the
// memory array fifo_memory8x32 (flip-flop cells with feedback multiplexers
// and AND-gated read lines) and the read control logic (read pointer, the
// output register and the empty flag). The two control blocks exchange
// their pointers to work out the flags.
//
// Interface and timing, all on the rising edge of `clk`:
//  - `winc` with `wdata` writes a word unless `wfull` is high.
//  - `rinc` loads the oldest word into `rdata` unless `rempty` is high;
//    otherwise `rdata` holds the last word read.
//  - Writing and reading in the same cycle is allowed.
//  - `almostFull` is high when at most one location is free; `wfull` when
//    none is; `rempty` when no word is stored. The flags are combinational
//    from the pointers and change right after the edge that moves them.
//  - `reset` is active low and asynchronous; it empties the FIFO and clears
//    the memory and `rdata`.
// Port names follow the FIFO's block symbol. The pointer scheme, the
// reset polarity and the flag timing are this design's own choices.
module fifo8x32 #(
  parameter int unsigned WIDTH  = fifo_pkg::FIFO_WIDTH,
  parameter int unsigned ADDR_W = fifo_pkg::FIFO_ADDR_W
) (
  input  logic             clk,
  input  logic             reset,  // active low
  input  logic             winc,
  input  logic [WIDTH-1:0] wdata,
  input  logic             rinc,
  output logic [WIDTH-1:0] rdata,
  output logic             almostFull,
  output logic             wfull,
  output logic             rempty
);
  localparam int unsigned DEPTH = 2 ** ADDR_W;

  logic [ADDR_W:0]   wptr, rptr;
  logic              wr;
  logic [ADDR_W-1:0] waddr, raddr;
  logic [WIDTH-1:0]  mem_rdata;

  write_control_logic #(.ADDR_W(ADDR_W)) u_wctl (
    .clk        (clk),
    .reset      (reset),
    .winc       (winc),
    .rptr       (rptr),
    .wptr       (wptr),
    .wr         (wr),
    .waddr      (waddr),
    .wfull      (wfull),
    .almost_full(almostFull)
  );

  fifo_memory8x32 #(.WIDTH(WIDTH), .DEPTH(DEPTH), .ADDR_W(ADDR_W)) u_mem (
    .clk  (clk),
    .reset(reset),
    .wr   (wr),
    .waddr(waddr),
    .wdata(wdata),
    .raddr(raddr),
    .rdata(mem_rdata)
  );

  read_control_logic #(.WIDTH(WIDTH), .ADDR_W(ADDR_W)) u_rctl (
    .clk      (clk),
    .reset    (reset),
    .rinc     (rinc),
    .wptr     (wptr),
    .rptr     (rptr),
    .raddr    (raddr),
    .mem_rdata(mem_rdata),
    .rdata    (rdata),
    .rempty   (rempty)
  );

  // The fill level never exceeds the depth, and full and empty exclude
  // each other.
  a_level: assert property (@(posedge clk) disable iff (!reset)
                            (ADDR_W+1)'(wptr - rptr) <= (ADDR_W+1)'(DEPTH));
  a_flags: assert property (@(posedge clk) disable iff (!reset)
                            !(wfull && rempty));
endmodule
