// write_control_logic: the write side of the FIFO controller.
//
// It keeps the write pointer. A write request `winc` is accepted when the
// FIFO is not full: the memory write strobe `wr` is raised, `waddr` is the
// low ADDR_W bits of the pointer, and the pointer advances on the rising
// edge. A request while full is dropped, so no data is overwritten.
//
// Flags, both combinational from the two pointers: `wfull` is high when all
// 2**ADDR_W locations hold unread data; `almost_full` is high when at most
// one location is left to write, so it rises one write before `wfull` and
// stays high while full. The fill level is the difference of the write
// pointer and the read pointer `rptr`, each one bit wider than the address;
// this pointer scheme is this design's own choice.
//
// `reset` is active low and asynchronous and empties the FIFO.
module write_control_logic #(
  parameter int unsigned ADDR_W = fifo_pkg::FIFO_ADDR_W
) (
  input  logic              clk,
  input  logic              reset,   // active low
  input  logic              winc,    // write request
  input  logic [ADDR_W:0]   rptr,    // read pointer, from the read side
  output logic [ADDR_W:0]   wptr,    // write pointer, to the read side
  output logic              wr,      // memory write strobe
  output logic [ADDR_W-1:0] waddr,
  output logic              wfull,
  output logic              almost_full
);
  localparam logic [ADDR_W:0] DEPTH = (ADDR_W+1)'(2 ** ADDR_W);

  logic [ADDR_W:0] level;

  assign level       = wptr - rptr;
  assign wfull       = (level == DEPTH);
  assign almost_full = (level >= DEPTH - 1'b1);
  assign wr          = winc & ~wfull;
  assign waddr       = wptr[ADDR_W-1:0];

  always_ff @(posedge clk or negedge reset) begin
    if (!reset)  wptr <= '0;
    else if (wr) wptr <= wptr + 1'b1;
  end
endmodule
