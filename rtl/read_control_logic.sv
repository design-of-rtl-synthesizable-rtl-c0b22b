// read_control_logic: the read side of the FIFO controller.
//
// It keeps the read pointer and the FIFO's output register. A read request
// `rinc` is accepted when the FIFO is not empty: on the rising edge the
// word the memory shows at `raddr` (the low ADDR_W bits of the pointer) is
// loaded into `rdata` and the pointer advances. Without an accepted read,
// `rdata` keeps the word read last, as the design requires. A request while
// empty is dropped.
//
// `rempty` is combinational: high when the read pointer equals the write
// pointer `wptr` in all ADDR_W+1 bits. A word written at one edge can thus be
// read at the next edge and appears on `rdata` after it (one cycle read
// latency). `reset` is active low and asynchronous and clears the pointer
// and `rdata`; clearing `rdata` is this design's choice.
module read_control_logic #(
  parameter int unsigned WIDTH  = fifo_pkg::FIFO_WIDTH,
  parameter int unsigned ADDR_W = fifo_pkg::FIFO_ADDR_W
) (
  input  logic              clk,
  input  logic              reset,     // active low
  input  logic              rinc,      // read request
  input  logic [ADDR_W:0]   wptr,      // write pointer, from the write side
  output logic [ADDR_W:0]   rptr,      // read pointer, to the write side
  output logic [ADDR_W-1:0] raddr,
  input  logic [WIDTH-1:0]  mem_rdata, // word at raddr
  output logic [WIDTH-1:0]  rdata,
  output logic              rempty
);
  logic rd;

  assign rempty = (rptr == wptr);
  assign rd     = rinc & ~rempty;
  assign raddr  = rptr[ADDR_W-1:0];

  always_ff @(posedge clk or negedge reset) begin
    if (!reset) begin
      rptr  <= '0;
      rdata <= '0;
    end else if (rd) begin
      rptr  <= rptr + 1'b1;
      rdata <= mem_rdata;
    end
  end
endmodule
