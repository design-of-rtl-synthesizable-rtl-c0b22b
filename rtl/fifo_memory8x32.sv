// fifo_memory8x32: the FIFO's storage array, DEPTH words of WIDTH bits.
//
// Each word is a word_buffer built from 1-bit mem_cells. A write decoder
// turns `waddr` into one word write enable, but only while `wr` is high; a
// read decoder turns `raddr` into one word read enable. Because every cell
// that is not selected drives 0 on its read line, the read data is the OR
// of all the words' gated outputs. There is no RAM macro: the array is
// flip-flops with feedback multiplexers, as the design proposes.
//
// Interface and timing: a write of `wdata` to `waddr` happens on the rising
// edge of `clk` when `wr` is high. `rdata` is combinational: it shows the
// word at `raddr` in the same cycle, so a word written at one edge can be
// read in the next cycle. `reset` is active low and asynchronous and clears
// every cell. Port names and widths follow the memory's block symbol (3-bit
// addresses, 32-bit data).
module fifo_memory8x32 #(
  parameter int unsigned WIDTH  = fifo_pkg::FIFO_WIDTH,
  parameter int unsigned DEPTH  = fifo_pkg::FIFO_DEPTH,
  parameter int unsigned ADDR_W = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              reset,  // active low
  input  logic              wr,     // write enable
  input  logic [ADDR_W-1:0] waddr,
  input  logic [WIDTH-1:0]  wdata,
  input  logic [ADDR_W-1:0] raddr,
  output logic [WIDTH-1:0]  rdata
);
  localparam int unsigned NSEL = 2 ** ADDR_W;

  logic [NSEL-1:0]  wsel;
  logic [NSEL-1:0]  rsel;
  logic [WIDTH-1:0] word_q [DEPTH];

  addr_decoder #(.ADDR_W(ADDR_W)) u_wdec (.en(wr),   .addr(waddr), .sel(wsel));
  addr_decoder #(.ADDR_W(ADDR_W)) u_rdec (.en(1'b1), .addr(raddr), .sel(rsel));

  for (genvar w = 0; w < DEPTH; w++) begin : g_word
    word_buffer #(.WIDTH(WIDTH)) u_word (
      .clk  (clk),
      .reset(reset),
      .we   (wsel[w]),
      .d    (wdata),
      .re   (rsel[w]),
      .q_rd (word_q[w])
    );
  end

  // Wired-OR of the gated word outputs.
  always_comb begin
    rdata = '0;
    for (int w = 0; w < DEPTH; w++) rdata |= word_q[w];
  end
endmodule
