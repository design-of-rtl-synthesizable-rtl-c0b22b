// word_buffer: one FIFO word of WIDTH bits.
//
// WIDTH mem_cell instances share one write enable and one read enable, so
// a word is written and read as a unit. The read output is the stored word
// while `re` is high and all zeros otherwise.
//
// Interface and timing: `we`/`d` are taken on the rising edge of `clk`;
// `q_rd` is combinational in `re` and the stored word. `reset` is active low
// and asynchronous. Building the word from the 1-bit cell follows the
// design; the width default of 32 is the design's word length.
module word_buffer #(
  parameter int unsigned WIDTH = fifo_pkg::FIFO_WIDTH
) (
  input  logic             clk,
  input  logic             reset,  // active low
  input  logic             we,
  input  logic [WIDTH-1:0] d,
  input  logic             re,
  output logic [WIDTH-1:0] q_rd
);
  for (genvar b = 0; b < WIDTH; b++) begin : g_bit
    mem_cell u_cell (
      .clk  (clk),
      .reset(reset),
      .we   (we),
      .d    (d[b]),
      .re   (re),
      .q_rd (q_rd[b])
    );
  end
endmodule
