// mem_cell: one bit of FIFO storage.
//
// A D flip-flop holds the bit. A 2:1 multiplexer in front of it closes a
// feedback loop from Q back to D while the write enable is low, so the cell
// holds its value, and passes the write-data bit while the write enable is
// high. A 2-input AND gate puts Q on the read line only while the read
// enable is high; elsewhere the read line is 0, so the read lines of many
// cells can be ORed together. This is the cell structure the design is built
// around (flip-flop, mux and AND gate).
//
// Interface and timing: `we` and `d` are sampled on the rising edge of `clk`;
// `q_rd` follows `re` and the stored bit combinationally. `reset` is active
// low and asynchronous and clears the bit; the polarity and the clearing of
// the storage are this design's choices (see the README).
module mem_cell (
  input  logic clk,
  input  logic reset,  // active low
  input  logic we,     // write enable from the write decoder
  input  logic d,      // write data bit
  input  logic re,     // read enable from the read decoder
  output logic q_rd    // stored bit gated by re
);
  logic q;
  logic d_mux;

  // Feedback multiplexer: hold unless written.
  assign d_mux = we ? d : q;

  always_ff @(posedge clk or negedge reset) begin
    if (!reset) q <= 1'b0;
    else        q <= d_mux;
  end

  // Read AND gate.
  assign q_rd = q & re;
endmodule
