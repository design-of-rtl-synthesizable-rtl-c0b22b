// addr_decoder: binary address to one-hot select, with an enable.
//
// Output bit `addr` of `sel` is high while `en` is high; every other bit is
// low, and all bits are low while `en` is low. The memory uses one as its
// write decoder (enabled by the write strobe) and one as its read decoder
// (always enabled). The design calls for these decoders; the enable input
// is this design's way of folding the write strobe into the decode.
//
// Purely combinational.
module addr_decoder #(
  parameter int unsigned ADDR_W = fifo_pkg::FIFO_ADDR_W
) (
  input  logic                 en,
  input  logic [ADDR_W-1:0]    addr,
  output logic [2**ADDR_W-1:0] sel
);
  always_comb begin
    sel = '0;
    if (en) sel[addr] = 1'b1;
  end
endmodule
