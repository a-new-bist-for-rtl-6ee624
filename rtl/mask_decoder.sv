// mask_decoder: address decoder with an address mask word.
//
// A plain 1-of-2^AW decoder, extended so that a 1 in mask bit n lets both
// values of address bit n select. With the mask at all zeros it is a normal
// decoder (exactly one output high); with m mask bits set, 2^m outputs are
// high at once, which is what lets the BIST write the same cell position in
// every basic march block in one cycle. The masking rule is the one the
// modified decoder is built to; its transistor-level form (a pair of
// complementary predecode lines per address bit, both forced active by the
// mask input) is not reproduced: here each output is simply the AND, over
// all bits, of "mask bit set or address bit matches the output index".
//
// Interface: addr and mask in, sel out; purely combinational.
module mask_decoder #(
  parameter int unsigned AW = 11          // address bits decoded
) (
  input  logic [AW-1:0]      addr,        // normal address word A
  input  logic [AW-1:0]      mask,        // mask address word M, 1 = don't care
  output logic [(1<<AW)-1:0] sel          // one select line per word or bit line
);

  for (genvar i = 0; i < (1 << AW); i++) begin : g_out
    localparam logic [AW-1:0] IDX = AW'(i);
    assign sel[i] = &(mask | ~(addr ^ IDX));
  end

endmodule
