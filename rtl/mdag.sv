// mdag: Masked Row Address Generator.
//
// A (BW + 1)-bit synchronous up/down counter, BW = 1/2 log2(N/k). Its low
// BW bits are the block-row address: the row address bits that are masked
// for a parallel write but must be stepped through on reads, because only
// the cells on one word line can be sensed together. The top bit C is the
// carry (or borrow) out of that field and tells the BIST control that all
// block rows of the current cell position have been read.
//
// Controls, in priority order, sampled at the rising clock edge:
//   reset : all bits to 0 (start of an upward read group)
//   set   : C to 0 and the address to all ones (start of a downward group)
//   up    : +1
//   dn    : -1
// rst_n is an asynchronous reset to 0.
module mdag #(
  parameter int unsigned BW = 3           // block-row address bits
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          up,               // MdAG_Up
  input  logic          dn,               // MdAG_Dn
  input  logic          set,
  input  logic          reset,
  output logic          c,                // C: group finished
  output logic [BW-1:0] raddr             // masked row address
);

  logic [BW:0] q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     q <= '0;
    else if (reset) q <= '0;
    else if (set)   q <= {1'b0, {BW{1'b1}}};
    else if (up)    q <= q + 1'b1;
    else if (dn)    q <= q - 1'b1;
  end

  assign {c, raddr} = q;

endmodule
