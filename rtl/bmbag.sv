// bmbag: Basic March Block Address Generator.
//
// A (log2 k + 3)-bit synchronous up/down counter. Its low AW bits are the
// address of a cell inside a basic march block (the same position is
// accessed in every block at once); the three bits above them, from the top
// U/D, A and B, carry out of the address field and so record how many
// full sweeps of the block have been made. The BIST control decodes them
// into the march element that is running and the counting direction.
//
// Controls, in priority order, sampled at the rising clock edge:
//   reset : all bits to 0 (start of a test)
//   set   : all bits to 1 (start of the downward sweeps)
//   up    : +1
//   dn    : -1
// rst_n is an asynchronous reset to 0.
module bmbag #(
  parameter int unsigned AW = 16          // log2 k, bits of the in-block address
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          up,               // BMBAG_Up
  input  logic          dn,               // BMBAG_Dn
  input  logic          set,
  input  logic          reset,
  output logic          ud,               // U/D control bit
  output logic          a,                // A control bit
  output logic          b,                // B control bit
  output logic [AW-1:0] addr              // march block address
);

  logic [AW+2:0] q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     q <= '0;
    else if (reset) q <= '0;
    else if (set)   q <= '1;
    else if (up)    q <= q + 1'b1;
    else if (dn)    q <= q - 1'b1;
  end

  assign {ud, a, b, addr} = q;

endmodule
