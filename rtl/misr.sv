// misr: multiple input signature register.
//
// Compacts the read data of the transparent test into a W-bit signature.
// Each enabled clock the register shifts one place towards its top bit,
// takes the feedback of an external-XOR (Fibonacci) LFSR into bit 0 and XORs the IW
// data inputs into its low bits. The feedback taps are those of the
// primitive polynomial x^16 + x^14 + x^13 + x^11 + 1 (taps at bits 15,
// 13, 12, 10); they are fixed for W = 16, the default. The choice of a
// MISR, its width and its polynomial belong to this design: the
// architecture only asks for some output compaction block.
//
// clr (synchronous) and rst_n (asynchronous) clear the signature; en
// clocks in din. Signature valid one clock after the last enabled cycle.
module misr #(
  parameter int unsigned W  = 16,         // signature bits
  parameter int unsigned IW = 8           // parallel data inputs, IW <= W
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clr,
  input  logic          en,
  input  logic [IW-1:0] din,
  output logic [W-1:0]  sig
);

  logic fb;

  assign fb = sig[W-1] ^ sig[W-3] ^ sig[W-4] ^ sig[W-6];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   sig <= '0;
    else if (clr) sig <= '0;
    else if (en)  sig <= {sig[W-2:0], fb} ^ W'(din);
  end

endmodule
