// sram_array: bit-oriented SRAM cell array with its sense amplifiers and
// write drivers, seen from the row and column select lines.
//
// The array is 2^ROW_BITS word lines by 2^COL_BITS bit lines, one bit per
// cell. A write drives din into every cell whose word line and bit line are
// both selected, so a masked row and column decode writes many cells in the
// same clock edge. A read turns on the single word line given by rd_row
// (the BIST never masks row address bits on a read: only cells that share a
// word line can be sensed together) and presents every bit line of that row
// on sense; the column selects decide downstream which of them matter.
//
// For demonstrating the BIST the model can emulate one stuck-at cell
// (saf_en, saf_row, saf_col, saf_val): that cell reads as saf_val whatever
// was written. Tie saf_en low in a real use.
//
// Timing: writes take effect at the rising clock edge; the read path is
// combinational (sense is valid in the same cycle as rd_row). The array is
// written as a register array; a real part would be a full-custom macro.
// Generic synthesis of the default 4 Mbit instance as flip-flops needs
// tens of gigabytes; smaller instances synthesize directly.
module sram_array #(
  parameter int unsigned ROW_BITS = 11,   // log2 of the number of word lines
  parameter int unsigned COL_BITS = 11    // log2 of the number of bit lines
) (
  input  logic                      clk,
  input  logic                      we,         // write all selected cells
  input  logic                      din,        // value to write
  input  logic [(1<<ROW_BITS)-1:0]  row_sel,    // word-line selects (write)
  input  logic [(1<<COL_BITS)-1:0]  col_sel,    // bit-line selects (write)
  input  logic [ROW_BITS-1:0]       rd_row,     // word line to sense
  output logic [(1<<COL_BITS)-1:0]  sense,      // sense-amplifier outputs
  // single stuck-at cell emulation
  input  logic                      saf_en,
  input  logic [ROW_BITS-1:0]       saf_row,
  input  logic [COL_BITS-1:0]       saf_col,
  input  logic                      saf_val
);

  localparam int unsigned ROWS = 1 << ROW_BITS;
  localparam int unsigned COLS = 1 << COL_BITS;

  logic [COLS-1:0] cells [ROWS];
  logic [COLS-1:0] keep, setv;

  // shared by all word lines: bits left alone and bits forced by a write
  assign keep = ~col_sel;
  assign setv = col_sel & {COLS{din}};

  // every selected word line takes the selected bits of the write
  always_ff @(posedge clk) begin
    if (we) begin
      for (int r = 0; r < ROWS; r++) begin
        if (row_sel[r]) cells[r] <= (cells[r] & keep) | setv;
      end
    end
  end

  always_comb begin
    sense = cells[rd_row];
    if (saf_en && (saf_row == rd_row)) sense[saf_col] = saf_val;
  end

endmodule
