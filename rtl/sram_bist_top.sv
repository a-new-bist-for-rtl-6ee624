// sram_bist_top: bit-oriented SRAM with a parallel, diagnosing and
// transparent built-in self test.
//
// Datapath: the row and column address decoders are masked decoders, so one
// access can select the same cell position in many basic march blocks at
// once. The cell array senses one word line; the parallel comparator checks
// that the selected bit lines agree. bist_ctrl (with its two address
// counters BMBAG and MdAG and a MISR) sequences March C- or its transparent
// form and locates faulty cells.
//
// Modes:
//   tm = 0 : normal memory. addr = {row, column}; we writes din into that
//            one cell at the clock edge; dout shows the addressed cell
//            combinationally.
//   tm = 1 : self test. transparent (sampled as tm rises) selects the
//            transparent test (contents preserved, pass/fail through the
//            signatures, sig_fail) over the non-transparent one (contents
//            destroyed, every located fault reported on fault_addr with a
//            fault_valid pulse). done rises at the end and stays until tm
//            falls; fail is high if anything was found.
//
// saf_* make one cell stuck at saf_val, to exercise the test; tie saf_en
// low otherwise. Default sizes: N = 4 Mbit (2048 x 2048) and k = 64 Kbit
// basic march blocks, i.e. 8 x 8 = 64 blocks, the example configuration
// of the architecture.
module sram_bist_top
  import bist_pkg::*;
#(
  parameter int unsigned ROW_BITS = 11,   // 1/2 log2 N
  parameter int unsigned COL_BITS = 11,   // 1/2 log2 N
  parameter int unsigned BLK_BITS = 3,    // 1/2 log2(N/k)
  parameter int unsigned MISR_W   = 16
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // normal access
  input  logic [ROW_BITS+COL_BITS-1:0] addr,
  input  logic                         we,
  input  logic                         din,
  output logic                         dout,
  // test
  input  logic                         tm,            // TM
  input  logic                         transparent,
  output logic                         done,
  output logic                         fail,
  output logic                         fault_valid,
  output logic [ROW_BITS+COL_BITS-1:0] fault_addr,
  output logic [15:0]                  fault_count,
  output logic                         sig_fail,
  output logic [MISR_W-1:0]            signature,
  output logic                         error_flag_n,  // Error Flag
  output march_el_e                    el,
  output logic                         diag,
  // stuck-at cell emulation
  input  logic                         saf_en,
  input  logic [ROW_BITS-1:0]          saf_row,
  input  logic [COL_BITS-1:0]          saf_col,
  input  logic                         saf_val
);

  localparam int unsigned CIB = COL_BITS - BLK_BITS;
  localparam int unsigned NB  = 1 << BLK_BITS;

  // BIST side of the memory port
  logic                t_we, t_din, t_ref_en, t_ref_val;
  logic [ROW_BITS-1:0] t_row, t_row_mask;
  logic [COL_BITS-1:0] t_col, t_col_mask;
  logic [NB-1:0]       grp_data;

  // memory port after the mode multiplexer
  logic                m_we, m_din;
  logic [ROW_BITS-1:0] m_row, m_row_mask;
  logic [COL_BITS-1:0] m_col, m_col_mask;
  logic [(1<<ROW_BITS)-1:0] row_sel;
  logic [(1<<COL_BITS)-1:0] col_sel, sense;

  always_comb begin
    if (tm) begin
      m_we = t_we; m_din = t_din;
      m_row = t_row; m_row_mask = t_row_mask;
      m_col = t_col; m_col_mask = t_col_mask;
    end else begin
      m_we = we;   m_din = din;
      {m_row, m_col} = addr;
      m_row_mask = '0; m_col_mask = '0;
    end
  end

  mask_decoder #(.AW(ROW_BITS)) u_row_dec (.addr(m_row), .mask(m_row_mask), .sel(row_sel));
  mask_decoder #(.AW(COL_BITS)) u_col_dec (.addr(m_col), .mask(m_col_mask), .sel(col_sel));

  sram_array #(.ROW_BITS(ROW_BITS), .COL_BITS(COL_BITS)) u_array (
    .clk, .we(m_we), .din(m_din), .row_sel, .col_sel, .rd_row(m_row), .sense,
    .saf_en, .saf_row, .saf_col, .saf_val
  );

  parallel_comparator #(.WIDTH(1 << COL_BITS)) u_cmp (
    .sense, .sel(col_sel), .wr_n(!m_we), .ref_en(t_ref_en && tm),
    .ref_val(t_ref_val), .error_flag_n
  );

  // the cell at the current in-block column of every block column
  for (genvar g = 0; g < NB; g++) begin : g_grp
    assign grp_data[g] = sense[{BLK_BITS'(g), t_col[CIB-1:0]}];
  end

  assign dout = sense[m_col];

  bist_ctrl #(
    .ROW_BITS(ROW_BITS), .COL_BITS(COL_BITS), .BLK_BITS(BLK_BITS), .MISR_W(MISR_W)
  ) u_bist (
    .clk, .rst_n, .tm, .transparent, .grp_data, .error_flag_n,
    .mem_we(t_we), .mem_din(t_din), .row_addr(t_row), .row_mask(t_row_mask),
    .col_addr(t_col), .col_mask(t_col_mask), .cmp_ref_en(t_ref_en),
    .cmp_ref_val(t_ref_val), .el, .diag, .done, .fail, .fault_valid,
    .fault_addr, .fault_count, .sig_fail, .signature
  );

endmodule
