// tb_sram_array: self-checking test of the cell array. Random multi-cell
// writes (random row and column select patterns) and single-row reads are
// checked against a reference array kept in the testbench; the stuck-at
// emulation is checked to override exactly one cell.
module tb_sram_array;
  localparam int unsigned RB = 4, CB = 5;
  localparam int unsigned ROWS = 1 << RB, COLS = 1 << CB;
  logic clk = 0, we = 0, din = 0;
  logic [ROWS-1:0] row_sel = '0;
  logic [COLS-1:0] col_sel = '0, sense;
  logic [RB-1:0] rd_row = '0, saf_row = '0;
  logic [CB-1:0] saf_col = '0;
  logic saf_en = 0, saf_val = 0;
  logic [COLS-1:0] refm [ROWS];
  int checks = 0, failures = 0;

  sram_array #(.ROW_BITS(RB), .COL_BITS(CB)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_row(int r);
    logic [COLS-1:0] exp;
    rd_row = RB'(r);
    #1;
    exp = refm[r];
    if (saf_en && saf_row == RB'(r)) exp[saf_col] = saf_val;
    checks++;
    if (sense !== exp) begin
      failures++;
      $display("FAIL row %0d sense=%h exp=%h", r, sense, exp);
    end
  endtask

  initial begin
    // clear everything with one fully selected write
    @(negedge clk); we = 1; din = 0; row_sel = '1; col_sel = '1;
    @(negedge clk); we = 0;
    for (int r = 0; r < ROWS; r++) refm[r] = '0;
    for (int r = 0; r < ROWS; r++) check_row(r);
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      we = 1; din = 1'($urandom);
      row_sel = (t % 3 == 0) ? (ROWS'(1) << ($urandom % ROWS)) : ROWS'($urandom);
      col_sel = (t % 5 == 0) ? (COLS'(1) << ($urandom % COLS)) : COLS'($urandom);
      for (int r = 0; r < ROWS; r++)
        if (row_sel[r]) refm[r] = (refm[r] & ~col_sel) | (col_sel & {COLS{din}});
      @(negedge clk); we = 0;
      saf_en = (t % 7 == 0); saf_row = RB'($urandom); saf_col = CB'($urandom); saf_val = 1'($urandom);
      check_row($urandom % ROWS);
      check_row(saf_row);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
