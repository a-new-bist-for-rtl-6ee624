// tb_table1_ops: operation counts of the parallel test for the memory and
// block sizes the architecture was evaluated at (N = 4M and 16M bits,
// k = 16K, 64K, 256K and 1M bits), plus the transparent test.
//
// Each configuration is a bist_ctrl instance facing a fault-free memory
// (Error Flag always high, all cells 0). The testbench counts parallel
// writes and word-line reads and checks
//   writes = 5k, reads = 5 sqrt(kN)       (total 5 sqrt(k) (sqrt(k) + sqrt(N)))
//   dummy reads in M6 = k, cycles = 1 + k + 5k(sqrt(N/k)+1) + 2,
// and prints the totals in millions next to 10N for serial March C-.
// A transparent run on a 64 Kbit array (k = 1K) must take exactly 14N
// operations: 5N prediction reads, 5N test reads and 4N write-backs (its
// pass/fail outcome is not checked here: the memory seen by these
// instances is constant and does not take the write-backs).
module tb_table1_ops;
  import bist_pkg::*;

  logic clk = 0, rst_n = 0, tm = 0;
  always #5 clk = ~clk;

  localparam int NCFG = 8;
  // {1/2 log2 N, 1/2 log2(N/k)}
  localparam int RBS [NCFG] = '{11, 11, 11, 11, 12, 12, 12, 12};
  localparam int BBS [NCFG] = '{ 4,  3,  2,  1,  5,  4,  3,  2};

  logic [NCFG-1:0] done_v;
  longint wr [NCFG], rd [NCFG], dm [NCFG], cyc [NCFG];
  int checks = 0, failures = 0;

  for (genvar i = 0; i < NCFG; i++) begin : g_cfg
    localparam int RB = RBS[i], BB = BBS[i];
    logic mem_we, mem_din, ref_en, ref_val, diag, fail, fault_valid, sig_fail;
    logic [RB-1:0] row_addr, row_mask;
    logic [RB-1:0] col_addr, col_mask;
    logic [2*RB-1:0] fault_addr;
    logic [15:0] fault_count, signature;
    march_el_e el;

    bist_ctrl #(.ROW_BITS(RB), .COL_BITS(RB), .BLK_BITS(BB)) u_ctrl (
      .clk, .rst_n, .tm, .transparent(1'b0), .grp_data('0), .error_flag_n(1'b1),
      .mem_we, .mem_din, .row_addr, .row_mask, .col_addr, .col_mask,
      .cmp_ref_en(ref_en), .cmp_ref_val(ref_val), .el, .diag, .done(done_v[i]),
      .fail, .fault_valid, .fault_addr, .fault_count, .sig_fail, .signature
    );

    always @(posedge clk) if (tm && !done_v[i]) begin
      cyc[i]++;
      if (mem_we) wr[i]++;
      else if (el inside {EL_M2, EL_M3, EL_M4, EL_M5, EL_M6}) begin
        if (row_mask == '0 && col_mask != '0) rd[i]++;
        else if (row_mask != '0) dm[i]++;
      end
    end
  end

  // transparent run, 256 x 256 cells, 8 x 8 blocks
  localparam int TRB = 8, TBB = 3;
  logic t_we, t_din, t_ref_en, t_ref_val, t_diag, t_done, t_fail, t_fv, t_sig_fail;
  logic [TRB-1:0] t_row, t_rmask, t_col, t_cmask;
  logic [2*TRB-1:0] t_fa;
  logic [15:0] t_fc, t_sig;
  march_el_e t_el;
  logic tm_t = 0;
  longint t_rd = 0, t_wr = 0;

  bist_ctrl #(.ROW_BITS(TRB), .COL_BITS(TRB), .BLK_BITS(TBB)) u_tctrl (
    .clk, .rst_n, .tm(tm_t), .transparent(1'b1), .grp_data('0), .error_flag_n(1'b1),
    .mem_we(t_we), .mem_din(t_din), .row_addr(t_row), .row_mask(t_rmask),
    .col_addr(t_col), .col_mask(t_cmask), .cmp_ref_en(t_ref_en), .cmp_ref_val(t_ref_val),
    .el(t_el), .diag(t_diag), .done(t_done), .fail(t_fail), .fault_valid(t_fv),
    .fault_addr(t_fa), .fault_count(t_fc), .sig_fail(t_sig_fail), .signature(t_sig)
  );

  always @(posedge clk) if (tm_t && !t_done) begin
    if (t_we) t_wr++;
    if (u_tctrl.misr_en) t_rd++;
  end

  initial begin
    repeat (40_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures);
    $finish;
  end

  initial begin
    longint n, k, r, sq;
    for (int i = 0; i < NCFG; i++) begin wr[i] = 0; rd[i] = 0; dm[i] = 0; cyc[i] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); tm = 1;
    wait (&done_v);
    @(negedge clk);
    for (int i = 0; i < NCFG; i++) begin
      n  = longint'(1) << (2 * RBS[i]);
      k  = longint'(1) << (2 * (RBS[i] - BBS[i]));
      r  = longint'(1) << BBS[i];
      sq = longint'(1) << (2 * RBS[i] - BBS[i]);      // sqrt(kN)
      $display("N=%0dM k=%0dK: writes=%0d reads=%0d total=%.2fM (March C- %.2fM) cycles=%0d",
               n >> 20, k >> 10, wr[i], rd[i], real'(wr[i] + rd[i]) / 1.0e6, real'(10 * n) / 1.0e6, cyc[i]);
      checks++; if (wr[i] != 5 * k)  begin failures++; $display("FAIL writes"); end
      checks++; if (rd[i] != 5 * sq) begin failures++; $display("FAIL reads"); end
      checks++; if (dm[i] != k)      begin failures++; $display("FAIL dummy reads %0d", dm[i]); end
      checks++; if (cyc[i] != 1 + k + 5 * k * (r + 1) + 2) begin failures++; $display("FAIL cycles"); end
    end
    // transparent
    @(negedge clk); tm_t = 1;
    wait (t_done);
    @(negedge clk);
    n = longint'(1) << (2 * TRB);
    $display("transparent N=%0d: reads=%0d writes=%0d total=%0d (14N = %0d)", n, t_rd, t_wr, t_rd + t_wr, 14 * n);
    checks++; if (t_rd != 10 * n || t_wr != 4 * n) begin failures++; $display("FAIL transparent count"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
