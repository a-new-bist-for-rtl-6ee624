// bist_ctrl: BIST control logic of the parallel SRAM test.
//
// The array of N = 2^(ROW_BITS+COL_BITS) cells is seen as N/k basic march
// blocks of k cells, sqrt(N/k) blocks down and across. The upper BLK_BITS
// bits of the row and of the column address number the block; the lower
// bits are the position inside it. Every block runs the same march at the
// same time:
//
// * Non-transparent test (fabrication test), March C-. A write masks all
//   block bits of row and column, so the same position of every block is
//   written in one cycle. A read masks only the column block bits: it senses
//   the sqrt(N/k) cells of one word line and the parallel comparator checks
//   that they agree. The block-row bits of a read come from the MdAG
//   counter, which steps through all sqrt(N/k) block rows before each write.
// * Fault location. When the comparator flags a read, the counters hold and
//   the column block address is found by halving: one more column block bit
//   is unmasked per cycle (its value 0 selects the lower half) and the
//   selected cells are compared with the value the march expects there. If
//   they disagree the faulty cell is in that half, otherwise in the other.
//   After BLK_BITS cycles the full cell address is reported on fault_addr
//   with a one-cycle fault_valid pulse and the march goes on.
// * Transparent test (periodic test), transparent March C-. Column block
//   bits are never masked, so each cell is read and written on its own: it
//   is read, the value goes into the MISR, and the complement of what was
//   read is written back. A first, read-only pass (signature prediction)
//   feeds the MISR with what the test pass should read, the data of the
//   elements that expect the complement being inverted. The test pass then
//   has to produce the same signature; the cells end with their initial
//   content. Cells are visited block position by block position (BMBAG),
//   and within a position block row by block row (MdAG) and block column by
//   block column (a small counter of this design).
//
// The running element is decoded from the control bits U/D, A, B of BMBAG
// (see bist_pkg::decode_el). At U/D,A,B,C = 0110 (0100 in transparent mode,
// which has no initial write element) one cycle sets both counters for the
// downward sweeps. In M6 the write slot becomes a dummy read.
//
// Timing, non-transparent: k cycles for M1, k*(sqrt(N/k)+1) for each of
// M2..M6, one for the set stage, one at the end, plus BLK_BITS per fault
// located. done rises and stays high until tm falls. tm low holds
// everything in reset; mode (transparent) is sampled when tm rises.
// Memory outputs are combinational from the counters and state and are
// meant to drive the masked decoders directly.
module bist_ctrl
  import bist_pkg::*;
#(
  parameter int unsigned ROW_BITS = 11,   // word-line address bits, 1/2 log2 N
  parameter int unsigned COL_BITS = 11,   // bit-line address bits, 1/2 log2 N
  parameter int unsigned BLK_BITS = 3,    // 1/2 log2(N/k), block-row / block-column bits
  parameter int unsigned MISR_W   = 16    // signature bits
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         tm,            // test mode
  input  logic                         transparent,   // 1 = transparent test
  // memory side
  input  logic [(1<<BLK_BITS)-1:0]     grp_data,      // sensed cell of each block column at the current position
  input  logic                         error_flag_n,  // parallel comparator
  output logic                         mem_we,
  output logic                         mem_din,
  output logic [ROW_BITS-1:0]          row_addr,
  output logic [ROW_BITS-1:0]          row_mask,
  output logic [COL_BITS-1:0]          col_addr,
  output logic [COL_BITS-1:0]          col_mask,
  output logic                         cmp_ref_en,
  output logic                         cmp_ref_val,
  // status
  output march_el_e                    el,            // element being run
  output logic                         diag,          // locating a fault
  output logic                         done,
  output logic                         fail,          // a fault was seen (sticky)
  output logic                         fault_valid,   // fault_addr holds a new located cell
  output logic [ROW_BITS+COL_BITS-1:0] fault_addr,
  output logic [15:0]                  fault_count,
  output logic                         sig_fail,      // transparent signatures differ
  output logic [MISR_W-1:0]            signature
);

  localparam int unsigned RIB = ROW_BITS - BLK_BITS;   // in-block row bits
  localparam int unsigned CIB = COL_BITS - BLK_BITS;   // in-block column bits
  localparam int unsigned AW  = RIB + CIB;             // log2 k
  localparam int unsigned NB  = 1 << BLK_BITS;         // sqrt(N/k)

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DIAG, S_DONE} state_e;

  state_e                state_q;
  logic                  tmode_q;       // transparent test latched at start
  logic                  sig_phase_q;   // signature prediction pass
  logic                  sub_wr_q;      // transparent: write slot of a cell
  logic                  rbit_q;        // transparent: value just read
  logic [BLK_BITS-1:0]   cbq;           // transparent: block column
  logic [BLK_BITS-1:0]   dj_q;          // fault location: bit being decided
  logic [BLK_BITS-1:0]   fcb_q;         // fault location: bits decided so far
  logic [MISR_W-1:0]     sig_ref_q;     // predicted signature

  // counters
  logic          bm_up, bm_dn, bm_set, bm_reset, ud, a, b;
  logic [AW-1:0] bm_addr;
  logic          md_up, md_dn, md_set, md_reset, c;
  logic [BLK_BITS-1:0] md_raddr;

  bmbag #(.AW(AW)) u_bmbag (
    .clk, .rst_n, .up(bm_up), .dn(bm_dn), .set(bm_set), .reset(bm_reset),
    .ud, .a, .b, .addr(bm_addr)
  );

  mdag #(.BW(BLK_BITS)) u_mdag (
    .clk, .rst_n, .up(md_up), .dn(md_dn), .set(md_set), .reset(md_reset),
    .c, .raddr(md_raddr)
  );

  // MISR
  logic          misr_clr, misr_en;
  logic [NB-1:0] misr_din;

  misr #(.W(MISR_W), .IW(NB)) u_misr (
    .clk, .rst_n, .clr(misr_clr), .en(misr_en), .din(misr_din), .sig(signature)
  );

  logic [RIB-1:0] row_in;
  logic [CIB-1:0] col_in;
  assign {row_in, col_in} = bm_addr;

  logic [NB-1:0] cb_onehot;
  assign cb_onehot = NB'(1) << cbq;

  // next-state controls
  state_e              state_d;
  logic                cb_step, cb_last, md_step, cap_rbit, sub_wr_d;
  logic                end_sig_pass, diag_hit, diag_start;
  logic [BLK_BITS-1:0] fcb_d;

  always_comb begin
    el          = decode_el(ud, a, b, tmode_q);
    state_d     = state_q;
    bm_up = 1'b0; bm_dn = 1'b0; bm_set = 1'b0; bm_reset = 1'b0;
    md_up = 1'b0; md_dn = 1'b0; md_set = 1'b0; md_reset = 1'b0;
    misr_clr    = 1'b0;
    misr_en     = 1'b0;
    misr_din    = '0;
    mem_we      = 1'b0;
    mem_din     = 1'b0;
    row_addr    = {md_raddr, row_in};
    row_mask    = '0;
    col_addr    = {cbq, col_in};
    col_mask    = '0;
    cmp_ref_en  = 1'b0;
    cmp_ref_val = 1'b0;
    cb_step     = 1'b0;
    md_step     = 1'b0;
    cap_rbit    = 1'b0;
    sub_wr_d    = sub_wr_q;
    end_sig_pass = 1'b0;
    diag_hit    = 1'b0;
    diag_start  = 1'b0;
    fcb_d       = fcb_q;
    cb_last     = ud ? (cbq == '0) : (cbq == '1);

    unique case (state_q)
      S_IDLE: begin
        bm_reset = 1'b1;
        md_reset = 1'b1;
        misr_clr = 1'b1;
        if (tm) state_d = S_RUN;
      end

      S_RUN: begin
        unique case (el)
          EL_RESET_STAGE: begin
            bm_set = 1'b1;
            md_set = 1'b1;
          end
          EL_END: begin
            if (tmode_q && sig_phase_q) begin
              end_sig_pass = 1'b1;
              bm_reset     = 1'b1;
              md_reset     = 1'b1;
              misr_clr     = 1'b1;
            end else begin
              state_d = S_DONE;
            end
          end
          EL_M1: begin
            mem_we   = 1'b1;
            mem_din  = el_write_val(el);
            row_mask = {{BLK_BITS{1'b1}}, {RIB{1'b0}}};
            col_mask = {{BLK_BITS{1'b1}}, {CIB{1'b0}}};
            bm_up    = 1'b1;
          end
          default: begin   // M2..M6
            if (!c) begin
              if (!tmode_q) begin
                // parallel read of one word line, all block columns
                col_mask = {{BLK_BITS{1'b1}}, {CIB{1'b0}}};
                if (!error_flag_n) diag_start = 1'b1;
                else               md_step    = 1'b1;
              end else if (!sub_wr_q) begin
                // transparent: read one cell into the MISR
                misr_en  = 1'b1;
                misr_din = (grp_data & cb_onehot) ^
                           ((sig_phase_q && el_read_val(el)) ? cb_onehot : '0);
                cap_rbit = 1'b1;
                if (!sig_phase_q && el_has_write(el)) sub_wr_d = 1'b1;
                else                                   cb_step  = 1'b1;
              end else begin
                // transparent: write back the complement
                mem_we   = 1'b1;
                mem_din  = !rbit_q;
                sub_wr_d = 1'b0;
                cb_step  = 1'b1;
              end
              if (cb_step && cb_last) md_step = 1'b1;
            end else begin
              // all block rows read: the parallel write of this position
              if (!tmode_q) begin
                row_mask = {{BLK_BITS{1'b1}}, {RIB{1'b0}}};
                col_mask = {{BLK_BITS{1'b1}}, {CIB{1'b0}}};
                mem_we   = el_has_write(el);    // M6: dummy read
                mem_din  = el_write_val(el);
              end
              bm_up    = !ud;
              bm_dn    = ud;
              md_reset = !ud;
              md_set   = ud;
            end
          end
        endcase
        if (diag_start) state_d = S_DIAG;
      end

      S_DIAG: begin
        // unmask the block column bits below dj, fix bit dj at 0
        for (int i = 0; i < int'(BLK_BITS); i++) begin
          col_mask[CIB+i] = (i < int'(dj_q));
          col_addr[CIB+i] = (i > int'(dj_q)) ? fcb_q[i] : 1'b0;
          if (i == int'(dj_q) && error_flag_n) fcb_d[i] = 1'b1;  // lower half is clean
        end
        cmp_ref_en  = 1'b1;
        cmp_ref_val = el_read_val(el);
        if (dj_q == '0) begin
          diag_hit = 1'b1;
          md_step  = 1'b1;
          state_d  = S_RUN;
        end
      end

      S_DONE: ;

      default: state_d = S_IDLE;
    endcase

    if (md_step) begin
      md_up = !ud;
      md_dn = ud;
    end
    if (!tm) state_d = S_IDLE;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q     <= S_IDLE;
      tmode_q     <= 1'b0;
      sig_phase_q <= 1'b0;
      sub_wr_q    <= 1'b0;
      rbit_q      <= 1'b0;
      cbq         <= '0;
      dj_q        <= '0;
      fcb_q       <= '0;
      sig_ref_q   <= '0;
      fail        <= 1'b0;
      fault_valid <= 1'b0;
      fault_addr  <= '0;
      fault_count <= '0;
      sig_fail    <= 1'b0;
    end else begin
      state_q     <= state_d;
      fault_valid <= 1'b0;
      if (state_q == S_IDLE) begin
        tmode_q     <= transparent;
        sig_phase_q <= transparent;
        sub_wr_q    <= 1'b0;
        cbq         <= '0;
        fail        <= 1'b0;
        fault_count <= '0;
        sig_fail    <= 1'b0;
      end else begin
        sub_wr_q <= sub_wr_d;
        if (cap_rbit) rbit_q <= grp_data[cbq];
        if (bm_set) cbq <= '1;
        else if (cb_step) cbq <= ud ? cbq - 1'b1 : cbq + 1'b1;
        if (end_sig_pass) begin
          sig_phase_q <= 1'b0;
          sig_ref_q   <= signature;
          cbq         <= '0;
        end
        if (state_q == S_RUN && el == EL_END && tmode_q && !sig_phase_q &&
            signature != sig_ref_q) begin
          sig_fail <= 1'b1;
          fail     <= 1'b1;
        end
        if (diag_start) begin
          dj_q  <= BLK_BITS'(BLK_BITS - 1);
          fcb_q <= '0;
          fail  <= 1'b1;
        end else if (state_q == S_DIAG) begin
          fcb_q <= fcb_d;
          dj_q  <= dj_q - 1'b1;
        end
        if (diag_hit) begin
          fault_valid <= 1'b1;
          fault_addr  <= {md_raddr, row_in, fcb_d, col_in};
          fault_count <= fault_count + 1'b1;
        end
      end
    end
  end

  assign done = (state_q == S_DONE);
  assign diag = (state_q == S_DIAG);

  // a located fault is reported for exactly one cycle (both antecedents
  // are held low by the asynchronous reset, so no disable clause is needed)
  a_fault_pulse: assert property (@(posedge clk)
    fault_valid |=> !fault_valid);

  // while a fault is being located both address counters hold
  a_diag_hold: assert property (@(posedge clk)
    (state_q == S_DIAG && dj_q != '0) |-> !(bm_up || bm_dn || md_up || md_dn));

endmodule
