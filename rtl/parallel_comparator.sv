// parallel_comparator: checks that all selected sense-amplifier outputs agree.
//
// In the non-transparent test the same value has been written to every cell
// that is read together, so the comparator needs no reference value: it
// pulls error_flag_n low when any selected bit line differs from the other
// selected ones (some are 1 and some are 0). Like the precharged circuit it
// stands for, the flag is only evaluated on a read: while wr_n is low (a
// write cycle, flag line precharged) error_flag_n stays high.
//
// For fault location the BIST also needs to know whether a chosen subset of
// the cells holds a wrong value, which a subset of one cell can never show
// by disagreement. With ref_en high the comparator therefore compares each
// selected bit against ref_val instead; this reference mode is a choice of
// this design.
//
// Interface: combinational; sense and sel are one bit per bit line.
module parallel_comparator #(
  parameter int unsigned WIDTH = 2048     // number of bit lines
) (
  input  logic [WIDTH-1:0] sense,         // sense-amplifier outputs
  input  logic [WIDTH-1:0] sel,           // bit lines taking part
  input  logic             wr_n,          // W/R: 0 = write (precharge), 1 = read
  input  logic             ref_en,        // compare against ref_val
  input  logic             ref_val,
  output logic             error_flag_n   // 0 = selected cells disagree
);

  logic any_one, any_zero, mismatch;

  always_comb begin
    any_one  = |(sense & sel);
    any_zero = |(~sense & sel);
    if (ref_en) mismatch = ref_val ? any_zero : any_one;
    else        mismatch = any_one && any_zero;
    error_flag_n = !(wr_n && mismatch);
  end

endmodule
