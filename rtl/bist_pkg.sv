// bist_pkg: types and helper functions shared by the parallel SRAM BIST.
//
// The BIST runs March C- (six march elements M1..M6) in parallel over all
// basic march blocks of the array, or its transparent form (five elements
// plus a read-only signature prediction pass). The march element that is
// running is not stored in a state register: it is decoded from the three
// top bits of the block address counter (U/D, A, B). This package holds the
// element type and the table that tells, per element, what is read, what is
// written and whether a write exists at all. The table follows the March C-
// listing (M1 = up(w0); M2 = up(r0,w1); M3 = up(r1,w0); M4 = down(r0,w1);
// M5 = down(r1,w0); M6 = down(r0)). The transparent elements T1..T5 reuse
// the rows M2..M6, with every value taken relative to the cell's initial
// content.
package bist_pkg;

  // March C- elements plus the two non-element states the counter bits
  // decode to: the counter re-load stage between the up and the down sweeps
  // and the end of the test.
  typedef enum logic [2:0] {
    EL_RESET_STAGE = 3'd0,
    EL_M1          = 3'd1,
    EL_M2          = 3'd2,
    EL_M3          = 3'd3,
    EL_M4          = 3'd4,
    EL_M5          = 3'd5,
    EL_M6          = 3'd6,
    EL_END         = 3'd7
  } march_el_e;

  // Value a read in this element expects (non-transparent), or whether the
  // read value is the complement of the initial content (transparent).
  function automatic logic el_read_val(march_el_e el);
    return (el == EL_M3) || (el == EL_M5);
  endfunction

  // Value written by this element (non-transparent).
  function automatic logic el_write_val(march_el_e el);
    return (el == EL_M2) || (el == EL_M4);
  endfunction

  // Element has a read operation.
  function automatic logic el_has_read(march_el_e el);
    return (el >= EL_M2) && (el <= EL_M6);
  endfunction

  // Element has a write operation.
  function automatic logic el_has_write(march_el_e el);
    return (el >= EL_M1) && (el <= EL_M5);
  endfunction

  // Decode of the counter control bits U/D, A, B (block address counter).
  // In the up sweep the element index is {A,B} (+1 in transparent mode,
  // which has no initial write element); in the down sweep {A,B} = 11, 10,
  // 01 select M4, M5, M6 and 00 marks the end.
  function automatic march_el_e decode_el(logic ud, logic a, logic b, logic transparent);
    logic [1:0] ab;
    ab = {a, b};
    if (!ud) begin
      if (!transparent) begin
        unique case (ab)
          2'b00:   return EL_M1;
          2'b01:   return EL_M2;
          2'b10:   return EL_M3;
          default: return EL_RESET_STAGE;
        endcase
      end else begin
        unique case (ab)
          2'b00:   return EL_M2;
          2'b01:   return EL_M3;
          default: return EL_RESET_STAGE;
        endcase
      end
    end else begin
      unique case (ab)
        2'b11:   return EL_M4;
        2'b10:   return EL_M5;
        2'b01:   return EL_M6;
        default: return EL_END;
      endcase
    end
  endfunction

endpackage
