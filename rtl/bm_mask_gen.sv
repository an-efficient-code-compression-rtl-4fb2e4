// bm_mask_gen: builds the instruction-length mask of a codeword (combinational).
//
// Each 4-bit mask pattern is placed on the half-byte its 3-bit location names: location 0
// covers instruction bits 31:28, location 7 bits 3:0. The two 32-bit intermediate masks are
// OR-ed into one, which the output stage XORs with the dictionary entry. The article gives
// this operation (place each pattern on its half-byte boundary, OR the two intermediate
// masks) and runs it in parallel with the dictionary read; the numbering of the locations
// from the most significant nibble is this design's choice. An absent mask arrives with an
// all-zero pattern and so contributes nothing.
module bm_mask_gen
  import bm_pkg::*;
(
  input  mask_field_t        mask0,
  input  mask_field_t        mask1,
  output logic [INSTR_W-1:0] mask
);

  function automatic logic [INSTR_W-1:0] place(input mask_field_t m);
    logic [INSTR_W-1:0] v;
    v = '0;
    v[INSTR_W-1 -: PAT_W] = m.pat;
    return v >> (PAT_W * m.loc);
  endfunction

  assign mask = place(mask0) | place(mask1);

endmodule
