// bm_pkg: shared types and constants of the bitmask code decompressor.
//
// The compressed program is a serial bit stream, most significant bit first, built from
// codewords of the "Encoding 2" format: a 1-bit decision, a 2-bit count of mask patterns,
// up to two (3-bit half-byte location, 4-bit mask pattern) pairs, and the dictionary index.
//
//   uncompressed      : 1 | 32-bit instruction                             (33 bits)
//   dictionary only   : 0 | 00 | index                                     (3 + IW bits)
//   one 4-bit mask    : 0 | 01 | loc | pat | index                         (10 + IW bits)
//   two 4-bit masks   : 0 | 10 | loc | pat | loc | pat | index             (17 + IW bits)
//   alignment marker  : 0 | 11 | zero bits up to the next byte boundary
//
// The field order and widths follow the article's Encoding 2. The polarity of the
// decision bit (1 = uncompressed), the mask-count values and the alignment marker (which
// lets sequential decoding step over the padding placed in front of a byte-aligned branch
// target) are this design's choices. Half-byte location 0 is the most significant nibble
// of the instruction (bits 31:28), location 7 the least significant (bits 3:0).
package bm_pkg;

  localparam int unsigned INSTR_W   = 32;  // instruction (vector) width
  localparam int unsigned LOC_W     = 3;   // location of a 4-bit mask: 8 half-bytes
  localparam int unsigned PAT_W     = 4;   // mask pattern width
  localparam int unsigned NPAT_W    = 2;   // "# of patterns" field
  localparam int unsigned UNCOMP_LEN = 1 + INSTR_W;  // 33-bit uncompressed codeword
  localparam int unsigned LEN_W     = 6;   // enough for any codeword or alignment length

  // Value of the decision bit
  localparam logic DEC_UNCOMP = 1'b1;
  localparam logic DEC_COMP   = 1'b0;

  // Values of the "# of patterns" field
  localparam logic [NPAT_W-1:0] NPAT_NONE  = 2'd0;
  localparam logic [NPAT_W-1:0] NPAT_ONE   = 2'd1;
  localparam logic [NPAT_W-1:0] NPAT_TWO   = 2'd2;
  localparam logic [NPAT_W-1:0] NPAT_ALIGN = 2'd3;

  // What a codeword produces
  typedef enum logic [1:0] {
    CW_UNCOMP = 2'd0,  // uncompressed instruction follows the decision bit
    CW_DICT   = 2'd1,  // dictionary entry, possibly XORed with up to two masks
    CW_ALIGN  = 2'd2   // padding up to the next byte boundary, no instruction
  } cw_kind_e;

  // One (location, pattern) pair
  typedef struct packed {
    logic [LOC_W-1:0] loc;
    logic [PAT_W-1:0] pat;
  } mask_field_t;

  // Length of a compressed codeword with n masks for an index of iw bits
  function automatic int unsigned comp_len(input int unsigned n, input int unsigned iw);
    return 1 + NPAT_W + n * (LOC_W + PAT_W) + iw;
  endfunction

endpackage
