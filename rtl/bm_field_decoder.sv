// bm_field_decoder: splits one codeword at the head of the compressed bit stream into its
// fields (purely combinational).
//
// The window holds the next WIN bits of the stream, the first stream bit in window[WIN-1].
// The decoder reads the decision bit and the 2-bit mask count of Encoding 2, then takes the
// (location, pattern) pairs and the dictionary index that follow, and reports the length of
// the codeword so that the stream can be advanced by exactly that many bits. An uncompressed
// codeword carries the 32-bit instruction after the decision bit. The alignment marker
// (count value 3) has no instruction; its length runs to the next byte boundary, worked out
// from head_pos, the position of the window's first bit modulo 8.
//
// Field order and widths are those of the article's Encoding 2; the decision polarity, the
// count values and the alignment marker are this design's choices (see bm_pkg).
// Fields a codeword does not have are driven to zero (the patterns of absent masks included,
// so that a mask built from them is neutral); `raw` always shows the 32 bits after the
// decision bit and is meaningful only for an uncompressed codeword.
module bm_field_decoder
  import bm_pkg::*;
#(
  parameter int unsigned IW  = 11,                                   // dictionary index width
  parameter int unsigned WIN = (comp_len(2, IW) > UNCOMP_LEN) ? comp_len(2, IW) : UNCOMP_LEN
) (
  input  logic [WIN-1:0]     window,    // next WIN stream bits, first bit at the MSB
  input  logic [2:0]         head_pos,  // stream bit position of window[WIN-1], modulo 8
  output cw_kind_e           kind,
  output logic [LEN_W-1:0]   len,       // codeword length in bits
  output logic [INSTR_W-1:0] raw,       // instruction of an uncompressed codeword
  output logic [NPAT_W-1:0]  npat,      // number of masks (0..2) of a dictionary codeword
  output mask_field_t        mask0,
  output mask_field_t        mask1,
  output logic [IW-1:0]      index
);

  localparam int unsigned F = LOC_W + PAT_W;  // bits of one (location, pattern) pair

  // Bit positions inside the window, counted from its MSB
  localparam int unsigned P_NPAT = WIN - 3;          // LSB of the count field
  localparam int unsigned P_M0   = WIN - 4;          // MSB of the first pair
  localparam int unsigned P_M1   = WIN - 4 - F;      // MSB of the second pair
  localparam int unsigned P_IX0  = WIN - 4;          // MSB of the index, no mask
  localparam int unsigned P_IX1  = WIN - 4 - F;      // MSB of the index, one mask
  localparam int unsigned P_IX2  = WIN - 4 - 2 * F;  // MSB of the index, two masks

  initial begin
    assert (IW >= 1 && comp_len(2, IW) <= WIN && UNCOMP_LEN <= WIN)
      else $error("bm_field_decoder: window too small for the codeword format");
  end

  logic [NPAT_W-1:0] cnt;
  assign cnt = window[P_NPAT +: NPAT_W];

  always_comb begin
    kind  = CW_DICT;
    len   = '0;
    raw   = window[WIN-2 -: INSTR_W];
    npat  = '0;
    mask0 = '0;
    mask1 = '0;
    index = '0;
    if (window[WIN-1] == DEC_UNCOMP) begin
      kind = CW_UNCOMP;
      len  = LEN_W'(UNCOMP_LEN);
    end else begin
      unique case (cnt)
        NPAT_NONE: begin
          index = window[P_IX0 -: IW];
          len   = LEN_W'(comp_len(0, IW));
        end
        NPAT_ONE: begin
          npat  = NPAT_ONE;
          mask0 = window[P_M0 -: F];
          index = window[P_IX1 -: IW];
          len   = LEN_W'(comp_len(1, IW));
        end
        NPAT_TWO: begin
          npat  = NPAT_TWO;
          mask0 = window[P_M0 -: F];
          mask1 = window[P_M1 -: F];
          index = window[P_IX2 -: IW];
          len   = LEN_W'(comp_len(2, IW));
        end
        default: begin  // NPAT_ALIGN: marker, then zeros up to the next byte boundary
          kind = CW_ALIGN;
          len  = (head_pos <= 3'd5) ? LEN_W'(8 - head_pos) : LEN_W'(16 - head_pos);
        end
      endcase
    end
  end

endmodule
