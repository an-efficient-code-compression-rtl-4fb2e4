// bm_decomp_unit: post-cache code decompression unit for a 32-bit embedded processor.
//
// The program is stored compressed: each 32-bit instruction is either kept as it is, or
// replaced by the index of a dictionary entry together with up to two 4-bit masks that turn
// the entry into the instruction by XOR. The unit sits between the instruction cache and the
// processor: it fetches compressed words, decodes up to LANES instructions per cycle in the
// decompression engine (bm_dce) and hands them to the processor.
//
// Branches. Every branch target starts on a byte boundary of the compressed program. For
// targets the compressor could patch, the processor's branch carries the compressed byte
// address itself (br_indirect low). For the rest (br_indirect high) the branch carries the
// original address, which the mapping table (bm_branch_map) turns into the compressed one
// in the same cycle. A redirect flushes the engine; a lookup that misses flushes nothing and
// raises map_miss for that cycle instead.
//
// Interface and timing. Load the dictionary (dict_*) and the mapping table (map_*) first.
// fetch_addr is a word address; the cache answers with in_valid/in_data, the word being taken
// when in_ready is high too. out_valid/out_instr carry up to LANES instructions, lane 0
// first, taken together with out_ready. A branch takes effect in the cycle br_valid is high;
// the first target instruction is at the output two cycles after the cycle in which the
// word holding it is taken (appended, then decoded and read from the dictionary), or one
// cycle later if its codeword runs into the next word.
//
// Following the article: the placement after the cache, the dictionary-plus-bitmask
// decoding, patched byte-aligned branch targets and a small mapping table for the others.
// This design's choices: the handshakes, the lane count, and the table's organisation.
module bm_decomp_unit
  import bm_pkg::*;
#(
  parameter int unsigned DICT_ENTRIES = 2048,
  parameter int unsigned LANES        = 2,
  parameter int unsigned MAP_ENTRIES  = 16,
  parameter int unsigned ADDR_W       = 32,
  localparam int unsigned IW          = $clog2(DICT_ENTRIES),
  localparam int unsigned XW          = (MAP_ENTRIES > 1) ? $clog2(MAP_ENTRIES) : 1
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // dictionary load
  input  logic                          dict_we,
  input  logic [IW-1:0]                 dict_waddr,
  input  logic [INSTR_W-1:0]            dict_wdata,
  // mapping table load
  input  logic                          map_we,
  input  logic [XW-1:0]                 map_widx,
  input  logic [ADDR_W-1:0]             map_wkey,
  input  logic [ADDR_W-1:0]             map_wval,
  // fetch port to the instruction cache
  output logic [ADDR_W-3:0]             fetch_addr,
  input  logic                          in_valid,
  input  logic [INSTR_W-1:0]            in_data,
  output logic                          in_ready,
  // branches from the processor
  input  logic                          br_valid,
  input  logic                          br_indirect,
  input  logic [ADDR_W-1:0]             br_addr,
  output logic                          map_miss,
  // instructions to the processor
  output logic [LANES-1:0]              out_valid,
  output logic [LANES-1:0][INSTR_W-1:0] out_instr,
  input  logic                          out_ready,
  // status
  output logic                          align_taken
);

  logic              map_hit;
  logic [ADDR_W-1:0] map_val;
  logic              redir_valid;
  logic [ADDR_W-1:0] redir_addr;

  bm_branch_map #(.ENTRIES(MAP_ENTRIES), .ADDR_W(ADDR_W)) u_map (
    .clk, .rst_n,
    .we   (map_we),
    .widx (map_widx),
    .wkey (map_wkey),
    .wval (map_wval),
    .key  (br_addr),
    .hit  (map_hit),
    .val  (map_val)
  );

  always_comb begin
    redir_valid = br_valid && (!br_indirect || map_hit);
    redir_addr  = br_indirect ? map_val : br_addr;
    map_miss    = br_valid && br_indirect && !map_hit;
  end

  bm_dce #(.DICT_ENTRIES(DICT_ENTRIES), .LANES(LANES), .ADDR_W(ADDR_W)) u_dce (
    .clk, .rst_n,
    .dict_we, .dict_waddr, .dict_wdata,
    .fetch_addr, .in_valid, .in_data, .in_ready,
    .redir_valid, .redir_addr,
    .out_valid, .out_instr, .out_ready,
    .align_taken
  );

endmodule
