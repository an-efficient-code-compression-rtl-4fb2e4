// bm_dce: the bitmask decompression engine. It turns the compressed bit stream coming from
// the instruction cache into 32-bit instructions, up to LANES per cycle.
//
// Structure. The decompression logic (bm_decomp_logic, holding prev_comp) splits the head of
// the stream into codewords. For each dictionary codeword the index goes to the dictionary
// SRAM while the mask generator builds the 32-bit mask from the codeword's location and
// pattern fields, in parallel with the dictionary access. The output buffer
// (bm_output_buffer, holding prev_decomp) then XORs the dictionary entry with the mask, or
// passes an uncompressed instruction, and holds the result for the processor.
//
// Interface and timing. The dictionary is loaded through dict_we/dict_waddr/dict_wdata
// before decoding starts. fetch_addr/in_valid/in_data/in_ready is the fetch port: a word is
// taken in a cycle with in_valid && in_ready, and must be the word at fetch_addr.
// redir_valid with a compressed byte address (a branch target) flushes the engine in that
// cycle and restarts decoding at that byte. out_valid/out_instr hold up to LANES
// instructions in program order, lane 0 first, taken all together with out_ready. A
// codeword at the head of the stream in cycle t appears at the output in cycle t+1; with
// out_ready held high the engine delivers an instruction per lane every cycle as long as the
// fetched words keep the stream filled.
//
// The block structure (decompression logic with prev_comp and prev_decomp, dictionary SRAM,
// mask generation beside it, XOR, output buffer, bypass for uncompressed code) is the
// article's. The pipeline register placement, the handshakes and the lane count are this
// design's choices.
module bm_dce
  import bm_pkg::*;
#(
  parameter int unsigned DICT_ENTRIES = 2048,
  parameter int unsigned LANES        = 2,
  parameter int unsigned ADDR_W       = 32,
  localparam int unsigned IW          = $clog2(DICT_ENTRIES)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // dictionary load
  input  logic                          dict_we,
  input  logic [IW-1:0]                 dict_waddr,
  input  logic [INSTR_W-1:0]            dict_wdata,
  // fetch port to the instruction cache
  output logic [ADDR_W-3:0]             fetch_addr,
  input  logic                          in_valid,
  input  logic [INSTR_W-1:0]            in_data,
  output logic                          in_ready,
  // branch redirect, compressed byte address
  input  logic                          redir_valid,
  input  logic [ADDR_W-1:0]             redir_addr,
  // to the processor
  output logic [LANES-1:0]              out_valid,
  output logic [LANES-1:0][INSTR_W-1:0] out_instr,
  input  logic                          out_ready,
  // status
  output logic                          align_taken
);

  logic                          advance;
  logic [LANES-1:0]              lane_valid;
  cw_kind_e [LANES-1:0]          lane_kind;
  logic [LANES-1:0][INSTR_W-1:0] lane_raw;
  mask_field_t [LANES-1:0]       lane_mask0, lane_mask1;
  logic [LANES-1:0][IW-1:0]      lane_index;
  logic [LANES-1:0][INSTR_W-1:0] lane_mask;
  logic [LANES-1:0]              lane_uncomp;
  logic [LANES-1:0][INSTR_W-1:0] dict_rdata;

  bm_decomp_logic #(.IW(IW), .LANES(LANES), .ADDR_W(ADDR_W)) u_logic (
    .clk, .rst_n,
    .fetch_addr, .in_valid, .in_data, .in_ready,
    .redir_valid, .redir_addr,
    .advance,
    .lane_valid, .lane_kind, .lane_raw, .lane_mask0, .lane_mask1, .lane_index,
    .align_taken,
    .count ()
  );

  for (genvar l = 0; l < LANES; l++) begin : g_mask
    bm_mask_gen u_mask (
      .mask0 (lane_mask0[l]),
      .mask1 (lane_mask1[l]),
      .mask  (lane_mask[l])
    );
    assign lane_uncomp[l] = (lane_kind[l] == CW_UNCOMP);
  end

  bm_dict_sram #(.ENTRIES(DICT_ENTRIES), .LANES(LANES), .WIDTH(INSTR_W)) u_dict (
    .clk, .rst_n,
    .we    (dict_we),
    .waddr (dict_waddr),
    .wdata (dict_wdata),
    .re    (lane_valid & ~lane_uncomp & {LANES{advance}}),
    .raddr (lane_index),
    .rdata (dict_rdata)
  );

  bm_output_buffer #(.LANES(LANES)) u_out (
    .clk, .rst_n,
    .flush (redir_valid),
    .lane_valid, .lane_uncomp, .lane_raw, .lane_mask,
    .advance,
    .dict_rdata,
    .out_valid, .out_instr, .out_ready
  );

endmodule
