// bm_decomp_logic: the front of the decompression engine. It keeps the compressed bits not
// yet decoded (the prev_comp register), appends 32-bit words fetched from the instruction
// cache, and splits the head of the bit stream into up to LANES codewords per cycle.
//
// How it works. prev_comp is a BUF_W-bit register, left-aligned: its MSB is the next stream
// bit and the `count` bits below it are valid, all others zero. Lane 0 decodes the codeword
// at offset 0; lane l decodes at the offset where lane l-1's codeword ends, so the lanes form
// a chain of field decoders behind a shifter. A lane is active when the previous lane is
// active, is not an alignment marker, and its own codeword lies wholly within the valid
// bits. When `advance` is high the active lanes' bits are dropped from the head; in the same
// cycle a fetched word, if one is taken, is appended behind the remaining bits. A word is
// taken when at most BUF_W-32 bits remain after this cycle's consumption, so the register
// never overflows and, in steady state, holds at least BUF_W-32 bits at the start of a
// cycle: with the default BUF_W of 32*(LANES+1) that is LANES*32 bits, enough for LANES
// codewords of any compressed kind. (in_ready therefore depends combinationally on
// `advance`.)
//
// Branches. redir_valid with a compressed byte address empties the register, points the
// fetch address at the word holding that byte and drops the bits in front of the byte from
// the first word fetched afterwards. Branch targets are byte-aligned in the compressed
// program; the compressor reaches the boundary with an alignment marker followed by zeros,
// which a lane consumes without producing an instruction.
//
// Interface and timing. fetch_addr is the word address of the next word wanted; the word is
// taken in a cycle with in_valid && in_ready. lane_valid[l] (with the lane's fields) tells
// that lane l holds a complete instruction codeword this cycle; the valid lanes always form
// a prefix (lane 0 first). Everything is decoded combinationally from the registers, so a
// codeword is handed to the dictionary in the cycle it reaches the head.
//
// The article names this block and prev_comp and says that a 32-bit stream can hold more
// than one codeword, decoded concurrently; the buffer size, the lane chain, the fetch and
// branch interface and the alignment marker are this design's choices.
module bm_decomp_logic
  import bm_pkg::*;
#(
  parameter int unsigned IW     = 11,               // dictionary index width
  parameter int unsigned LANES  = 2,                // codewords decoded per cycle at most
  parameter int unsigned ADDR_W = 32,               // byte address width of the program
  parameter int unsigned BUF_W  = INSTR_W * (LANES + 1)
) (
  input  logic                           clk,
  input  logic                           rst_n,
  // fetch port to the instruction cache
  output logic [ADDR_W-3:0]              fetch_addr,
  input  logic                           in_valid,
  input  logic [INSTR_W-1:0]             in_data,
  output logic                           in_ready,
  // branch redirect, compressed byte address
  input  logic                           redir_valid,
  input  logic [ADDR_W-1:0]              redir_addr,
  // decoded lanes
  input  logic                           advance,   // consume the active lanes
  output logic [LANES-1:0]               lane_valid,
  output cw_kind_e [LANES-1:0]           lane_kind,
  output logic [LANES-1:0][INSTR_W-1:0]  lane_raw,
  output mask_field_t [LANES-1:0]        lane_mask0,
  output mask_field_t [LANES-1:0]        lane_mask1,
  output logic [LANES-1:0][IW-1:0]       lane_index,
  output logic                           align_taken, // an alignment marker was consumed
  output logic [$clog2(BUF_W+1)-1:0]     count        // valid bits held in prev_comp
);

  localparam int unsigned WIN   = (comp_len(2, IW) > UNCOMP_LEN) ? comp_len(2, IW) : UNCOMP_LEN;
  localparam int unsigned CNT_W = $clog2(BUF_W + 1);
  localparam int unsigned OFF_W = CNT_W + 1;

  initial begin
    assert (BUF_W + 1 >= INSTR_W + WIN)
      else $error("bm_decomp_logic: BUF_W too small for the longest codeword");
  end

  logic [BUF_W-1:0]   prev_comp;
  logic [CNT_W-1:0]   cnt_q;
  logic [2:0]         head_pos_q;  // stream position of prev_comp's MSB, modulo 8
  logic [4:0]         skip_q;      // bits to drop from the next fetched word
  logic [ADDR_W-3:0]  fetch_q;

  // ---------------------------------------------------------------- lane chain
  logic [LANES:0][OFF_W-1:0] off;      // start of each lane's codeword
  logic [LANES-1:0]          chain;    // lane may decode (all lanes before it active)
  logic [LANES-1:0]          active;
  logic [LANES-1:0]          is_align;
  logic [LANES-1:0][LEN_W-1:0] len;

  assign off[0]   = '0;
  assign chain[0] = !redir_valid;

  for (genvar l = 0; l < LANES; l++) begin : g_lane
    logic [BUF_W-1:0] shifted;
    logic [2:0]       pos;
    assign shifted = prev_comp << off[l];
    assign pos     = head_pos_q + off[l][2:0];

    bm_field_decoder #(.IW(IW), .WIN(WIN)) u_dec (
      .window   (shifted[BUF_W-1 -: WIN]),
      .head_pos (pos),
      .kind     (lane_kind[l]),
      .len      (len[l]),
      .raw      (lane_raw[l]),
      .npat     (),
      .mask0    (lane_mask0[l]),
      .mask1    (lane_mask1[l]),
      .index    (lane_index[l])
    );

    assign is_align[l]   = (lane_kind[l] == CW_ALIGN);
    assign active[l]     = chain[l] && (OFF_W'(cnt_q) >= off[l] + OFF_W'(len[l]));
    assign lane_valid[l] = active[l] && !is_align[l];
    assign off[l+1]      = active[l] ? off[l] + OFF_W'(len[l]) : off[l];
    if (l + 1 < LANES) begin : g_next
      assign chain[l+1] = active[l] && !is_align[l];
    end
  end

  // bits consumed this cycle: the end of the last active lane
  logic [OFF_W-1:0] consumed;
  assign consumed    = advance ? off[LANES] : '0;
  assign align_taken = advance && |(active & is_align);

  // ---------------------------------------------------------------- fetch and append
  logic [BUF_W-1:0] buf_c, word_ext;
  logic [CNT_W-1:0] cnt_c;
  logic [INSTR_W-1:0] word_s;

  assign in_ready   = !redir_valid && (cnt_c <= CNT_W'(BUF_W - INSTR_W));
  assign fetch_addr = fetch_q;
  assign count      = cnt_q;

  always_comb begin
    buf_c    = prev_comp << consumed;
    cnt_c    = cnt_q - CNT_W'(consumed);
    word_s   = in_data << skip_q;
    word_ext = {word_s, {(BUF_W - INSTR_W){1'b0}}} >> cnt_c;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev_comp  <= '0;
      cnt_q      <= '0;
      head_pos_q <= '0;
      skip_q     <= '0;
      fetch_q    <= '0;
    end else if (redir_valid) begin
      prev_comp  <= '0;
      cnt_q      <= '0;
      head_pos_q <= '0;
      skip_q     <= {redir_addr[1:0], 3'b000};
      fetch_q    <= redir_addr[ADDR_W-1:2];
    end else begin
      head_pos_q <= head_pos_q + consumed[2:0];
      if (in_valid && in_ready) begin
        prev_comp <= buf_c | word_ext;
        cnt_q     <= cnt_c + CNT_W'(INSTR_W) - CNT_W'(skip_q);
        skip_q    <= '0;
        fetch_q   <= fetch_q + 1'b1;
      end else begin
        prev_comp <= buf_c;
        cnt_q     <= cnt_c;
      end
    end
  end

  // the head never runs past the valid bits
  assert property (@(posedge clk) disable iff (!rst_n) OFF_W'(cnt_q) >= consumed);

endmodule
