// bm_output_buffer: the last stage of the decompression engine, holding the instructions
// for the processor.
//
// How it works. For every lane a codeword decoded at the head of the stream is captured in
// prev_decomp in the same clock edge at which the dictionary SRAM captures the lane's entry:
// prev_decomp keeps whether the codeword was uncompressed and one 32-bit word, the
// instruction itself for an uncompressed codeword or else the instruction-length mask. In
// the next cycle the instruction is the registered dictionary entry XOR the mask, or the
// uncompressed word, selected per lane. A dictionary codeword without masks has an all-zero
// mask and passes the entry unchanged.
//
// Interface and timing. out_valid[l] and out_instr[l] stay put until out_ready; the valid
// lanes form a prefix and the processor takes all of them together. `advance` is high when
// the stage is empty or being emptied; it tells the front end to consume its decoded lanes
// and the SRAM to read, so a codeword that reaches the head in cycle t is an instruction at
// the output in cycle t+1. flush (a branch) empties the stage.
//
// The XOR of mask and dictionary entry in the last stage, the bypass for uncompressed code and
// the output buffer follow the article's block diagram of the engine; the one-register stage and
// the ready/valid interface are this design's choices.
module bm_output_buffer
  import bm_pkg::*;
#(
  parameter int unsigned LANES = 2
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          flush,
  // from the front end, the cycle the codewords are decoded
  input  logic [LANES-1:0]              lane_valid,
  input  logic [LANES-1:0]              lane_uncomp,
  input  logic [LANES-1:0][INSTR_W-1:0] lane_raw,
  input  logic [LANES-1:0][INSTR_W-1:0] lane_mask,
  output logic                          advance,
  // from the dictionary SRAM, one cycle later
  input  logic [LANES-1:0][INSTR_W-1:0] dict_rdata,
  // to the processor
  output logic [LANES-1:0]              out_valid,
  output logic [LANES-1:0][INSTR_W-1:0] out_instr,
  input  logic                          out_ready
);

  logic [LANES-1:0]              valid_q;
  logic [LANES-1:0]              uncomp_q;
  logic [LANES-1:0][INSTR_W-1:0] prev_decomp;  // uncompressed instruction or mask

  assign advance = !(|valid_q) || out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q     <= '0;
      uncomp_q    <= '0;
      prev_decomp <= '0;
    end else if (flush) begin
      valid_q     <= '0;
    end else if (advance) begin
      valid_q     <= lane_valid;
      uncomp_q    <= lane_uncomp;
      for (int l = 0; l < LANES; l++)
        prev_decomp[l] <= lane_uncomp[l] ? lane_raw[l] : lane_mask[l];
    end
  end

  for (genvar l = 0; l < LANES; l++) begin : g_out
    assign out_valid[l] = valid_q[l];
    assign out_instr[l] = uncomp_q[l] ? prev_decomp[l] : (dict_rdata[l] ^ prev_decomp[l]);
  end

  // valid lanes are a prefix: lane l+1 never valid without lane l
  for (genvar l = 0; l + 1 < LANES; l++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n) valid_q[l+1] |-> valid_q[l]);
  end

endmodule
