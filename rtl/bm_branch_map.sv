// bm_branch_map: the small mapping table for branch targets that the compressor could not
// patch (indirect branches, whose targets are only known at run time).
//
// Each entry pairs an original (uncompressed) byte address with the byte-aligned address of
// the same instruction in the compressed program. The table is written through the load
// port when the program is loaded; a lookup compares the original address with all valid
// entries at once and returns the compressed address of the matching one within the same
// cycle (hit), or no hit. Entries are invalid after reset.
//
// The article gives the purpose of the table (new addresses for the targets that could not
// be patched, found quickly); the fully associative organisation, the entry count and the
// load port are this design's choices. If two entries hold the same original address the
// lowest-numbered one wins.
module bm_branch_map #(
  parameter int unsigned ENTRIES = 16,
  parameter int unsigned ADDR_W  = 32,
  localparam int unsigned XW     = (ENTRIES > 1) ? $clog2(ENTRIES) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // load port
  input  logic              we,
  input  logic [XW-1:0]     widx,
  input  logic [ADDR_W-1:0] wkey,    // original target address
  input  logic [ADDR_W-1:0] wval,    // compressed byte address
  // lookup
  input  logic [ADDR_W-1:0] key,
  output logic              hit,
  output logic [ADDR_W-1:0] val
);

  logic [ENTRIES-1:0]             valid_q;
  logic [ENTRIES-1:0][ADDR_W-1:0] key_q;
  logic [ENTRIES-1:0][ADDR_W-1:0] val_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= '0;
      key_q   <= '0;
      val_q   <= '0;
    end else if (we) begin
      valid_q[widx] <= 1'b1;
      key_q[widx]   <= wkey;
      val_q[widx]   <= wval;
    end
  end

  always_comb begin
    hit = 1'b0;
    val = '0;
    for (int e = ENTRIES - 1; e >= 0; e--) begin
      if (valid_q[e] && key_q[e] == key) begin
        hit = 1'b1;
        val = val_q[e];
      end
    end
  end

endmodule
