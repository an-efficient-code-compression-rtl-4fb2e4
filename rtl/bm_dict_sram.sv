// bm_dict_sram: the dictionary, ENTRIES words of 32 bits.
//
// One synchronous read port per decode lane and one write port through which the dictionary
// of the compressed program is loaded before execution. A read port with its enable high
// returns mem[raddr] in its output register on the next clock edge; with the enable low the
// register keeps its value, so the word stays at the output while the processor stalls.
// A read of the address being written in the same cycle returns the old word.
//
// The article gives the dictionary as an SRAM accessed in parallel with mask generation and
// evaluates 2K, 4K and 8K entries; the port structure (one read port per lane, a separate
// load port) and the read timing are this design's choices. The array is not reset: the
// dictionary must be written before it is read. The output registers reset to zero.
module bm_dict_sram #(
  parameter int unsigned ENTRIES = 2048,
  parameter int unsigned LANES   = 2,
  parameter int unsigned WIDTH   = 32,
  localparam int unsigned AW     = $clog2(ENTRIES)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // load port
  input  logic                       we,
  input  logic [AW-1:0]              waddr,
  input  logic [WIDTH-1:0]           wdata,
  // read ports
  input  logic [LANES-1:0]           re,
  input  logic [LANES-1:0][AW-1:0]   raddr,
  output logic [LANES-1:0][WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [ENTRIES];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  for (genvar l = 0; l < LANES; l++) begin : g_rd
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)     rdata[l] <= '0;
      else if (re[l]) rdata[l] <= mem[raddr[l]];
    end
  end

endmodule
