// bm_cfg_runner: runs one configuration of the decompression engine (dictionary size, lane
// count) through a compressed program and reports its checks. Used by tb_bm_configs.
//
// The program draws its instructions from the whole dictionary (including its last entries,
// so every index bit is exercised) and mixes all codeword kinds. It is decoded twice: once
// with random fetch and processor stalls, once with none, where the cycle count must stay
// within 4 cycles of the bound set by the lanes (LANES instructions per cycle) or by the
// fetch width (32 compressed bits per cycle), whichever is slower. It also reports the size
// of the compressed code against the original.
module bm_cfg_runner
  import bm_pkg::*;
  import bm_tb_pkg::*;
#(
  parameter int unsigned DICT_ENTRIES = 2048,
  parameter int unsigned LANES        = 2,
  parameter int unsigned N            = 300
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int unsigned IW = $clog2(DICT_ENTRIES);

  logic                          rst_n = 1'b0;
  logic                          dict_we = 1'b0;
  logic [IW-1:0]                 dict_waddr = '0;
  logic [31:0]                   dict_wdata = '0;
  logic [29:0]                   fetch_addr;
  logic                          in_valid = 1'b0;
  logic [31:0]                   in_data;
  logic                          in_ready;
  logic                          redir_valid = 1'b0;
  logic [31:0]                   redir_addr = '0;
  logic [LANES-1:0]              out_valid;
  logic [LANES-1:0][31:0]        out_instr;
  logic                          out_ready = 1'b0;
  logic                          align_taken;

  bm_dce #(.DICT_ENTRIES(DICT_ENTRIES), .LANES(LANES)) dut (.*);

  bit [31:0] mem[];
  assign in_data = (fetch_addr < 30'(mem.size())) ? mem[fetch_addr] : 32'h0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL [%0d entries, %0d lanes]: %s", DICT_ENTRIES, LANES, what);
    end
  endtask

  task automatic run(ref bit [31:0] expect_q[$], input int pct, output int cycles);
    cycles = 0;
    while (expect_q.size() > 0 && cycles < 20000) begin
      @(negedge clk);
      cycles++;
      in_valid  = ($urandom_range(99) < pct);
      out_ready = ($urandom_range(99) < pct);
      if (out_ready)
        for (int l = 0; l < int'(LANES); l++)
          if (out_valid[l] && expect_q.size() > 0) begin
            bit [31:0] e;
            e = expect_q.pop_front();
            check(out_instr[l] == e, $sformatf("lane %0d %08h expected %08h", l, out_instr[l], e));
          end
    end
    check(expect_q.size() == 0, "all instructions delivered");
    @(negedge clk);
    in_valid = 1'b0; out_ready = 1'b0;
  endtask

  initial begin
    bm_encoder enc;
    bit [31:0] dict_v[], prog[$], expect_q[$];
    int cycles, bits, bound;
    done = 1'b0; checks = 0; failures = 0;
    dict_v = new[DICT_ENTRIES];
    foreach (dict_v[e]) dict_v[e] = $urandom;
    enc = new(IW);
    enc.dict = dict_v;
    for (int i = 0; i < int'(N); i++) begin
      int unsigned e;
      bit [31:0] v;
      e = (i % 5 == 0) ? DICT_ENTRIES - 1 - $urandom_range(3) : $urandom_range(DICT_ENTRIES - 1);
      v = (i % 7 == 6) ? $urandom : near(dict_v[e], $urandom_range(2));
      prog.push_back(v);
      enc.encode(v);
    end
    enc.words(mem);
    bits = enc.stream.size();
    foreach (enc.kind_count[k]) check(enc.kind_count[k] > 0, $sformatf("kind %0d present", k));

    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int e = 0; e < int'(DICT_ENTRIES); e++) begin
      @(negedge clk);
      dict_we = 1'b1; dict_waddr = IW'(e); dict_wdata = dict_v[e];
    end
    @(negedge clk);
    dict_we = 1'b0;

    // random stalls; the engine starts at address 0 after reset
    expect_q = prog;
    run(expect_q, 70, cycles);
    // no stalls, from the start again
    @(negedge clk);
    redir_valid = 1'b1; redir_addr = '0;
    @(negedge clk);
    redir_valid = 1'b0;
    expect_q = prog;
    run(expect_q, 100, cycles);
    bound = (int'(N) + int'(LANES) - 1) / int'(LANES);
    if ((bits + 31) / 32 > bound) bound = (bits + 31) / 32;
    check(cycles <= bound + 4 && cycles >= bound, $sformatf("%0d cycles, bound %0d", cycles, bound));
    $display("[%0d entries, %0d lanes] %0d instructions in %0d cycles (bound %0d); code %0d bits (%0d%% of the original)",
             DICT_ENTRIES, LANES, N, cycles, bound, bits, bits * 100 / (32 * N));
    done = 1'b1;
  end
endmodule
