// tb_bm_decomp_unit: end-to-end test of the decompression unit at its default parameters
// (2048-entry dictionary, two lanes, 16-entry mapping table).
//
// A reference compressor builds a 600-instruction program from a random dictionary, aligning
// the stream in front of six branch targets; the targets of indirect branches go into the
// mapping table with their original addresses. The testbench then plays the cache (random
// fetch stalls) and the processor (random output stalls), and follows a script of branches:
// direct (patched, compressed address), indirect (original address through the table) and
// one indirect branch whose address the table does not hold. Every instruction delivered is
// compared with the original program. Counted, and required at least once: each codeword
// kind delivered, alignment markers stepped over, two instructions in one cycle, fetch
// stalls, processor stalls, a full stream register, direct and indirect branches, a table
// miss. The first instruction after a branch must arrive within 4 cycles when the cache
// answers every cycle.
module tb_bm_decomp_unit;
  import bm_pkg::*;
  import bm_tb_pkg::*;

  localparam int unsigned DICT_ENTRIES = 2048;   // the unit's defaults
  localparam int unsigned LANES        = 2;
  localparam int unsigned IW           = 11;
  localparam int unsigned XW           = 4;
  localparam int unsigned N            = 600;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                   dict_we = 1'b0;
  logic [IW-1:0]          dict_waddr = '0;
  logic [31:0]            dict_wdata = '0;
  logic                   map_we = 1'b0;
  logic [XW-1:0]          map_widx = '0;
  logic [31:0]            map_wkey = '0, map_wval = '0;
  logic [29:0]            fetch_addr;
  logic                   in_valid = 1'b0;
  logic [31:0]            in_data;
  logic                   in_ready;
  logic                   br_valid = 1'b0, br_indirect = 1'b0;
  logic [31:0]            br_addr = '0;
  logic                   map_miss;
  logic [LANES-1:0]       out_valid;
  logic [LANES-1:0][31:0] out_instr;
  logic                   out_ready = 1'b0;
  logic                   align_taken;

  bm_decomp_unit dut (.*);

  bit [31:0] mem[];
  assign in_data = (fetch_addr < 30'(mem.size())) ? mem[fetch_addr] : 32'h0;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_kind[4], n_align = 0, n_dual = 0, n_fetch_stall = 0, n_out_stall = 0, n_full = 0;
  int n_direct = 0, n_indirect = 0, n_miss = 0;

  bit running = 1'b0;   // program loaded, counting
  always @(posedge clk) if (running) begin
    if (align_taken) n_align++;
    if (!in_valid && in_ready) n_fetch_stall++;
    if (out_valid[0] && !out_ready) n_out_stall++;
    if (!in_ready && !br_valid) n_full++;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  bm_encoder   enc;
  bit [31:0]   prog[N];
  int unsigned comp_byte[N];   // compressed byte address of each branch target

  // run instructions first..first+len-1 in order; returns cycles until the first arrived
  task automatic run_seg(int first, int len, int in_pct, int out_pct, output int first_lat);
    int idx, cycles;
    idx = first;
    cycles = 0;
    first_lat = -1;
    while (idx < first + len && cycles < 5000) begin
      @(negedge clk);
      cycles++;
      in_valid  = ($urandom_range(99) < in_pct);
      out_ready = ($urandom_range(99) < out_pct);
      if (out_valid[0] && first_lat < 0) first_lat = cycles;
      if (out_ready) begin
        if (out_valid == 2'b11 && idx + 1 < first + len) n_dual++;
        for (int l = 0; l < int'(LANES); l++) begin
          if (out_valid[l] && idx < first + len) begin
            check(out_instr[l] == prog[idx],
                  $sformatf("instr %0d lane %0d: %08h expected %08h", idx, l, out_instr[l], prog[idx]));
            n_kind[enc.recs[idx].kind]++;
            idx++;
          end
        end
      end
    end
    check(idx == first + len, $sformatf("segment at %0d stopped at %0d", first, idx));
  endtask

  task automatic branch(int target, bit indirect, bit known = 1'b1);
    @(negedge clk);
    in_valid = 1'b0; out_ready = 1'b0;
    br_valid = 1'b1; br_indirect = indirect;
    br_addr = indirect ? (known ? 32'(target * 4) : 32'hFFFF_FFF0) : comp_byte[target];
    #1;
    if (indirect && !known) begin
      check(map_miss, "unknown indirect target reported");
      if (map_miss) n_miss++;
    end else begin
      check(!map_miss, "no miss for a known target");
      if (indirect) n_indirect++; else n_direct++;
    end
    @(negedge clk);
    br_valid = 1'b0; br_indirect = 1'b0;
  endtask

  initial begin
    #20000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit [31:0] dict_v[];
    int targets[6];
    int ind_targets[3];
    int lat;

    targets = '{50, 120, 200, 333, 410, 520};
    ind_targets = '{333, 200, 410};

    foreach (n_kind[k]) n_kind[k] = 0;
    dict_v = new[DICT_ENTRIES];
    foreach (dict_v[e]) dict_v[e] = $urandom;
    enc = new(IW);
    enc.dict = dict_v;
    for (int i = 0; i < int'(N); i++) begin
      int unsigned r;
      foreach (targets[t]) if (targets[t] == i) comp_byte[i] = enc.align();
      r = $urandom_range(99);
      if (r < 35)      prog[i] = dict_v[$urandom_range(DICT_ENTRIES - 1)];
      else if (r < 60) prog[i] = near(dict_v[$urandom_range(DICT_ENTRIES - 1)], 1);
      else if (r < 85) prog[i] = near(dict_v[$urandom_range(DICT_ENTRIES - 1)], 2);
      else             prog[i] = $urandom;
      enc.encode(prog[i]);
    end
    enc.words(mem);
    $display("program: %0d instructions, %0d compressed bits, ratio %0d%% (code only)",
             N, enc.stream.size(), enc.stream.size() * 100 / (32 * N));

    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // load the dictionary and the mapping table
    for (int e = 0; e < int'(DICT_ENTRIES); e++) begin
      @(negedge clk);
      dict_we = 1'b1; dict_waddr = IW'(e); dict_wdata = dict_v[e];
    end
    @(negedge clk);
    dict_we = 1'b0;
    foreach (ind_targets[k]) begin
      @(negedge clk);
      map_we = 1'b1; map_widx = XW'(k);
      map_wkey = 32'(ind_targets[k] * 4); map_wval = comp_byte[ind_targets[k]];
    end
    @(negedge clk);
    map_we = 1'b0;

    // program start: the unit fetches from address 0 after reset
    running = 1'b1;
    run_seg(0, 90, 70, 70, lat);
    branch(50, 1'b0);
    run_seg(50, 100, 100, 100, lat);
    $display("direct branch: first instruction after %0d cycles", lat);
    check(lat >= 1 && lat <= 4, $sformatf("branch latency %0d", lat));
    branch(333, 1'b1);
    run_seg(333, 80, 100, 100, lat);
    $display("indirect branch: first instruction after %0d cycles", lat);
    check(lat >= 1 && lat <= 4, $sformatf("indirect branch latency %0d", lat));
    branch(0, 1'b1, 1'b0);        // target missing from the table
    branch(120, 1'b0);
    run_seg(120, 150, 60, 80, lat);
    branch(520, 1'b0);
    run_seg(520, N - 520, 80, 50, lat);
    branch(200, 1'b1);
    run_seg(200, 220, 90, 90, lat);  // through the aligned targets 333 and 410

    $display("kinds: uncomp %0d dict %0d one-mask %0d two-mask %0d", n_kind[0], n_kind[1], n_kind[2], n_kind[3]);
    $display("align %0d dual %0d fetch-stall %0d out-stall %0d full %0d direct %0d indirect %0d miss %0d",
             n_align, n_dual, n_fetch_stall, n_out_stall, n_full, n_direct, n_indirect, n_miss);
    foreach (n_kind[k]) check(n_kind[k] > 0, $sformatf("codeword kind %0d delivered", k));
    check(n_align > 0, "alignment marker stepped over");
    check(n_dual > 0, "two instructions in one cycle");
    check(n_fetch_stall > 0, "fetch stall");
    check(n_out_stall > 0, "processor stall");
    check(n_full > 0, "stream register full");
    check(n_direct > 0, "direct branch");
    check(n_indirect > 0, "indirect branch through the table");
    check(n_miss > 0, "table miss");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
