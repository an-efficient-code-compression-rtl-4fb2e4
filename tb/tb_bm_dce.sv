// tb_bm_dce: self-checking test of the decompression engine.
//
// A reference compressor (bm_tb_pkg) builds compressed programs from a random dictionary.
// The testbench plays both the instruction cache (answering the fetch address from an array)
// and the processor (taking the output lanes), and compares every instruction with the
// original program. Phases:
//   1. mixed program (all codeword kinds) with random fetch and output stalls;
//   2. branch: a redirect into the middle of a program, at a byte-aligned target that the
//      stream reaches through an alignment marker, then sequential decoding through it;
//   3. rate: streams of short (dictionary-only) and one-mask codewords with no stalls; the
//      engine must deliver LANES instructions per cycle, or as many as 32 fetched bits per
//      cycle hold, plus a fixed latency.
module tb_bm_dce;
  import bm_pkg::*;
  import bm_tb_pkg::*;

  localparam int unsigned DICT_ENTRIES = 2048;
  localparam int unsigned LANES        = 2;
  localparam int unsigned IW           = $clog2(DICT_ENTRIES);

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

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

  int checks = 0, failures = 0;
  int aligns = 0;
  always @(posedge clk) if (align_taken) aligns++;

  bm_encoder enc;
  bit [31:0] dict_v[];

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic load_dict();
    for (int e = 0; e < int'(DICT_ENTRIES); e++) begin
      @(negedge clk);
      dict_we = 1'b1; dict_waddr = IW'(e); dict_wdata = dict_v[e];
    end
    @(negedge clk);
    dict_we = 1'b0;
  endtask

  task automatic redirect(int unsigned byte_addr);
    @(negedge clk);
    in_valid = 1'b0; out_ready = 1'b0;
    redir_valid = 1'b1; redir_addr = byte_addr;
    @(negedge clk);
    redir_valid = 1'b0;
  endtask

  // run until `expect` is drained; returns cycles used
  task automatic run(ref bit [31:0] expect_q[$], input int in_pct, input int out_pct,
                     input int max_cycles, output int cycles);
    cycles = 0;
    while (expect_q.size() > 0 && cycles < max_cycles) begin
      @(negedge clk);
      cycles++;
      in_valid  = ($urandom_range(99) < in_pct);
      out_ready = ($urandom_range(99) < out_pct);
      if (out_ready) begin
        for (int l = 0; l < int'(LANES); l++) begin
          if (out_valid[l] && expect_q.size() > 0) begin
            bit [31:0] e;
            e = expect_q.pop_front();
            check(out_instr[l] == e, $sformatf("lane %0d got %08h expected %08h", l, out_instr[l], e));
          end
        end
        // a valid lane never follows an invalid one
        if (LANES > 1) check(!(out_valid[1] && !out_valid[0]), "lane order");
      end
    end
    check(expect_q.size() == 0, $sformatf("%0d instructions never delivered", expect_q.size()));
    @(negedge clk);
    in_valid = 1'b0; out_ready = 1'b0;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit [31:0] prog[$], expect_q[$];
    int cycles, target, tgt_byte;

    dict_v = new[DICT_ENTRIES];
    foreach (dict_v[e]) dict_v[e] = $urandom;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    load_dict();

    // ---------------------------------------------------------- 1. mixed program
    enc = new(IW);
    enc.dict = dict_v;
    for (int i = 0; i < 400; i++) begin
      int unsigned r;
      bit [31:0] v;
      r = $urandom_range(99);
      if (r < 30)      v = dict_v[$urandom_range(DICT_ENTRIES - 1)];
      else if (r < 55) v = near(dict_v[$urandom_range(DICT_ENTRIES - 1)], 1);
      else if (r < 80) v = near(dict_v[$urandom_range(DICT_ENTRIES - 1)], 2);
      else             v = $urandom;
      prog.push_back(v);
      enc.encode(v);
    end
    enc.words(mem);
    for (int k = 0; k < 4; k++)
      check(enc.kind_count[k] > 10, $sformatf("codeword kind %0d used %0d times", k, enc.kind_count[k]));
    expect_q = prog;
    redirect(0);
    run(expect_q, 70, 75, 5000, cycles);
    $display("phase 1: %0d instructions in %0d cycles", prog.size(), cycles);

    // ---------------------------------------------------------- 2. branch into the program
    enc = new(IW);
    enc.dict = dict_v;
    prog.delete();
    target = 57;
    tgt_byte = 0;
    for (int i = 0; i < 150; i++) begin
      bit [31:0] v;
      v = near(dict_v[$urandom_range(DICT_ENTRIES - 1)], $urandom_range(3));
      if (i == target) tgt_byte = enc.align();
      prog.push_back(v);
      enc.encode(v);
    end
    enc.words(mem);
    check(enc.align_count == 1, "alignment marker placed");
    // sequential decoding runs through the marker
    expect_q = prog;
    redirect(0);
    aligns = 0;
    run(expect_q, 80, 80, 3000, cycles);
    check(aligns == 1, $sformatf("alignment markers consumed: %0d", aligns));
    // a branch to the target restarts at its byte
    expect_q = prog[target:$];
    redirect(tgt_byte);
    run(expect_q, 60, 90, 3000, cycles);
    // a redirect in the middle of delivery discards what was in flight
    expect_q = prog;
    redirect(0);
    repeat (6) begin
      @(negedge clk);
      in_valid = 1'b1;
    end
    expect_q = prog[target:$];
    redirect(tgt_byte);
    run(expect_q, 90, 90, 3000, cycles);

    // ---------------------------------------------------------- 3. rate
    for (int nm = 0; nm < 2; nm++) begin
      int n, bits, bound;
      enc = new(IW);
      enc.dict = dict_v;
      prog.delete();
      n = 300;
      for (int i = 0; i < n; i++) begin
        bit [31:0] v;
        v = near(dict_v[$urandom_range(DICT_ENTRIES - 1)], nm);
        prog.push_back(v);
        enc.encode(v);
      end
      enc.words(mem);
      bits = enc.stream.size();
      bound = (n + LANES - 1) / LANES;
      if ((bits + 31) / 32 > bound) bound = (bits + 31) / 32;
      expect_q = prog;
      redirect(0);
      run(expect_q, 100, 100, 3000, cycles);
      $display("phase 3 (%0d masks): %0d instructions, %0d bits, %0d cycles, bound %0d",
               nm, n, bits, cycles, bound);
      check(cycles <= bound + 4, $sformatf("rate: %0d cycles for bound %0d", cycles, bound));
      check(cycles >= bound, $sformatf("rate faster than possible: %0d < %0d", cycles, bound));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
