// tb_bm_decomp_logic: checks the stream front end on its own. The testbench plays the cache
// (an array answering fetch_addr) and the dictionary stage (random `advance`), and compares
// every decoded lane (kind, uncompressed word, mask fields, index) with the codeword list of
// the reference compressor, in order. It also checks that the front end stops taking words
// when its register would overflow, that two codewords are decoded in one cycle, that alignment
// markers are skipped, and that a redirect to a byte-aligned target restarts decoding there.
module tb_bm_decomp_logic;
  import bm_pkg::*;
  import bm_tb_pkg::*;

  localparam int unsigned IW    = 11;
  localparam int unsigned LANES = 2;
  localparam int unsigned BUF_W = 96;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [29:0]                   fetch_addr;
  logic                          in_valid = 1'b0;
  logic [31:0]                   in_data;
  logic                          in_ready;
  logic                          redir_valid = 1'b0;
  logic [31:0]                   redir_addr = '0;
  logic                          advance = 1'b0;
  logic [LANES-1:0]              lane_valid;
  cw_kind_e [LANES-1:0]          lane_kind;
  logic [LANES-1:0][31:0]        lane_raw;
  mask_field_t [LANES-1:0]       lane_mask0, lane_mask1;
  logic [LANES-1:0][IW-1:0]      lane_index;
  logic                          align_taken;
  logic [6:0]                    count;

  bm_decomp_logic #(.IW(IW), .LANES(LANES), .ADDR_W(32), .BUF_W(BUF_W)) dut (.*);

  bit [31:0] mem[];
  assign in_data = (fetch_addr < 30'(mem.size())) ? mem[fetch_addr] : 32'h0;

  int checks = 0, failures = 0;
  int dual = 0, aligns = 0, full = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic bit lane_ok(int l, cw_rec_t r);
    if (r.kind == K_UNCOMP) return lane_kind[l] == CW_UNCOMP && lane_raw[l] == r.instr;
    if (lane_kind[l] != CW_DICT || int'(lane_index[l]) != int'(r.index)) return 0;
    if (r.kind == K_DICT) return lane_mask0[l].pat == 0 && lane_mask1[l].pat == 0;
    if (int'(lane_mask0[l].loc) != int'(r.loc0) || int'(lane_mask0[l].pat) != int'(r.pat0)) return 0;
    if (r.kind == K_ONE) return lane_mask1[l].pat == 0;
    return int'(lane_mask1[l].loc) == int'(r.loc1) && int'(lane_mask1[l].pat) == int'(r.pat1);
  endfunction

  task automatic redirect(int unsigned byte_addr);
    @(negedge clk);
    in_valid = 1'b0; advance = 1'b0;
    redir_valid = 1'b1; redir_addr = byte_addr;
    @(negedge clk);
    redir_valid = 1'b0;
    check(count == 0 && fetch_addr == 30'(byte_addr >> 2), "redirect empties and re-points");
  endtask

  task automatic run(ref cw_rec_t exp_q[$], input int in_pct, input int adv_pct);
    int cycles;
    cycles = 0;
    while (exp_q.size() > 0 && cycles < 4000) begin
      @(negedge clk);
      cycles++;
      in_valid = ($urandom_range(99) < in_pct);
      advance  = ($urandom_range(99) < adv_pct);
      #1;
      check(count <= 7'(BUF_W), "register never overflows");
      if (count > 7'(BUF_W - 32) && !advance) begin
        full++;
        check(!in_ready, "no word taken while the register is full");
      end
      if (advance) begin
        if (align_taken) aligns++;
        if (lane_valid == 2'b11) dual++;
        for (int l = 0; l < int'(LANES); l++) begin
          if (lane_valid[l] && exp_q.size() > 0) begin
            cw_rec_t r;
            r = exp_q.pop_front();
            check(lane_ok(l, r), $sformatf("lane %0d codeword at bit %0d (kind %0d)", l, r.start, r.kind));
          end
        end
      end
    end
    check(exp_q.size() == 0, "all codewords decoded");
    @(negedge clk);
    in_valid = 1'b0; advance = 1'b0;
  endtask

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bm_encoder enc;
    bit [31:0] dict_v[];
    cw_rec_t exp_q[$];
    int tgt_rec, tgt_byte;
    dict_v = new[1 << IW];
    foreach (dict_v[e]) dict_v[e] = $urandom;
    enc = new(IW);
    enc.dict = dict_v;
    tgt_rec = 0;
    tgt_byte = 0;
    for (int i = 0; i < 500; i++) begin
      if (i % 97 == 40) begin
        tgt_byte = enc.align();
        tgt_rec = i;
      end
      enc.encode(near(dict_v[$urandom_range((1 << IW) - 1)], $urandom_range(3)));
    end
    enc.words(mem);
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    exp_q = enc.recs;
    run(exp_q, 60, 60);
    exp_q = enc.recs;
    redirect(0);
    run(exp_q, 100, 30);       // mostly full register
    exp_q = enc.recs[tgt_rec:$];
    redirect(tgt_byte);
    run(exp_q, 90, 90);

    check(dual > 20, $sformatf("two codewords in one cycle: %0d", dual));
    check(aligns >= int'(enc.align_count), $sformatf("alignment markers skipped: %0d", aligns));
    check(full > 20, $sformatf("cycles with a full register: %0d", full));
    $display("dual %0d aligns %0d full %0d", dual, aligns, full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
