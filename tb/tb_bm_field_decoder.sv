// tb_bm_field_decoder: feeds codewords built by the reference compressor (every kind, random
// fields) and alignment markers at every byte position into the decoder, and checks the
// decoded kind, length and fields.
module tb_bm_field_decoder;
  import bm_pkg::*;
  import bm_tb_pkg::*;

  localparam int unsigned IW  = 11;
  localparam int unsigned WIN = 33;

  logic [WIN-1:0]  window;
  logic [2:0]      head_pos;
  cw_kind_e        kind;
  logic [LEN_W-1:0] len;
  logic [31:0]     raw;
  logic [NPAT_W-1:0] npat;
  mask_field_t     mask0, mask1;
  logic [IW-1:0]   index;

  bm_field_decoder #(.IW(IW), .WIN(WIN)) dut (.*);

  int checks = 0, failures = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bm_encoder enc;
    bit [31:0] dict_v[];
    dict_v = new[1 << IW];
    foreach (dict_v[e]) dict_v[e] = $urandom;
    enc = new(IW);
    enc.dict = dict_v;
    for (int i = 0; i < 400; i++) begin
      cw_rec_t r;
      enc.encode(near(dict_v[$urandom_range((1 << IW) - 1)], i % 4));
      r = enc.recs[i];
      window = '0;
      for (int b = 0; b < int'(r.len); b++) window[WIN - 1 - b] = enc.stream[r.start + b];
      // bits after the codeword must not matter
      for (int b = int'(r.len); b < int'(WIN); b++) window[WIN - 1 - b] = 1'($urandom);
      head_pos = 3'($urandom);
      #1;
      check(int'(len) == int'(r.len), $sformatf("cw %0d length %0d expected %0d", i, len, r.len));
      if (r.kind == K_UNCOMP) begin
        check(kind == CW_UNCOMP && raw == r.instr, $sformatf("cw %0d uncompressed", i));
      end else begin
        check(kind == CW_DICT && int'(index) == int'(r.index), $sformatf("cw %0d index", i));
        check(int'(npat) == int'(r.kind) - 1, $sformatf("cw %0d mask count", i));
        if (r.kind != K_DICT)
          check(int'(mask0.loc) == int'(r.loc0) && int'(mask0.pat) == int'(r.pat0), $sformatf("cw %0d mask 0", i));
        else
          check(mask0.pat == 4'h0, $sformatf("cw %0d absent mask 0", i));
        if (r.kind == K_TWO)
          check(int'(mask1.loc) == int'(r.loc1) && int'(mask1.pat) == int'(r.pat1), $sformatf("cw %0d mask 1", i));
        else
          check(mask1.pat == 4'h0, $sformatf("cw %0d absent mask 1", i));
      end
    end
    // alignment marker at every position: it ends on the next byte boundary at least 3 bits on
    for (int p = 0; p < 8; p++) begin
      int expect_len;
      window = {3'b011, 30'($urandom)};
      head_pos = 3'(p);
      expect_len = 8 - p;
      if (expect_len < 3) expect_len += 8;
      #1;
      check(kind == CW_ALIGN && int'(len) == expect_len,
            $sformatf("align at %0d: kind %0d len %0d expected %0d", p, kind, len, expect_len));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
