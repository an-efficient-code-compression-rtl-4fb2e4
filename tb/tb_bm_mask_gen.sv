// tb_bm_mask_gen: checks the instruction-length mask for every pair of half-byte locations
// with random patterns, against a reference that sets the mask bit by bit.
module tb_bm_mask_gen;
  import bm_pkg::*;

  mask_field_t        m0, m1;
  logic [INSTR_W-1:0] mask;

  bm_mask_gen dut (.mask0(m0), .mask1(m1), .mask(mask));

  int checks = 0, failures = 0;

  // bit b of the instruction lies in half-byte (31-b)/4, counting from the MSB
  function automatic logic [31:0] ref_mask(mask_field_t a, mask_field_t b);
    logic [31:0] r;
    for (int bit_i = 0; bit_i < 32; bit_i++) begin
      int nib, k;
      nib = (31 - bit_i) / 4;
      k   = bit_i % 4;
      r[bit_i] = (nib == int'(a.loc) && a.pat[k]) || (nib == int'(b.loc) && b.pat[k]);
    end
    return r;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 8; rep++) begin
      for (int a = 0; a < 8; a++) begin
        for (int b = 0; b < 8; b++) begin
          m0.loc = 3'(a); m0.pat = 4'($urandom);
          m1.loc = 3'(b); m1.pat = (rep == 0) ? 4'h0 : 4'($urandom);
          #1;
          checks++;
          if (mask !== ref_mask(m0, m1)) begin
            failures++;
            $display("FAIL: loc %0d pat %h / loc %0d pat %h -> %08h expected %08h",
                     a, m0.pat, b, m1.pat, mask, ref_mask(m0, m1));
          end
        end
      end
    end
    // a named example: pattern 1010 at location 1 and 0011 at location 7
    m0 = '{loc: 3'd1, pat: 4'b1010};
    m1 = '{loc: 3'd7, pat: 4'b0011};
    #1;
    checks++;
    if (mask !== 32'h0A00_0003) begin
      failures++;
      $display("FAIL: example mask %08h", mask);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
