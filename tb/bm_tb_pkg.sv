// bm_tb_pkg: reference model of the compressor for the testbenches.
//
// bm_encoder holds a dictionary and builds a compressed program in the stream format the
// decompressor reads: for each instruction it searches the whole dictionary for the entry
// that differs from the instruction in the fewest half-bytes, and emits the cheapest of
//   dictionary only (0 00 index), one mask (0 01 loc pat index),
//   two masks (0 10 loc pat loc pat index), uncompressed (1 instr).
// Masks are written in ascending location order, location 0 being bits 31:28. align()
// places an alignment marker (0 11) and zeros up to the next byte boundary, as the
// compressor does in front of every branch target. words() packs the stream into 32-bit
// memory words, first stream bit in bit 31 of word 0, zero-padded at the end.
// The model is written from the format description, independently of the RTL.
package bm_tb_pkg;

  typedef enum int { K_UNCOMP = 0, K_DICT = 1, K_ONE = 2, K_TWO = 3 } enc_kind_e;

  // one emitted instruction codeword, as the decoder should see it
  typedef struct {
    enc_kind_e   kind;
    bit [31:0]   instr;
    int unsigned index;
    int unsigned loc0, pat0, loc1, pat1;
    int unsigned start;   // stream bit position of the codeword
    int unsigned len;
  } cw_rec_t;

  class bm_encoder;
    int unsigned iw;
    bit [31:0]   dict[];
    bit          stream[$];
    cw_rec_t     recs[$];
    int unsigned kind_count[4];
    int unsigned align_count;

    function new(int unsigned index_w);
      iw = index_w;
      dict = new[1 << index_w];
      align_count = 0;
      foreach (kind_count[k]) kind_count[k] = 0;
    endfunction

    function void push(bit [63:0] v, int unsigned n);
      for (int i = int'(n) - 1; i >= 0; i--) stream.push_back(v[i]);
    endfunction

    // number of differing half-bytes, and their locations/patterns
    static function int unsigned nib_diff(bit [31:0] a, bit [31:0] b,
                                          output int unsigned locs[2], output int unsigned pats[2]);
      int unsigned n;
      bit [31:0] d;
      d = a ^ b;
      n = 0;
      locs[0] = 0; locs[1] = 0; pats[0] = 0; pats[1] = 0;
      for (int loc = 0; loc < 8; loc++) begin
        bit [3:0] nib;
        nib = d[31 - 4*loc -: 4];
        if (nib != 0) begin
          if (n < 2) begin
            locs[n] = loc;
            pats[n] = 32'(nib);
          end
          n++;
        end
      end
      return n;
    endfunction

    function void encode(bit [31:0] instr);
      int unsigned best_e, best_n;
      int unsigned locs[2], pats[2], bl[2], bp[2];
      cw_rec_t r;
      best_n = 99;
      best_e = 0;
      bl[0] = 0; bl[1] = 0; bp[0] = 0; bp[1] = 0;
      for (int e = 0; e < dict.size(); e++) begin
        int unsigned n;
        n = nib_diff(instr, dict[e], locs, pats);
        if (n < best_n) begin
          best_n = n; best_e = e; bl = locs; bp = pats;
          if (n == 0) break;
        end
      end
      r.instr = instr;
      r.start = stream.size();
      r.index = best_e;
      r.loc0 = 0; r.pat0 = 0; r.loc1 = 0; r.pat1 = 0;
      if (best_n > 2) begin
        r.kind = K_UNCOMP;
        push(64'(1), 1);
        push(64'(instr), 32);
      end else begin
        r.kind = enc_kind_e'(best_n + 1);
        push(64'(0), 1);
        push(64'(best_n), 2);
        if (best_n >= 1) begin push(64'(bl[0]), 3); push(64'(bp[0]), 4); r.loc0 = bl[0]; r.pat0 = bp[0]; end
        if (best_n == 2) begin push(64'(bl[1]), 3); push(64'(bp[1]), 4); r.loc1 = bl[1]; r.pat1 = bp[1]; end
        push(64'(best_e), iw);
      end
      r.len = stream.size() - r.start;
      kind_count[r.kind]++;
      recs.push_back(r);
    endfunction

    // pad to a byte boundary; returns the byte address reached
    function int unsigned align();
      if (stream.size() % 8 != 0) begin
        push(64'(3'b011), 3);
        while (stream.size() % 8 != 0) stream.push_back(1'b0);
        align_count++;
      end
      return stream.size() / 8;
    endfunction

    function void words(ref bit [31:0] w[]);
      int unsigned nw;
      nw = (stream.size() + 31) / 32;
      w = new[nw + 4];
      foreach (w[i]) w[i] = '0;
      foreach (stream[i]) w[i / 32][31 - (i % 32)] = stream[i];
    endfunction
  endclass

  // a random instruction near dictionary entry e: flips 0, 1, 2 or 3 half-bytes
  function automatic bit [31:0] near(bit [31:0] base, int unsigned flips);
    bit [31:0] v;
    bit [7:0]  used;
    v = base;
    used = '0;
    for (int f = 0; f < int'(flips); f++) begin
      int unsigned loc;
      do loc = $urandom_range(7); while (used[loc]);
      used[loc] = 1'b1;
      v[31 - 4*loc -: 4] = v[31 - 4*loc -: 4] ^ 4'($urandom_range(15, 1));
    end
    return v;
  endfunction

endpackage
