// bmc_ref_pkg: reference model of the bitmask-based compressor, used by the
// testbenches to build compressed streams and expected fields.
//
// The compressor picks, for each word, the shortest codeword among: an exact
// dictionary match, a dictionary entry plus up to max_masks sliding bitmasks,
// or the word uncompressed. Bitmasks are placed greedily from the left: each
// one starts at the leftmost difference still uncovered, so its first bit is
// always 1 and is not stored (n-bit mask in n-1 bits). Every sequence of mask
// types is tried and the shortest successful one kept. The format matches
// codeword_decoder; the model is written from the format, not from the RTL.
package bmc_ref_pkg;

  typedef struct {
    int unsigned w;
    int unsigned depth;
    int unsigned max_masks;
    int unsigned num_types;
    int unsigned size0;
    int unsigned size1;
  } cfg_t;

  // one encoded codeword, with its fields for the unit tests
  typedef struct {
    int          kind;       // 0 raw, 1 dictionary, 2 bitmasked
    int unsigned index;
    int unsigned count;
    int unsigned mtype  [4];
    int unsigned offset [4];
    int unsigned stored [4];
    logic [63:0] xor_pat;
    bit          bits [$];   // the codeword, first bit first
  } cw_t;

  function automatic int unsigned selw(int unsigned n);
    return (n <= 1) ? 0 : $clog2(n);
  endfunction

  function automatic int unsigned msize(cfg_t c, int unsigned t);
    return (c.num_types > 1 && t != 0) ? c.size1 : c.size0;
  endfunction

  function automatic void put(ref bit q[$], input longint unsigned v, input int unsigned n);
    for (int i = int'(n) - 1; i >= 0; i--) q.push_back(bit'((v >> i) & 1));
  endfunction

  // bit at position p of a w-bit word, counted from the left
  function automatic bit lbit(logic [63:0] x, int unsigned w, int unsigned p);
    return x[w - 1 - p];
  endfunction

  function automatic void emit(cfg_t c, ref cw_t cw, input logic [63:0] raw);
    cw.bits.delete();
    if (cw.kind == 0) begin
      put(cw.bits, 64'(0), 1);
      put(cw.bits, 64'(raw), c.w);
    end else if (cw.kind == 1) begin
      put(cw.bits, 64'(2'b10), 2);
      put(cw.bits, 64'(cw.index), selw(c.depth));
    end else begin
      put(cw.bits, 64'(2'b11), 2);
      put(cw.bits, 64'(cw.count - 1), selw(c.max_masks));
      for (int m = 0; m < int'(cw.count); m++) begin
        put(cw.bits, 64'(cw.mtype[m]), selw(c.num_types));
        put(cw.bits, 64'(cw.offset[m]), $clog2(c.w));
        put(cw.bits, 64'(cw.stored[m]), msize(c, cw.mtype[m]) - 1);
      end
      put(cw.bits, 64'(cw.index), selw(c.depth));
    end
  endfunction

  // try to cover diff with masks of the types in seq (seq_len of them);
  // returns 1 and fills cw on success
  function automatic bit try_cover(cfg_t c, logic [63:0] diff, int unsigned seq[4],
                               int unsigned seq_len, ref cw_t cw);
    logic [63:0] d = diff;
    for (int m = 0; m < int'(seq_len); m++) begin
      int p = -1;
      int unsigned s = msize(c, seq[m]);
      for (int i = 0; i < int'(c.w); i++)
        if (p < 0 && lbit(d, c.w, i)) p = i;
      if (p < 0) return 0;  // a shorter sequence already covers it
      cw.mtype[m]  = seq[m];
      cw.offset[m] = p;
      cw.stored[m] = 0;
      for (int j = 0; j < int'(s); j++) begin
        if (p + j < int'(c.w)) begin
          if (j > 0) cw.stored[m] = (cw.stored[m] << 1) | lbit(d, c.w, p + j);
          d[c.w - 1 - (p + j)] = 1'b0;
        end else if (j > 0) begin
          cw.stored[m] = cw.stored[m] << 1;  // past the end of the word
        end
      end
    end
    cw.count = seq_len;
    return d == 0;
  endfunction

  function automatic int unsigned cw_len(cfg_t c, cw_t cw);
    int unsigned n;
    if (cw.kind == 0) return 1 + c.w;
    if (cw.kind == 1) return 2 + selw(c.depth);
    n = 2 + selw(c.max_masks) + selw(c.depth);
    for (int m = 0; m < int'(cw.count); m++)
      n += selw(c.num_types) + $clog2(c.w) + msize(c, cw.mtype[m]) - 1;
    return n;
  endfunction

  // compress one word against the dictionary
  function automatic cw_t encode(cfg_t c, logic [63:0] x, logic [63:0] dict[$]);
    cw_t best, cand;
    int unsigned best_len;
    int unsigned seq[4];
    int unsigned ntypes = (c.num_types > 1) ? 2 : 1;
    best.kind = 0; best.index = 0; best.count = 0; best.xor_pat = 0;
    for (int m = 0; m < 4; m++) begin
      best.mtype[m] = 0; best.offset[m] = 0; best.stored[m] = 0;
    end
    best_len = 1 + c.w;
    foreach (dict[i]) begin
      logic [63:0] diff = x ^ dict[i];
      if (diff == 0) begin
        best.kind = 1; best.index = i; best.count = 0; best.xor_pat = 0;
        best_len = cw_len(c, best);
        break;
      end
      for (int unsigned n = 1; n <= c.max_masks; n++) begin
        int unsigned combos = ntypes ** n;
        for (int unsigned k = 0; k < combos; k++) begin
          int unsigned kk = k;
          for (int unsigned m = 0; m < n; m++) begin
            seq[m] = kk % ntypes; kk = kk / ntypes;
          end
          cand = best;
          cand.kind = 2; cand.index = i;
          if (try_cover(c, diff, seq, n, cand)) begin
            cand.xor_pat = diff;
            if (cw_len(c, cand) < best_len) begin
              best = cand; best_len = cw_len(c, cand);
            end
          end
        end
      end
    end
    emit(c, best, x);
    return best;
  endfunction

  // a test word: a dictionary entry used as is, with a few nearby bits
  // flipped, with two distant bits flipped, with its last bit flipped, or a
  // random word
  function automatic logic [63:0] make_word(cfg_t c, logic [63:0] dict[$]);
    logic [63:0] x = dict[$urandom_range(dict.size() - 1)];
    int unsigned r = $urandom_range(99);
    int unsigned p;
    if (r < 25) begin
      // exact match
    end else if (r < 55) begin
      p = $urandom_range(c.w - 1);
      x[c.w - 1 - p] ^= 1'b1;
      if (p + 1 < c.w) x[c.w - 2 - p] ^= 1'($urandom);
      if (p + 2 < c.w && c.num_types > 1 && c.size1 > 2) x[c.w - 3 - p] ^= 1'($urandom);
    end else if (r < 75) begin
      p = $urandom_range(c.w / 2 - 1);
      x[c.w - 1 - p] ^= 1'b1;
      p = $urandom_range(c.w - 1, c.w / 2 + 3);
      x[c.w - 1 - p] ^= 1'b1;
    end else if (r < 82) begin
      x[0] ^= 1'b1;
    end else begin
      x = {$urandom, $urandom};
    end
    return x & ((64'(1) << c.w) - 1);
  endfunction

  // the codewords of a list of words, packed into in_w-bit stream words and
  // padded with zeros
  function automatic void pack(cfg_t c, int unsigned in_w, logic [63:0] words[$],
                               logic [63:0] dict[$], ref logic [63:0] stream[$]);
    bit bits [$];
    cw_t cw;
    stream.delete();
    foreach (words[k]) begin
      cw = encode(c, words[k], dict);
      foreach (cw.bits[b]) bits.push_back(cw.bits[b]);
    end
    while (bits.size() % in_w != 0) bits.push_back(1'b0);
    for (int i = 0; i < bits.size(); i += in_w) begin
      logic [63:0] v = 0;
      for (int j = 0; j < int'(in_w); j++) v = (v << 1) | 64'(bits[i + j]);
      stream.push_back(v);
    end
  endfunction

endpackage
