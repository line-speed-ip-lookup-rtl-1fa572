// Reference models for the augmented ALU testbenches.
//
// Every function here is written bit by bit from the definitions of the
// instructions, independently of the RTL, so that the testbenches compare
// the hardware against a second, plainly different implementation. Widths
// are fixed at 32 bits, the ALU's default.
package alu_ref_pkg;

  typedef logic [31:0] word_t;

  // Hosm-Format word of a prefix: value bits above, then 0, then ones.
  // Lengths above 31 are taken as 31; value bits below the prefix are ignored.
  function automatic word_t ref_cpr(word_t v, word_t len);
    int L;
    word_t w;
    L = (len > 31) ? 31 : int'(len);
    for (int i = 31; i >= 0; i--) begin
      if (i > 31 - L)       w[i] = v[i];
      else if (i == 31 - L) w[i] = 1'b0;
      else                  w[i] = 1'b1;
    end
    return w;
  endfunction

  // Position of the lowest zero bit, or -1 when the word is all ones.
  function automatic int lowest_zero(word_t w);
    for (int i = 0; i < 32; i++) if (!w[i]) return i;
    return -1;
  endfunction

  function automatic int ref_lpr(word_t w);
    int z;
    z = lowest_zero(w);
    return (z < 0) ? 0 : 31 - z;
  endfunction

  function automatic word_t ref_vpr(word_t w);
    int L;
    word_t v;
    L = ref_lpr(w);
    v = '0;
    for (int i = 0; i < L; i++) v[31-i] = w[31-i];
    return v;
  endfunction

  // Does the Hosm prefix w match address ip? Bitwise compare of the top L bits.
  function automatic bit ref_mpr(word_t w, word_t ip);
    int L;
    L = ref_lpr(w);
    for (int i = 0; i < L; i++) if (w[31-i] != ip[31-i]) return 1'b0;
    return 1'b1;
  endfunction

  // MASK[s,l] applied in place.
  function automatic word_t ref_ebis(word_t a, int s, int l);
    word_t r;
    r = '0;
    for (int i = 0; i < 32; i++) if (i >= s && i < s + l) r[i] = a[i];
    return r;
  endfunction

  // Field of l bits starting at bit s, moved to bit 0.
  function automatic word_t ref_ebia(word_t a, int s, int l);
    word_t r;
    r = '0;
    for (int i = 0; i < l; i++) if (i + s < 32) r[i] = a[i+s];
    return r;
  endfunction

  // Definition 1 prefix order on (value, length) pairs; values left-aligned.
  // Returns -1, 0 or +1 for A < B, A = B, A > B.
  function automatic int ref_def1_cmp(word_t av, int al, word_t bv, int bl);
    int m;
    m = (al < bl) ? al : bl;
    for (int i = 0; i < m; i++) begin
      if (av[31-i] != bv[31-i]) return av[31-i] ? 1 : -1;
    end
    if (al == bl) return 0;
    // the longer prefix is larger when its next bit is 1
    if (al > bl) return av[31-m] ? 1 : -1;
    else         return bv[31-m] ? -1 : 1;
  endfunction

endpackage
