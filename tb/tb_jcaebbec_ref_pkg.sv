// tb_jcaebbec_ref_pkg: reference model of the JCAEBBEC code for the
// testbenches, written independently of the RTL for the 32-bit default.
//
// Encoding is spelled out with message and redundant bit indices: redundant
// bits are numbered row by row (R[3r], R[3r+1], R[3r+2] belong to row r) and
// placed on the copy as columns M0-7, M8-15, M16-23, third parities,
// M24-31, second parities, first parities. Decoding of a row is done by brute
// force: the 4-bit value whose code row is nearest to what was received
// (Hamming(7,4) is perfect, so that distance is always 0 or 1). The checker
// rules (agreement, fewer implied bit errors, tie -> uncorrectable) are
// restated here from the design's specification.
package tb_jcaebbec_ref_pkg;

  function automatic logic [55:0] ref_encode(input logic [31:0] m);
    logic [23:0] rr;
    logic [55:0] c;
    for (int r = 0; r < 8; r++) begin
      rr[3*r]   = m[r] ^ m[r+8]  ^ m[r+24];
      rr[3*r+1] = m[r] ^ m[r+16] ^ m[r+24];
      rr[3*r+2] = m[r+8] ^ m[r+16] ^ m[r+24];
    end
    for (int r = 0; r < 8; r++) begin
      c[r]      = m[r];
      c[8+r]    = m[8+r];
      c[16+r]   = m[16+r];
      c[24+r]   = rr[3*r+2];
      c[32+r]   = m[24+r];
      c[40+r]   = rr[3*r+1];
      c[48+r]   = rr[3*r];
    end
    return c;
  endfunction

  function automatic logic [111:0] ref_link(input logic [31:0] m);
    logic [55:0]  c;
    logic [111:0] w;
    c = ref_encode(m);
    for (int i = 0; i < 56; i++) begin
      w[2*i]   = c[i];
      w[2*i+1] = c[i];
    end
    return w;
  endfunction

  // Row r of a copy as 7 bits, slot order of the columns.
  function automatic logic [6:0] ref_row(input logic [55:0] c, input int r);
    logic [6:0] x;
    for (int s = 0; s < 7; s++) x[s] = c[8*s + r];
    return x;
  endfunction

  // Nearest-codeword decoding of one copy.
  task automatic ref_decode_copy(input logic [55:0] c, output logic [31:0] d,
                                 output int nflag, output logic [7:0] flags);
    nflag = 0;
    flags = '0;
    d     = '0;
    for (int r = 0; r < 8; r++) begin
      logic [6:0] rx;
      int         best_dist;
      logic [3:0] best;
      rx        = ref_row(c, r);
      best_dist = 99;
      best      = '0;
      for (int v = 0; v < 16; v++) begin
        logic [31:0] m;
        int          hd;
        m = '0;
        m[r] = v[0]; m[r+8] = v[1]; m[r+16] = v[2]; m[r+24] = v[3];
        hd = $countones(ref_row(ref_encode(m), r) ^ rx);
        if (hd < best_dist) begin
          best_dist = hd;
          best      = v[3:0];
        end
      end
      d[r] = best[0]; d[r+8] = best[1]; d[r+16] = best[2]; d[r+24] = best[3];
      if (best_dist != 0) begin
        nflag++;
        flags[r] = 1'b1;
      end
    end
  endtask

  // Whole decoder: de-interleave, decode both copies, choose.
  task automatic ref_decode_link(input logic [111:0] w, output logic [31:0] d,
                                 output logic sel_b, output logic unc,
                                 output int na, output int nb);
    logic [55:0] ca, cb;
    logic [31:0] da, db;
    logic [7:0]  fa, fb;
    int          ta, tb;
    for (int i = 0; i < 56; i++) begin
      ca[i] = w[2*i];
      cb[i] = w[2*i+1];
    end
    ref_decode_copy(ca, da, na, fa);
    ref_decode_copy(cb, db, nb, fb);
    // Received bit errors each proposal implies over both copies.
    ta    = $countones(ref_encode(da) ^ ca) + $countones(ref_encode(da) ^ cb);
    tb    = $countones(ref_encode(db) ^ ca) + $countones(ref_encode(db) ^ cb);
    sel_b = (da != db) && (tb < ta);
    unc   = (da != db) && (ta == tb);
    d     = sel_b ? db : da;
  endtask

  // Random pattern of exactly k ones in a 112-bit word.
  function automatic logic [111:0] rand_errors(input int k);
    logic [111:0] e;
    int           n;
    e = '0;
    n = 0;
    while (n < k) begin
      int p;
      p = int'($urandom_range(111, 0));
      if (!e[p]) begin
        e[p] = 1'b1;
        n++;
      end
    end
    return e;
  endfunction

  // Burst of length len starting at wire start: the first and last wire of
  // the window are flipped, the ones between are flipped at random, or all of
  // them when solid is set.
  function automatic logic [111:0] burst_errors(input int start, input int len,
                                                input bit solid);
    logic [111:0] e;
    e = '0;
    for (int i = start; i < start + len && i < 112; i++)
      e[i] = solid || (i == start) || (i == start + len - 1) || ($urandom_range(1, 0) == 1);
    return e;
  endfunction

endpackage
