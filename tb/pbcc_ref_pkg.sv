// pbcc_ref_pkg: reference model of the bit-plane comparison codec for the
// testbenches, plus a stimulus generator.
//
// The model is written arithmetically rather than plane by plane:
//  - the start plane of a mode is the longest prefix (0..3 bits) of every
//    pixel that equals the mode's 3-bit prefix {m[1], m[0], 0};
//  - rounding to n coded bits below the start plane is
//    min((low + 2^(s-1)) >> s, 2^n - 1), where low is the pixel without its
//    skipped bits and s = 8 - sp - n the number of truncated bits;
//  - a half hits a group when each of its four planes is one of the group's
//    patterns; otherwise three planes are stored raw.
// Segment layout: {mode, sp, pat_l, pat_r, data_l, data_r}.
package pbcc_ref_pkg;

  typedef logic [7:0] pix8_t;
  typedef pix8_t [7:0] blk8_t;

  // Pattern groups A, B, C; entry n is pattern number n+1.
  localparam logic [3:0] GRP [3][8] = '{
    '{4'b0000, 4'b1111, 4'b1110, 4'b0111, 4'b0011, 4'b1100, 4'b0001, 4'b1000},
    '{4'b0000, 4'b1111, 4'b1110, 4'b0111, 4'b1010, 4'b1001, 4'b0110, 4'b0101},
    '{4'b0000, 4'b1111, 4'b1110, 4'b0111, 4'b1101, 4'b1011, 4'b0010, 4'b0100}
  };

  // Truncation: returns the type (1..5) and the clamped block.
  function automatic int ref_trunc(input blk8_t b, output blk8_t o);
    int sum, mx, mn, avg, diff, lo, hi, t;
    sum = 0; mx = 0; mn = 255;
    foreach (b[i]) begin
      sum += int'(b[i]);
      if (int'(b[i]) > mx) mx = int'(b[i]);
      if (int'(b[i]) < mn) mn = int'(b[i]);
    end
    avg  = sum / 8;
    diff = mx - mn;
    t    = 5;
    if (avg < 64 && diff < 32)       begin t = 1; lo = 0;   hi = 63;  end
    else if (avg >= 64 && avg < 128 && diff < 64)
                                     begin t = 2; lo = 64;  hi = 127; end
    else if (avg >= 128 && avg < 192 && diff < 64)
                                     begin t = 3; lo = 128; hi = 191; end
    else if (avg >= 192 && diff < 32) begin t = 4; lo = 192; hi = 255; end
    foreach (b[i]) begin
      int v;
      v = int'(b[i]);
      if (t != 5) begin
        if (v < lo) v = lo;
        if (v > hi) v = hi;
      end
      o[i] = pix8_t'(v);
    end
    return t;
  endfunction

  // Mode (0..3) and start plane of a truncated block.
  function automatic void ref_select(input blk8_t b, output int mode, output int sp);
    mode = 0; sp = -1;
    for (int m = 0; m < 4; m++) begin
      int pref, s;
      pref = (m << 1);               // {m[1], m[0], 0}
      s = 0;
      for (int c = 1; c <= 3; c++) begin
        bit ok;
        ok = 1;
        foreach (b[i]) if ((int'(b[i]) >> (8 - c)) != (pref >> (3 - c))) ok = 0;
        if (ok) s = c; else break;
      end
      if (s > sp) begin sp = s; mode = m; end
    end
  endfunction

  // Coded value of pixel p with n bits below start plane sp, rounded.
  function automatic int ref_round(int p, int sp, int n);
    int low, s, r;
    low = p & ((1 << (8 - sp)) - 1);
    s   = 8 - sp - n;
    r   = (low + (1 << (s - 1))) >> s;
    if (r > (1 << n) - 1) r = (1 << n) - 1;
    return r;
  endfunction

  // Plane j (0 = start plane) of n-bit codes c[0..3] as a nibble, c[0] in bit 3.
  function automatic logic [3:0] ref_plane(int c[4], int n, int j);
    logic [3:0] r;
    for (int i = 0; i < 4; i++) r[3-i] = 1'((c[i] >> (n - 1 - j)) & 1);
    return r;
  endfunction

  // Encode one half from its rounded codes (c4: 4-bit, c3: 3-bit, pixel 0
  // first): returns the pattern field, the coded data via output.
  function automatic int ref_half_codes(int c4[4], int c3[4], output logic [11:0] data);
    for (int g = 0; g < 3; g++) begin
      int idx[4];
      bit all;
      all = 1;
      for (int j = 0; j < 4; j++) begin
        idx[j] = -1;
        for (int n = 0; n < 8; n++) if (GRP[g][n] == ref_plane(c4, 4, j)) idx[j] = n;
        if (idx[j] < 0) all = 0;
      end
      if (all) begin
        data = {3'(idx[0]), 3'(idx[1]), 3'(idx[2]), 3'(idx[3])};
        return g;
      end
    end
    data = {ref_plane(c3, 3, 0), ref_plane(c3, 3, 1), ref_plane(c3, 3, 2)};
    return 3;
  endfunction

  // Encode half h (0 = left) of truncated block t.
  function automatic int ref_half(blk8_t t, int h, int sp, output logic [11:0] data);
    int c4[4], c3[4];
    for (int i = 0; i < 4; i++) begin
      c4[i] = ref_round(int'(t[4*h+i]), sp, 4);
      c3[i] = ref_round(int'(t[4*h+i]), sp, 3);
    end
    return ref_half_codes(c4, c3, data);
  endfunction

  function automatic logic [31:0] ref_compress(blk8_t b);
    blk8_t t;
    int mode, sp, pl, pr;
    logic [11:0] dl, dr;
    void'(ref_trunc(b, t));
    ref_select(t, mode, sp);
    pl = ref_half(t, 0, sp, dl);
    pr = ref_half(t, 1, sp, dr);
    return {2'(mode), 2'(sp), 2'(pl), 2'(pr), dl, dr};
  endfunction

  function automatic blk8_t ref_decompress(logic [31:0] seg);
    blk8_t o;
    int mode, sp, pat[2];
    logic [11:0] d[2];
    mode = int'(seg[31:30]); sp = int'(seg[29:28]);
    pat[0] = int'(seg[27:26]); pat[1] = int'(seg[25:24]);
    d[0] = seg[23:12]; d[1] = seg[11:0];
    for (int h = 0; h < 2; h++)
      for (int i = 0; i < 4; i++) begin
        int code, n, v;
        code = 0;
        if (pat[h] == 3) begin
          n = 3;
          for (int j = 0; j < 3; j++)
            code = (code << 1) | int'(d[h][11 - 4*j - i]);
        end else begin
          n = 4;
          for (int j = 0; j < 4; j++)
            code = (code << 1) | int'(GRP[pat[h]][d[h][11 - 3*j -: 3]][3 - i]);
        end
        v = ((mode << 1) >> (3 - sp)) << (8 - sp);
        v = v | (code << (8 - sp - n));
        o[4*h+i] = pix8_t'(v);
      end
    return o;
  endfunction

  // Stimulus. kind 0: uniform random pixels; 1: smooth block around a random
  // level; 2: block built from the pattern groups below a mode prefix, so
  // that group hits, every mode and every start plane occur; 3: flat block.
  function automatic blk8_t gen_block(int kind);
    blk8_t b;
    case (kind)
      0: foreach (b[i]) b[i] = pix8_t'($urandom_range(255));
      1: begin
        int base, spread;
        base   = $urandom_range(255);
        spread = (int'($urandom_range(3)) == 0) ? 64 : 24;
        foreach (b[i]) begin
          int v;
          v = base + int'($urandom_range(spread)) - spread / 2;
          if (v < 0) v = 0;
          if (v > 255) v = 255;
          b[i] = pix8_t'(v);
        end
      end
      2: begin
        int m, sp, g;
        m  = $urandom_range(3);
        sp = $urandom_range(3);
        for (int h = 0; h < 2; h++) begin
          int idx[4];
          g = $urandom_range(2);
          for (int j = 0; j < 4; j++) idx[j] = $urandom_range(7);
          for (int i = 0; i < 4; i++) begin
            int v;
            v = ((m << 1) >> (3 - sp)) << (8 - sp);
            for (int j = 0; j < 4; j++)
              v |= int'(GRP[g][idx[j]][3 - i]) << (7 - sp - j);
            // low truncated bits: random only when they cannot round up
            if (int'($urandom_range(1)) == 1 && sp < 3)
              v |= int'($urandom_range((1 << (3 - sp)) - 1)) >> 1;
            b[4*h+i] = pix8_t'(v);
          end
        end
      end
      default: begin
        pix8_t v;
        v = pix8_t'($urandom_range(255));
        foreach (b[i]) b[i] = v;
      end
    endcase
    return b;
  endfunction

endpackage
