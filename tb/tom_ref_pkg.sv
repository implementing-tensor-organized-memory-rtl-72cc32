// tom_ref_pkg: reference models used by the TOM testbenches, written independently of
// the RTL at the default geometry (25-pixel patterns, 25 classes, 4 modules, 8 messages).
//
//   ref_dlbs_winner   : class with the most pixels equal to the pattern, if above smin
//   ref_normal_winner : cycle-by-cycle integration of every class neuron's potential in
//                       real arithmetic, u <- tr(tr(u*eta) + S) where S is the overlap on the
//                       clocks where the input layer fires (every SR_BITS+1 clocks) and 0
//                       otherwise, and tr() truncates to a 24-bit significand; the winner is
//                       the lowest class whose potential is at the threshold on the first
//                       clock any is, provided this happens within the window
//   fp2real, real2fp  : single-precision encodings (no subnormals, truncating) <-> real
//   ref_excite        : completes winners from stored messages, message by message
//   make_letters      : 25 random class patterns, pairwise at least MIN_DIST pixels apart
package tom_ref_pkg;
  localparam int unsigned PAT_LEN = 25, NUM_CLASS = 25, NUM_WTA = 4, MAX_MSG = 8, CLS_W = 5;
  localparam int unsigned SR_BITS = 6, WINDOW = 64;

  typedef logic [PAT_LEN-1:0]                     pat_t;
  typedef logic [NUM_CLASS-1:0][PAT_LEN-1:0]      rows_t;
  typedef logic [NUM_CLASS-1:0]                   onehot_t;
  typedef logic [NUM_WTA-1:0][NUM_CLASS-1:0]      wvec_t;
  typedef logic [MAX_MSG-1:0][NUM_WTA-1:0][CLS_W-1:0] mclass_t;

  function automatic onehot_t ref_dlbs_winner(pat_t p, rows_t w, int smin);
    int best, bv;
    best = -1; bv = smin;
    for (int j = 0; j < NUM_CLASS; j++) begin
      int a;
      a = PAT_LEN - $countones(p ^ w[j]);
      if (a > bv) begin bv = a; best = j; end
    end
    return (best < 0) ? '0 : (NUM_CLASS'(1) << best);
  endfunction

  function automatic real pow2(int e);
    real r;
    r = 1.0;
    for (int i = 0; i < e; i++) r = r * 2.0;
    for (int i = 0; i > e; i--) r = r / 2.0;
    return r;
  endfunction

  function automatic real fp2real(logic [31:0] b);
    if (b[30:23] == 8'd0) return 0.0;
    return (1.0 + real'(b[22:0]) / 8388608.0) * pow2(int'(b[30:23]) - 127);
  endfunction

  function automatic logic [31:0] real2fp(real x);
    int e;
    real m;
    if (x < pow2(-126)) return '0;
    e = 0;
    while (x >= pow2(e + 1)) e++;
    while (x < pow2(e)) e--;
    m = $floor((x / pow2(e) - 1.0) * 8388608.0);
    return {1'b0, 8'(e + 127), 23'(longint'(m))};
  endfunction

  function automatic real tr(real x);
    return fp2real(real2fp(x));
  endfunction

  // Returns the winner; first_edge reports the clock (after the clear) it is latched on.
  function automatic onehot_t ref_normal_winner(pat_t p, pat_t w1, rows_t w2, real eta,
                                                real gamma, output int first_edge);
    real u[NUM_CLASS];
    int s[NUM_CLASS];
    for (int j = 0; j < NUM_CLASS; j++) begin
      u[j] = 0.0;
      s[j] = $countones(p & w1 & w2[j]);
    end
    first_edge = -1;
    for (int e = 1; e <= int'(WINDOW); e++) begin
      for (int j = 0; j < NUM_CLASS; j++)
        if (u[j] >= gamma) begin
          first_edge = e;
          return NUM_CLASS'(1) << j;
        end
      for (int j = 0; j < NUM_CLASS; j++)
        u[j] = tr(tr(u[j] * eta) + ((e % (SR_BITS + 1) == 0) ? real'(s[j]) : 0.0));
    end
    return '0;
  endfunction

  function automatic wvec_t ref_excite(wvec_t win, logic [MAX_MSG-1:0] valid, mclass_t mc);
    wvec_t r;
    r = win;
    for (int m = 0; m < MAX_MSG; m++) begin
      if (!valid[m]) continue;
      for (int x = 0; x < NUM_WTA; x++) begin
        int others;
        others = 0;
        for (int y = 0; y < NUM_WTA; y++)
          if (y != x && win[y][mc[m][y]]) others++;
        if (others > 0) r[x][mc[m][x]] = 1'b1;
      end
    end
    return r;
  endfunction

  function automatic rows_t make_letters(int min_dist);
    rows_t w;
    for (int j = 0; j < NUM_CLASS; j++) begin
      bit ok;
      do begin
        w[j] = PAT_LEN'($urandom());
        ok = 1;
        for (int k = 0; k < j; k++) if ($countones(w[j] ^ w[k]) < min_dist) ok = 0;
      end while (!ok);
    end
    return w;
  endfunction

  // Flips each pixel with probability pct/100.
  function automatic pat_t add_noise(pat_t p, int pct);
    pat_t q;
    q = p;
    for (int i = 0; i < PAT_LEN; i++) if ($urandom_range(0, 99) < pct) q[i] = ~q[i];
    return q;
  endfunction
endpackage
