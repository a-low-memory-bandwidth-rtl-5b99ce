// gmm_ref_pkg: reference arithmetic and stimulus generators for the GMM
// processor testbenches.
//
// The reference functions are written directly from the equations the
// hardware implements (log-add with a 1/32-step correction table, the
// diagonal-Gaussian score w + sum (x-mu)^2 sigma in 24-bit fixed point with
// 10 fractional bits, and the 4-way addlog tree folded over mixture groups),
// using plain integer/real arithmetic rather than the RTL's structure. The
// generators give deterministic pseudo-random GMM parameters per memory word
// and feature values per (frame, dimension), so no data files are needed.
package gmm_ref_pkg;

  localparam int FRAC = 10;
  localparam longint FXMAX = (64'sd1 <<< 23) - 1;
  localparam longint FXMIN = -(64'sd1 <<< 23);

  function automatic longint sat24(input longint v);
    if (v > FXMAX) return FXMAX;
    if (v < FXMIN) return FXMIN;
    return v;
  endfunction

  function automatic logic signed [23:0] to24(input longint v);
    return 24'(sat24(v));
  endfunction

  // ln(1 + e^-d) correction, d in fixed point
  function automatic longint corr_ref(input longint d);
    longint idx;
    real    c;
    idx = d / 32;              // 1/32 step with 10 fractional bits
    if (idx >= 256) return 0;
    c = $ln(1.0 + $exp(-((real'(idx) + 0.5) / 32.0)));
    return longint'($rtoi(c * 1024.0 + 0.5));
  endfunction

  function automatic longint addlog_ref(input longint a, input longint b);
    longint m, d;
    m = (a > b) ? a : b;
    d = (a > b) ? a - b : b - a;
    return sat24(m + corr_ref(d));
  endfunction

  // one dimension term of a Gaussian, floor division as an arithmetic shift
  function automatic longint gterm_ref(input longint x, input longint mu, input longint sg);
    longint diff, sq, p;
    diff = x - mu;
    sq   = (diff * diff) >>> FRAC;
    p    = sq * sg;
    return p >>> FRAC;
  endfunction

  // ---- deterministic generators ------------------------------------------------
  function automatic int unsigned mix32(input int unsigned v);
    int unsigned h;
    h = v ^ 32'h9E3779B9;
    h = h ^ (h >> 16);
    h = h * 32'h7FEB352D;
    h = h ^ (h >> 15);
    h = h * 32'h846CA68B;
    h = h ^ (h >> 16);
    return h;
  endfunction

  // value in [lo, hi] from a hash
  function automatic longint pick(input int unsigned h, input longint lo, input longint hi);
    longint span;
    span = hi - lo + 1;
    return lo + (longint'(h) % span);
  endfunction

  // Parameter word content, 4 mixtures: element k of word 'addr', with
  // 'pos' = position in its group (0 = w word). Returns mu/w and sigma.
  function automatic longint gen_mu(input int unsigned addr, input int k, input int pos);
    int unsigned h;
    h = mix32(addr * 8 + k);
    if (pos == 0) return pick(h, -16 * 1024, -1024);        // w in [-16, -1]
    return pick(h, -3 * 1024, 3 * 1024);                    // mu in [-3, 3]
  endfunction

  function automatic longint gen_sigma(input int unsigned addr, input int k, input int pos);
    int unsigned h;
    if (pos == 0) return 0;
    h = mix32(addr * 8 + k + 4);
    return pick(h, -512, -16);                              // [-0.5, -1/64]
  endfunction

  function automatic longint gen_x(input int frame, input int dim);
    return pick(mix32(32'hABC00000 + frame * 64 + dim), -4 * 1024, 4 * 1024);
  endfunction

  // Reference ln b_j(x_frame) for 'state' with P dims and MIX mixtures,
  // parameters laid out from memory address state*(MIX/4)*(P+1).
  function automatic longint gmm_ref(input int state, input int frame, input int P, input int MIX);
    int unsigned base, a;
    longint s [4];
    longint run, l2;
    base = state * (MIX / 4) * (P + 1);
    run  = 0;
    for (int g = 0; g < MIX / 4; g++) begin
      for (int k = 0; k < 4; k++) begin
        a    = base + g * (P + 1);
        s[k] = gen_mu(a, k, 0);
        for (int d = 0; d < P; d++)
          s[k] += gterm_ref(gen_x(frame, d), gen_mu(a + d + 1, k, d + 1),
                            gen_sigma(a + d + 1, k, d + 1));
        s[k] = sat24(s[k]);
      end
      l2  = addlog_ref(addlog_ref(s[0], s[1]), addlog_ref(s[2], s[3]));
      run = (g == 0) ? l2 : addlog_ref(run, l2);
    end
    return run;
  endfunction

endpackage
