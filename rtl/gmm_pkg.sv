// gmm_pkg: constants and types shared by the GMM output-probability processor.
//
// All likelihood arithmetic is signed 24-bit fixed point (the word width the
// design uses for feature vectors), with FRAC_BITS fractional bits, in the
// natural-log domain. A GMM parameter memory word carries, for the four
// mixtures computed in parallel, either the four mixture constants w (word 0 of
// a mixture group) or, for one feature dimension, the four means mu and the
// four precision coefficients sigma (words 1..P of the group). The default
// model sizes (25 dimensions, 16 mixtures, 2048 states) are this design's own
// choice of a typical large-vocabulary acoustic model; the parallelism of four,
// the look-ahead depth of seven and the 24-bit words follow the architecture.
package gmm_pkg;

  // ---- word format ---------------------------------------------------------
  localparam int DATA_W    = 24;   // feature vector / likelihood word width
  localparam int FRAC_BITS = 10;   // fractional bits of every fixed-point word
  typedef logic signed [DATA_W-1:0] fx_t;

  localparam fx_t FX_MAX = fx_t'({1'b0, {(DATA_W-1){1'b1}}});
  localparam fx_t FX_MIN = fx_t'({1'b1, {(DATA_W-1){1'b0}}});

  // ---- architecture ----------------------------------------------------------
  localparam int NPAR      = 4;    // Gaussians (mixtures) computed in parallel
  localparam int LOOKAHEAD = 7;    // look-ahead vectors n
  localparam int NVEC      = LOOKAHEAD + 1;  // present vector + look-ahead

  // ---- default model size ----------------------------------------------------
  localparam int P_DIM     = 25;   // feature vector dimensions
  localparam int N_MIX     = 16;   // mixtures per GMM (multiple of NPAR)
  localparam int N_STATE   = 2048; // HMM states (one GMM each)
  localparam int FRAME_W   = 16;   // frame counter width

  // ---- parameter memory word ---------------------------------------------------
  // Word 0 of a group: mu[k] holds w of mixture k, sigma[k] unused (zero).
  // Word d+1 of a group: mu[k] / sigma[k] of mixture k, dimension d.
  typedef struct packed {
    fx_t [NPAR-1:0] mu;
    fx_t [NPAR-1:0] sigma;
  } param_word_t;

  // ---- addlog look-up table ------------------------------------------------------
  // f(d) = ln(1 + exp(-d)) for d = |a - b| >= 0, sampled at the centre of
  // each step of 2^-LUT_STEP_LOG2; beyond LUT_N steps f is taken as zero.
  localparam int LUT_STEP_LOG2 = 5;                        // step = 1/32
  localparam int LUT_N         = 256;                      // covers d < 8.0
  localparam int LUT_W         = FRAC_BITS;                // f(0) = ln 2 < 1
  localparam int LUT_SHIFT     = FRAC_BITS - LUT_STEP_LOG2;

  function automatic logic [LUT_N-1:0][LUT_W-1:0] addlog_lut_init();
    logic [LUT_N-1:0][LUT_W-1:0] t;
    real d;
    for (int i = 0; i < LUT_N; i++) begin
      d    = (real'(i) + 0.5) / real'(2 ** LUT_STEP_LOG2);
      t[i] = LUT_W'($rtoi($ln(1.0 + $exp(-d)) * real'(2 ** FRAC_BITS) + 0.5));
    end
    return t;
  endfunction

  // Saturate a wide signed value to the fixed-point word.
  function automatic fx_t sat_fx(input logic signed [63:0] v);
    if (v > 64'(signed'(FX_MAX))) return FX_MAX;
    if (v < 64'(signed'(FX_MIN))) return FX_MIN;
    return fx_t'(v);
  endfunction

endpackage
