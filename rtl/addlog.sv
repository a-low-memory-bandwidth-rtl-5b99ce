// addlog: two-input log-add, out ~= ln(exp(a) + exp(b)).
//
// Uses the identity ln(e^a + e^b) = max(a,b) + ln(1 + e^-|a-b|). The
// correction term is read from a look-up table indexed by the top bits of
// |a-b| (step 1/32, 256 entries, so |a-b| >= 8 adds nothing); the table is
// computed at elaboration from that formula. The LUT-based two-input unit is
// the architecture's building block for the log of a sum of mixture terms;
// the table size, step and rounding are this design's choice.
//
// Interface: a, b, y are gmm_pkg::fx_t (signed 24-bit, FRAC_BITS fraction).
// Timing: purely combinational; y saturates at the largest fx_t value.
module addlog
  import gmm_pkg::*;
(
  input  fx_t a,
  input  fx_t b,
  output fx_t y
);

  localparam logic [LUT_N-1:0][LUT_W-1:0] LUT = addlog_lut_init();
  localparam int IDX_W = $clog2(LUT_N);

  fx_t                    mx;
  logic [DATA_W:0]        diff;      // |a - b|, one bit wider than a word
  logic [IDX_W-1:0]       idx;
  logic                   in_range;
  logic [LUT_W-1:0]       corr;

  always_comb begin
    if (a >= b) begin
      mx   = a;
      diff = (DATA_W+1)'(signed'({a[DATA_W-1], a}) - signed'({b[DATA_W-1], b}));
    end else begin
      mx   = b;
      diff = (DATA_W+1)'(signed'({b[DATA_W-1], b}) - signed'({a[DATA_W-1], a}));
    end
    in_range = (diff >> LUT_SHIFT) < (DATA_W+1)'(LUT_N);
    idx      = IDX_W'(diff >> LUT_SHIFT);
    corr     = in_range ? LUT[idx] : '0;
    y        = sat_fx(64'(mx) + 64'(corr));
  end

endmodule
