// gmm_lane: GMM output probability ln b_j(x) for one feature vector.
//
// Four gauss_unit instances evaluate four mixtures of the same GMM in
// parallel on the same vector; the parameter word broadcast from memory gives
// each unit its own w (group word 0) or mu/sigma (group words 1..P). When the
// four scores of a group appear, addlog_tree folds them into the running
// log-sum. The lane is replicated once per buffered vector (present plus
// look-ahead), all lanes sharing the parameter stream, which is what lets one
// parameter fetch serve several frames.
//
// Timing: a group of P+1 beats (w, then P dimensions) yields its scores two
// cycles after its last beat; the GMM result (result_valid) follows one cycle
// after the scores of the group flagged grp_last. grp_first/grp_last are
// sampled with the group's last dimension beat. Four Gaussians per vector
// and one parameter stream shared by all vectors follow the architecture;
// the beat protocol is this design's own.
module gmm_lane
  import gmm_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        load_w,
  input  logic        dim_valid,
  input  logic        dim_last,
  input  logic        grp_first,
  input  logic        grp_last,
  input  fx_t         x,            // this lane's vector, current dimension
  input  param_word_t pw,           // broadcast parameter word
  output fx_t         result,
  output logic        result_valid
);

  fx_t  [NPAR-1:0] score;
  logic [NPAR-1:0] score_valid;
  logic            first_q, last_q;

  for (genvar k = 0; k < NPAR; k++) begin : g_unit
    gauss_unit u_gauss (
      .clk, .rst_n,
      .load_w, .w(pw.mu[k]),
      .dim_valid, .dim_last,
      .x, .mu(pw.mu[k]), .sigma(pw.sigma[k]),
      .score(score[k]), .score_valid(score_valid[k])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      first_q <= 1'b0;
      last_q  <= 1'b0;
    end else if (dim_valid && dim_last) begin
      first_q <= grp_first;
      last_q  <= grp_last;
    end
  end

  addlog_tree u_tree (
    .clk, .rst_n,
    .in_valid(score_valid[0]),
    .first(first_q), .last(last_q),
    .s(score),
    .result, .result_valid
  );

  // All four units see the same beats, so their scores appear together.
  a_units_in_step: assert property (@(posedge clk) disable iff (!rst_n)
    score_valid == '0 || score_valid == '1)
    else $error("gauss units out of step");

endmodule
