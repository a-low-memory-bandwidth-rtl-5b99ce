// addlog_tree: combines the four mixture log-likelihoods produced in parallel
// into the log of their sum, and accumulates successive groups of four
// mixtures into the GMM output probability ln b_j(x).
//
// Four two-input addlog units work at the same time: two on the pairs
// (s0,s1) and (s2,s3), one on their two results, and one folding that group
// result into the running value. A beat with first set starts a new GMM; the
// beat with last set delivers the finished value one cycle later
// (result_valid for one cycle). One beat per cycle is accepted.
// Four units splitting four inputs into two pairs is the architecture's
// scheme; using the fourth unit as the group accumulator, and the single
// register stage, are this design's choices.
module addlog_tree
  import gmm_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic                first,    // first mixture group of a GMM
  input  logic                last,     // last mixture group of a GMM
  input  fx_t  [NPAR-1:0]     s,        // one score per parallel mixture
  output fx_t                 result,
  output logic                result_valid
);

  fx_t l1a, l1b, l2, folded, run;

  addlog u_l1a  (.a(s[0]), .b(s[1]), .y(l1a));
  addlog u_l1b  (.a(s[2]), .b(s[3]), .y(l1b));
  addlog u_l2   (.a(l1a),  .b(l1b),  .y(l2));
  addlog u_fold (.a(run),  .b(l2),   .y(folded));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run          <= '0;
      result       <= '0;
      result_valid <= 1'b0;
    end else begin
      result_valid <= 1'b0;
      if (in_valid) begin
        run <= first ? l2 : folded;
        if (last) begin
          result       <= first ? l2 : folded;
          result_valid <= 1'b1;
        end
      end
    end
  end

  initial assert (NPAR == 4) else $error("addlog_tree is built for four inputs");

endmodule
