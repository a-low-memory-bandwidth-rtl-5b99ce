// gauss_unit: log-likelihood of one diagonal-covariance Gaussian mixture term,
//   s = w + sum_{d=1..P} (x_d - mu_d)^2 * sigma_d,
// where w (log mixture weight plus log normalisation) and sigma
// (= -1/(2 var), negative) are prepared offline, so each dimension takes one
// subtraction, two multiplications and one accumulation.
//
// Two pipeline stages: stage 1 registers (x - mu)^2 (rescaled to FRAC_BITS)
// with sigma; stage 2 multiplies by sigma and accumulates in a 48-bit register.
// A load_w beat (re)starts the accumulator with w; dim beats follow one per
// cycle or with gaps; the beat flagged last produces score/score_valid two
// cycles after it entered. The score saturates to fx_t. The pipeline split,
// accumulator width and saturation are this design's choices.
module gauss_unit
  import gmm_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic load_w,      // beat carries the mixture constant w
  input  fx_t  w,
  input  logic dim_valid,   // beat carries one dimension
  input  logic dim_last,    // ... and it is the last dimension
  input  fx_t  x,
  input  fx_t  mu,
  input  fx_t  sigma,
  output fx_t  score,
  output logic score_valid
);

  localparam int SQ_W  = 2 * (DATA_W + 1) - FRAC_BITS;  // rescaled square
  localparam int ACC_W = 48;

  // stage 1
  logic                   s1_load, s1_dim, s1_last;
  fx_t                    s1_w, s1_sigma;
  logic [SQ_W-1:0]        s1_sq;

  logic signed [2*(DATA_W+1)-1:0] diff;       // x - mu, sign-extended
  logic signed [2*(DATA_W+1)-1:0] sq_full;    // (x - mu)^2, never negative

  always_comb begin
    diff    = (2*(DATA_W+1))'(x) - (2*(DATA_W+1))'(mu);
    sq_full = diff * diff;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_load  <= 1'b0;
      s1_dim   <= 1'b0;
      s1_last  <= 1'b0;
      s1_w     <= '0;
      s1_sigma <= '0;
      s1_sq    <= '0;
    end else begin
      s1_load  <= load_w;
      s1_dim   <= dim_valid;
      s1_last  <= dim_valid & dim_last;
      s1_w     <= w;
      s1_sigma <= sigma;
      s1_sq    <= SQ_W'(sq_full >>> FRAC_BITS);
    end
  end

  // stage 2
  logic signed [ACC_W-1:0]      acc;
  logic signed [SQ_W+DATA_W:0]  prod;
  logic signed [ACC_W-1:0]      acc_next;

  always_comb begin
    prod     = signed'({1'b0, s1_sq}) * (SQ_W+DATA_W+1)'(s1_sigma);
    acc_next = acc + ACC_W'(prod >>> FRAC_BITS);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc         <= '0;
      score       <= '0;
      score_valid <= 1'b0;
    end else begin
      score_valid <= 1'b0;
      if (s1_load) begin
        acc <= ACC_W'(s1_w);
      end else if (s1_dim) begin
        acc <= acc_next;
        if (s1_last) begin
          score       <= sat_fx(64'(acc_next));
          score_valid <= 1'b1;
        end
      end
    end
  end

endmodule
