// tb_gauss_unit: feeds random Gaussians (w, then P dimensions, with random
// idle gaps between beats) and checks the score against the reference and
// that it appears exactly two cycles after the last dimension beat.
module tb_gauss_unit;
  import gmm_pkg::*;
  import gmm_ref_pkg::*;

  localparam int P = 25;

  logic clk = 0, rst_n = 0;
  logic load_w = 0, dim_valid = 0, dim_last = 0;
  fx_t  w = '0, x = '0, mu = '0, sigma = '0;
  fx_t  score;
  logic score_valid;
  int   checks = 0, failures = 0;

  gauss_unit dut (.*);

  always #5 clk = ~clk;

  task automatic run_one(input int gaps, input longint range_mu);
    longint vw, vx [P], vm [P], vs [P], exp_v;
    int     t_last, t_now;
    vw = longint'($urandom_range(0, 20000)) - 20000;
    exp_v = vw;
    for (int d = 0; d < P; d++) begin
      vx[d] = longint'($urandom_range(0, 2 * range_mu)) - range_mu;
      vm[d] = longint'($urandom_range(0, 2 * range_mu)) - range_mu;
      vs[d] = -longint'($urandom_range(1, 600));
      exp_v += gterm_ref(vx[d], vm[d], vs[d]);
    end
    exp_v = sat24(exp_v);
    @(negedge clk);
    load_w = 1; w = to24(vw);
    @(negedge clk);
    load_w = 0;
    for (int d = 0; d < P; d++) begin
      repeat (gaps ? $urandom_range(0, 2) : 0) begin
        dim_valid = 0; @(negedge clk);
      end
      dim_valid = 1; dim_last = (d == P - 1);
      x = to24(vx[d]); mu = to24(vm[d]); sigma = to24(vs[d]);
      @(negedge clk);
    end
    dim_valid = 0; dim_last = 0;
    t_last = 0;
    // score_valid must rise two cycles after the last beat was sampled
    for (t_now = 1; t_now <= 4; t_now++) begin
      if (score_valid) break;
      @(negedge clk);
    end
    checks++;
    if (t_now != 2) begin
      failures++; $display("FAIL latency %0d", t_now);
    end
    checks++;
    if (longint'(score) != exp_v) begin
      failures++; $display("FAIL score %0d expected %0d", score, exp_v);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 200; i++) run_one(i % 2, 4096);
    for (int i = 0; i < 20; i++) run_one(0, 4000000);    // saturating scores
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
