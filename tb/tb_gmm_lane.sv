// tb_gmm_lane: streams complete GMMs (16 mixtures = 4 groups of w + 25
// dimensions) through one lane, from the generated parameter set, and checks
// ln b_j(x) against the reference model and the lane latency (result three
// cycles after the last beat when beats are back to back).
module tb_gmm_lane;
  import gmm_pkg::*;
  import gmm_ref_pkg::*;

  localparam int P = 25, MIX = 16, G = MIX / NPAR;

  logic clk = 0, rst_n = 0;
  logic load_w = 0, dim_valid = 0, dim_last = 0, grp_first = 0, grp_last = 0;
  fx_t  x = '0;
  param_word_t pw = '0;
  fx_t  result;
  logic result_valid;
  int   checks = 0, failures = 0;

  gmm_lane dut (.*);

  always #5 clk = ~clk;

  task automatic run_one(input int state, input int frame, input bit gaps);
    int unsigned a;
    longint exp_v;
    int lat;
    exp_v = gmm_ref(state, frame, P, MIX);
    for (int g = 0; g < G; g++) begin
      for (int pos = 0; pos <= P; pos++) begin
        if (gaps) repeat ($urandom_range(0, 1)) begin
          load_w = 0; dim_valid = 0; @(negedge clk);
        end
        a = state * G * (P + 1) + g * (P + 1) + pos;
        for (int k = 0; k < NPAR; k++) begin
          pw.mu[k]    = to24(gen_mu(a, k, pos));
          pw.sigma[k] = to24(gen_sigma(a, k, pos));
        end
        load_w    = (pos == 0);
        dim_valid = (pos != 0);
        dim_last  = (pos == P);
        grp_first = (g == 0);
        grp_last  = (g == G - 1);
        x         = (pos == 0) ? '0 : to24(gen_x(frame, pos - 1));
        @(negedge clk);
      end
    end
    load_w = 0; dim_valid = 0; dim_last = 0;
    lat = 1;
    while (!result_valid && lat < 8) begin @(negedge clk); lat++; end
    checks++;
    if (longint'(result) != exp_v) begin
      failures++; $display("FAIL state %0d frame %0d: %0d expected %0d", state, frame, result, exp_v);
    end
    if (!gaps) begin
      checks++;
      if (lat != 3) begin failures++; $display("FAIL latency %0d", lat); end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 40; i++) run_one($urandom_range(0, 2047), $urandom_range(0, 500), i[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
