// tb_lookahead_sweep: the same 16-frame, 12-state-per-frame recognition
// trace run on processors of look-ahead depth 1, 3, 5 and 7 (default sizes
// otherwise). Checks every result against the reference and that memory
// reads and busy cycles fall as the depth grows; reports the reduction of
// parameter reads against a design without cache (every request a miss).
module tb_lookahead_sweep;
  import gmm_pkg::*;

  localparam int ND = 4;
  localparam int DEPTH [ND] = '{1, 3, 5, 7};
  localparam int TOTAL = (N_MIX / NPAR) * (P_DIM + 1);

  logic clk = 0, rst_n = 0;
  logic [ND-1:0] done;
  int   checks [ND], failures [ND], requests [ND], misses [ND], reads [ND], cycles [ND];
  int   n_checks = 0, n_fail = 0;

  always #5 clk = ~clk;

  for (genvar i = 0; i < ND; i++) begin : g_depth
    gmm_sweep_harness #(.LA(DEPTH[i])) u_h (
      .clk, .rst_n, .done(done[i]),
      .checks(checks[i]), .failures(failures[i]), .requests(requests[i]),
      .misses(misses[i]), .reads(reads[i]), .cycles(cycles[i])
    );
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (done == '1);
    for (int i = 0; i < ND; i++) begin
      n_checks += checks[i];
      n_fail   += failures[i];
      $display("depth %0d: requests=%0d misses=%0d mem_words=%0d (no cache: %0d, %0d%% fewer) cycles=%0d",
               DEPTH[i], requests[i], misses[i], reads[i], requests[i] * TOTAL,
               100 - (100 * reads[i]) / (requests[i] * TOTAL), cycles[i]);
      n_checks++;
      if (reads[i] != misses[i] * TOTAL) begin n_fail++; $display("FAIL read count depth %0d", DEPTH[i]); end
      if (i > 0) begin
        n_checks += 2;
        if (reads[i] >= reads[i-1]) begin n_fail++; $display("FAIL reads not reduced at depth %0d", DEPTH[i]); end
        if (cycles[i] >= cycles[i-1]) begin n_fail++; $display("FAIL cycles not reduced at depth %0d", DEPTH[i]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", n_checks, n_fail);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    n_fail++;
    $display("TB_RESULT checks=%0d failures=%0d", n_checks, n_fail);
    $finish;
  end
endmodule
