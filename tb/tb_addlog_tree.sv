// tb_addlog_tree: random GMMs of 1..6 groups of four scores, beats with
// random gaps; checks the folded log-sum against the reference and the
// one-cycle latency from the last group's beat.
module tb_addlog_tree;
  import gmm_pkg::*;
  import gmm_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, first = 0, last = 0;
  fx_t  [NPAR-1:0] s = '0;
  fx_t  result;
  logic result_valid;
  int   checks = 0, failures = 0;

  addlog_tree dut (.*);

  always #5 clk = ~clk;

  task automatic run_one(input int groups);
    longint v [4], run, l2, exp_v;
    int     lat;
    for (int g = 0; g < groups; g++) begin
      repeat ($urandom_range(0, 2)) begin in_valid = 0; @(negedge clk); end
      for (int k = 0; k < 4; k++) begin
        v[k] = -longint'($urandom_range(0, 30000));
        s[k] = to24(v[k]);
      end
      l2  = addlog_ref(addlog_ref(v[0], v[1]), addlog_ref(v[2], v[3]));
      run = (g == 0) ? l2 : addlog_ref(run, l2);
      in_valid = 1; first = (g == 0); last = (g == groups - 1);
      @(negedge clk);
      if (g != groups - 1) begin
        checks++;
        if (result_valid) begin failures++; $display("FAIL early result"); end
      end
    end
    in_valid = 0; first = 0; last = 0;
    exp_v = run;
    lat = 1;
    while (!result_valid && lat < 5) begin @(negedge clk); lat++; end
    checks += 2;
    if (lat != 1) begin failures++; $display("FAIL latency %0d", lat); end
    if (longint'(result) != exp_v) begin
      failures++; $display("FAIL result %0d expected %0d", result, exp_v);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 300; i++) run_one(1 + i % 6);
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
