// tb_gmm_controller: drives the controller alone. The testbench plays the
// cache (hit or miss chosen per request), a memory with 2-cycle latency and
// random back-pressure, and eight lanes that answer three cycles after the
// last beat. Checks: request/advance gating by window-full and advance, the
// frame counter, hit path (result from cache, no memory traffic, 1 edge),
// miss path (address sequence gmm_addr+0..TOTAL-1, beat decode of w/dim/last/
// group flags and vector dimension, result from lane 0, one cache write timed
// with the lane results).
module tb_gmm_controller;
  import gmm_pkg::*;

  localparam int P = 25, MIX = 16, N_ST = 2048, LA = 7, FW = 16, NV = 8;
  localparam int TOTAL = (MIX / NPAR) * (P + 1);

  logic clk = 0, rst_n = 0;
  logic req_valid = 0, req_ready, frame_adv = 0, frame_adv_ready;
  logic [10:0] req_state = '0, res_state, cur_state;
  logic [FW-1:0] cur_frame;
  logic res_valid, res_hit;
  fx_t  res_prob;
  logic fv_full = 0, fv_advance;
  logic [4:0] fv_rd_dim;
  logic cache_hit = 0;
  fx_t  cache_rd_data = '0;
  logic [17:0] gmm_addr;
  logic cache_wr_en;
  logic mem_req, mem_ready = 1, mem_rvalid = 0;
  logic [17:0] mem_addr;
  logic lane_load_w, lane_dim_valid, lane_dim_last, lane_grp_first, lane_grp_last;
  logic lane_valid = 0;
  fx_t  lane_result0;

  int checks = 0, failures = 0;

  gmm_controller #(.P(P), .MIX(MIX), .N_ST(N_ST), .LA(LA), .FW(FW)) dut (.*);

  always #5 clk = ~clk;

  assign gmm_addr = 18'(int'(cur_state) * TOTAL);
  assign lane_result0 = fx_t'(int'(cur_state) * 16);

  // memory: in-order, 2-cycle latency, random ready
  int   exp_addr = 0, issued = 0, returned = 0;
  int   q [$];          // due cycle of each outstanding read
  int   cyc = 0;
  logic [2:0] lane_pipe = '0;
  int   n_w = 0, n_dim = 0, n_last = 0, n_first_beats = 0, n_lastgrp_beats = 0, n_wr = 0;
  int   dim_expect = 0;
  always @(posedge clk) begin
    if (mem_req && mem_ready) begin
      checks++;
      if (int'(mem_addr) != exp_addr + issued) begin
        failures++; $display("FAIL mem_addr %0d expected %0d", mem_addr, exp_addr + issued);
      end
      issued <= issued + 1;
      q.push_back(cyc + 1);
    end
    cyc <= cyc + 1;
    mem_ready  <= ($urandom_range(0, 3) != 0);
    mem_rvalid <= 0;
    if (q.size() > 0 && q[0] <= cyc) begin void'(q.pop_front()); mem_rvalid <= 1; end
    if (lane_load_w) begin n_w++; dim_expect = 0; end
    if (lane_dim_valid) begin
      n_dim++;
      checks++;
      if (int'(fv_rd_dim) != dim_expect) begin failures++; $display("FAIL dim %0d", fv_rd_dim); end
      dim_expect++;
      if (lane_dim_last) begin
        n_last++;
        checks++;
        if (int'(fv_rd_dim) != P - 1) begin failures++; $display("FAIL last flag on dim %0d", fv_rd_dim); end
        if (lane_grp_first) n_first_beats++;
        if (lane_grp_last) n_lastgrp_beats++;
      end
    end
    lane_pipe  <= {lane_pipe[1:0], lane_dim_valid && lane_dim_last && lane_grp_last};
    lane_valid <= lane_pipe[1];
    if (cache_wr_en) begin
      n_wr++;
      checks++;
      if (!lane_valid) begin failures++; $display("FAIL cache write without lane result"); end
    end
  end

  task automatic do_req(input int s, input bit hit);
    int cyc;
    @(negedge clk);
    req_valid = 1; req_state = 11'(s);
    cache_hit = hit; cache_rd_data = fx_t'(-s);
    issued = 0; exp_addr = s * TOTAL;
    n_w = 0; n_dim = 0; n_last = 0; n_first_beats = 0; n_lastgrp_beats = 0; n_wr = 0;
    @(posedge clk);
    while (!req_ready) @(posedge clk);
    @(negedge clk);
    req_valid = 0;
    cyc = 0;
    while (!res_valid && cyc < 2000) begin @(negedge clk); cyc++; end
    checks += 3;
    if (res_state != 11'(s)) begin failures++; $display("FAIL res_state"); end
    if (res_hit != hit) begin failures++; $display("FAIL res_hit"); end
    if (hit) begin
      checks += 3;
      if (res_prob != fx_t'(-s)) begin failures++; $display("FAIL hit data"); end
      if (cyc != 1) begin failures++; $display("FAIL hit latency %0d", cyc); end
      if (issued != 0) begin failures++; $display("FAIL memory read on hit"); end
    end else begin
      @(negedge clk);
      checks += 7;
      if (res_prob != fx_t'(s * 16)) begin failures++; $display("FAIL miss data"); end
      if (issued != TOTAL) begin failures++; $display("FAIL issued %0d", issued); end
      if (n_w != MIX / NPAR || n_dim != (MIX / NPAR) * P) begin failures++; $display("FAIL beats %0d %0d", n_w, n_dim); end
      if (n_last != MIX / NPAR) begin failures++; $display("FAIL last beats"); end
      if (n_first_beats != 1 || n_lastgrp_beats != 1) begin failures++; $display("FAIL group flags"); end
      if (n_wr != 1) begin failures++; $display("FAIL cache writes %0d", n_wr); end
      if (cache_wr_en) begin failures++; $display("FAIL extra write"); end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    req_valid = 1;
    repeat (3) begin
      @(negedge clk);
      checks++;
      if (req_ready) begin failures++; $display("FAIL ready with window not full"); end
    end
    fv_full = 1; frame_adv = 1; #1;
    checks++;
    if (req_ready || !frame_adv_ready || !fv_advance) begin failures++; $display("FAIL advance gating"); end
    @(negedge clk);
    frame_adv = 0; req_valid = 0;
    checks++;
    if (cur_frame != 16'd1) begin failures++; $display("FAIL frame counter"); end
    for (int i = 0; i < 30; i++) do_req($urandom_range(0, N_ST - 1), i % 3 == 1);
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
