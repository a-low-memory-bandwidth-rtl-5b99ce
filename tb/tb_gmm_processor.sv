// tb_gmm_processor: end-to-end run of the GMM processor at its default size
// (25 dimensions, 16 mixtures, 2048 states, look-ahead 7).
//
// A recogniser model loads the first eight feature vectors, then for each of
// FRAMES frames requests the output probability of an active state set that
// mostly persists from frame to frame (as HMM self-transitions make it),
// advances the frame and loads the next vector. Every result is checked
// against the reference GMM evaluation, and whether it came from the cache
// against a model of the look-ahead cache. Cycle counts are checked for hits
// (1 cycle) and, while memory never stalls, for misses
// ((MIX/4)*(P+1) + LAT + 4 cycles, LAT = memory latency); the number of memory reads must equal
// misses * (MIX/4)*(P+1). Mechanisms counted (each must occur): cache hit,
// miss on a never-seen state, miss on an expired tag, memory stall, request
// held until the vector window is refilled, vector slot overwrite.
module tb_gmm_processor;
  import gmm_pkg::*;
  import gmm_ref_pkg::*;

  localparam int P = P_DIM, MIX = N_MIX, N_ST = N_STATE, LA = LOOKAHEAD;
  localparam int NV = LA + 1, LAT = 3;
  localparam int TOTAL = (MIX / NPAR) * (P + 1);
  localparam int FRAMES = 24;
  localparam int SW = $clog2(N_ST);
  localparam int MAW = $clog2(N_ST * TOTAL);

  logic clk = 0, rst_n = 0;
  logic fv_wr_valid = 0, fv_wr_ready;
  fx_t  fv_wr_data = '0;
  logic frame_adv = 0, frame_adv_ready;
  logic [FRAME_W-1:0] cur_frame;
  logic req_valid = 0, req_ready;
  logic [SW-1:0] req_state = '0;
  logic res_valid, res_hit;
  logic [SW-1:0] res_state;
  fx_t  res_prob;
  logic mem_req, mem_ready, mem_rvalid;
  logic [MAW-1:0] mem_addr;
  param_word_t mem_rdata;
  int   stall_pct = 0, reads, stalls;

  int checks = 0, failures = 0;
  int n_hit = 0, n_miss_new = 0, n_miss_expired = 0, n_window_wait = 0, n_overwrite = 0;
  int n_miss_timed = 0;

  gmm_processor dut (.*);

  gmm_param_mem_model #(.P(P), .LAT(LAT), .AW(MAW)) u_mem (
    .clk, .rst_n, .stall_pct,
    .mem_req, .mem_addr, .mem_ready, .mem_rvalid, .mem_rdata, .reads, .stalls
  );

  always #5 clk = ~clk;

  // cache model
  bit tag_v [N_ST];
  int tag_f [N_ST];
  int frame = 0, next_vec = 0;

  task automatic write_vector(input int f);
    for (int d = 0; d < P; d++) begin
      while (!fv_wr_ready) @(negedge clk);
      fv_wr_valid = 1; fv_wr_data = to24(gen_x(f, d));
      @(negedge clk);
    end
    fv_wr_valid = 0;
  endtask

  task automatic request(input int s);
    int  cyc, age;
    bit  exp_hit;
    longint exp_v;
    age     = frame - tag_f[s];
    exp_hit = tag_v[s] && age >= 1 && age <= LA;
    exp_v   = gmm_ref(s, frame, P, MIX);
    req_valid = 1; req_state = SW'(s);
    @(posedge clk);
    while (!req_ready) @(posedge clk);
    @(negedge clk);
    req_valid = 0;
    cyc = 0;
    // cyc = clock edges from the accepting edge to the one that raises res_valid
    while (!res_valid) begin @(negedge clk); cyc++; end
    checks += 3;
    if (res_state != SW'(s)) begin failures++; $display("FAIL state %0d got %0d", s, res_state); end
    if (longint'(res_prob) != exp_v) begin
      failures++; $display("FAIL frame %0d state %0d: %0d expected %0d", frame, s, res_prob, exp_v);
    end
    if (res_hit != exp_hit) begin failures++; $display("FAIL hit flag frame %0d state %0d", frame, s); end
    if (exp_hit) begin
      n_hit++;
      checks++;
      if (cyc != 1) begin failures++; $display("FAIL hit latency %0d", cyc); end
    end else begin
      if (tag_v[s]) n_miss_expired++; else n_miss_new++;
      tag_v[s] = 1; tag_f[s] = frame;
      if (stall_pct == 0) begin
        n_miss_timed++;
        checks++;
        if (cyc != TOTAL + LAT + 4) begin
          failures++; $display("FAIL miss latency %0d expected %0d", cyc, TOTAL + LAT + 4);
        end
      end
    end
  endtask

  int act [$];
  int keep [$];

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // a request before the window is loaded must wait
    fork
      request(5);
      begin
        repeat (20) @(negedge clk);
        if (!req_ready) n_window_wait++;
        for (int v = 0; v < NV; v++) write_vector(next_vec++);
      end
    join
    act.push_back(5);
    for (int i = 0; i < 9; i++) act.push_back(int'($urandom_range(0, N_ST - 1)));
    for (frame = 0; frame < FRAMES; frame++) begin
      if (frame == 4) stall_pct = 25;
      if (frame == 0) act.delete(0);       // state 5 done for frame 0
      foreach (act[i]) request(act[i]);
      if (frame == 9) request(5);          // tag from frame 0: expired
      // next active set: ~90 % of states persist, new ones join
      keep.delete();
      foreach (act[i]) if ($urandom_range(0, 99) < 90) keep.push_back(act[i]);
      while (keep.size() < 10) keep.push_back(int'($urandom_range(0, N_ST - 1)));
      act = keep;
      // frame advance, then a request that has to wait for the new vector
      @(negedge clk);
      frame_adv = 1;
      @(negedge clk);
      frame_adv = 0;
      if (frame + 1 < FRAMES) begin
        frame++;
        fork
          request(act[0]);
          begin
            repeat (3) @(negedge clk);
            if (!req_ready && req_valid) n_window_wait++;
            write_vector(next_vec++);
            n_overwrite++;
          end
        join
        act.delete(0);
        act.push_back(int'($urandom_range(0, N_ST - 1)));
        frame--;
      end
    end
    checks++;
    if (reads != (n_miss_new + n_miss_expired) * TOTAL) begin
      failures++; $display("FAIL memory reads %0d for %0d misses", reads, n_miss_new + n_miss_expired);
    end
    $display("hits=%0d misses_new=%0d misses_expired=%0d timed_misses=%0d mem_reads=%0d mem_stalls=%0d window_waits=%0d overwrites=%0d",
             n_hit, n_miss_new, n_miss_expired, n_miss_timed, reads, stalls, n_window_wait, n_overwrite);
    checks += 6;
    if (n_hit == 0)          begin failures++; $display("FAIL no cache hit"); end
    if (n_miss_new == 0)     begin failures++; $display("FAIL no miss"); end
    if (n_miss_expired == 0) begin failures++; $display("FAIL no expired tag"); end
    if (stalls == 0)         begin failures++; $display("FAIL no memory stall"); end
    if (n_window_wait == 0)  begin failures++; $display("FAIL no window wait"); end
    if (n_overwrite == 0)    begin failures++; $display("FAIL no vector overwrite"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
