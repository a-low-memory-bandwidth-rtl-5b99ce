// gmm_sweep_harness: runs one gmm_processor of look-ahead depth LA through a
// fixed, deterministic recognition trace and reports what it cost.
//
// The trace has SLOTS active states per frame; each slot keeps its state
// from one frame to the next except with a 1-in-10 chance per frame (decided
// by a hash of slot and frame), so every depth sees exactly the same request
// sequence. Each result is checked against the reference GMM. Outputs: done,
// checks/failures, number of requests and misses, memory words read, and
// the clock cycles spent from the first request to the last result.
module gmm_sweep_harness
  import gmm_pkg::*;
  import gmm_ref_pkg::*;
#(
  parameter int LA     = LOOKAHEAD,
  parameter int FRAMES = 16,
  parameter int SLOTS  = 12
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures,
  output int   requests,
  output int   misses,
  output int   reads,
  output int   cycles
);

  localparam int P = P_DIM, MIX = N_MIX, N_ST = N_STATE, NV = LA + 1;
  localparam int SW = $clog2(N_ST);
  localparam int MAW = $clog2(N_ST * (MIX / NPAR) * (P + 1));

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
  int   stalls;

  gmm_processor #(.LA(LA)) dut (.*);

  gmm_param_mem_model #(.P(P), .LAT(3), .AW(MAW)) u_mem (
    .clk, .rst_n, .stall_pct(0),
    .mem_req, .mem_addr, .mem_ready, .mem_rvalid, .mem_rdata, .reads, .stalls
  );

  // state held by a slot in a frame
  function automatic int slot_state(input int slot, input int f);
    int epoch = 0;
    for (int i = 1; i <= f; i++) if (mix32(32'h51D0_0000 + slot * 4096 + i) % 10 == 0) epoch++;
    return int'(mix32(32'h7A7E_0000 + slot * 4096 + epoch) % N_ST);
  endfunction

  task automatic write_vector(input int f);
    for (int d = 0; d < P; d++) begin
      while (!fv_wr_ready) @(negedge clk);
      fv_wr_valid = 1; fv_wr_data = to24(gen_x(f, d));
      @(negedge clk);
    end
    fv_wr_valid = 0;
  endtask

  initial begin
    int start;
    done = 0; checks = 0; failures = 0; requests = 0; misses = 0; cycles = 0;
    @(posedge rst_n);
    @(negedge clk);
    for (int v = 0; v < NV; v++) write_vector(v);
    start = 0;
    for (int f = 0; f < FRAMES; f++) begin
      for (int sl = 0; sl < SLOTS; sl++) begin
        int s;
        s = slot_state(sl, f);
        req_valid = 1; req_state = SW'(s);
        @(posedge clk);
        while (!req_ready) @(posedge clk);
        @(negedge clk);
        req_valid = 0;
        while (!res_valid) begin @(negedge clk); cycles++; end
        cycles++;
        requests++;
        if (!res_hit) misses++;
        checks++;
        if (longint'(res_prob) != gmm_ref(s, f, P, MIX) || res_state != SW'(s)) begin
          failures++;
          $display("FAIL LA=%0d frame %0d state %0d", LA, f, s);
        end
      end
      frame_adv = 1; @(negedge clk); frame_adv = 0;
      write_vector(f + NV);
    end
    done = 1;
  end

endmodule
