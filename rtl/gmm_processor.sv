// gmm_processor: GMM output-probability processor with vector look-ahead.
//
// For each active HMM state the recogniser sends, the processor returns
// ln b_j(x_t) for the present frame t. A miss fetches the state's GMM
// parameters from external memory once and evaluates them on NVEC =
// LOOKAHEAD+1 buffered vectors (frames t..t+LOOKAHEAD) at the same time: one
// gmm_lane per vector, each with four parallel Gaussian units and four addlog
// units. The present frame's result is returned; the other LOOKAHEAD results
// go to prob_cache, so the same state in the next frames is answered without
// touching memory. This cuts both parameter-memory traffic and cycles,
// since consecutive frames mostly reuse the same states.
//
// Interfaces (all synchronous to clk, active-low asynchronous reset):
//   fv_wr_*    feature vectors, one 24-bit dimension per beat, valid/ready;
//   frame_adv  move the window one frame on (accepted when frame_adv_ready);
//   req_*      state ID request, valid/ready, one in flight;
//   res_*      result pulse: state, ln b_j(x_t), and whether it came from cache;
//   mem_*      parameter memory read port: mem_req/mem_addr accepted when
//              mem_ready, mem_rdata returned in order with mem_rvalid after
//              any latency. One word holds NPAR (mu, sigma) pairs or NPAR w.
// The block structure (feature vector RAM, address calculator, cache, four
// parallel Gaussians per vector, LUT addlog units, look-ahead depth 7, 24-bit
// words) follows the architecture; the handshakes, the memory word format
// and the model sizes (25 dimensions, 16 mixtures, 2048 states) are this
// design's own choices.
module gmm_processor
  import gmm_pkg::*;
#(
  parameter int P       = P_DIM,
  parameter int MIX     = N_MIX,
  parameter int N_ST    = N_STATE,
  parameter int LA      = LOOKAHEAD,
  parameter int FW      = FRAME_W,
  localparam int NV     = LA + 1,
  localparam int SW     = $clog2(N_ST),
  localparam int MAW    = $clog2(N_ST * (MIX / NPAR) * (P + 1)),
  localparam int CAW    = $clog2(LA * N_ST),
  localparam int DW     = (P > 1) ? $clog2(P) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            fv_wr_valid,
  output logic            fv_wr_ready,
  input  fx_t             fv_wr_data,
  input  logic            frame_adv,
  output logic            frame_adv_ready,
  output logic [FW-1:0]   cur_frame,
  input  logic            req_valid,
  output logic            req_ready,
  input  logic [SW-1:0]   req_state,
  output logic            res_valid,
  output logic [SW-1:0]   res_state,
  output fx_t             res_prob,
  output logic            res_hit,
  output logic            mem_req,
  output logic [MAW-1:0]  mem_addr,
  input  logic            mem_ready,
  input  logic            mem_rvalid,
  input  param_word_t     mem_rdata
);

  logic            fv_full, fv_advance;
  logic [DW-1:0]   fv_rd_dim;
  fx_t  [NV-1:0]   fv_x;

  logic [SW-1:0]   cur_state;
  logic            tag_valid, cache_hit;
  logic [FW-1:0]   tag_frame;
  logic [CAW-1:0]  cache_rd_addr;
  logic [CAW-1:0]  cache_wr_addr [LA];
  logic [MAW-1:0]  gmm_addr;
  fx_t             cache_rd_data;
  logic            cache_wr_en;
  fx_t             cache_wr_data [LA];

  logic            load_w, dim_valid, dim_last, grp_first, grp_last;
  logic [NV-1:0]   lane_valid;
  fx_t             lane_result [NV];

  feature_vector_ram #(.P(P), .NV(NV)) u_fvram (
    .clk, .rst_n,
    .wr_valid(fv_wr_valid), .wr_ready(fv_wr_ready), .wr_data(fv_wr_data),
    .advance(fv_advance),
    .rd_dim(fv_rd_dim), .rd_x(fv_x), .full(fv_full)
  );

  address_calculator #(.P(P), .MIX(MIX), .N_ST(N_ST), .LA(LA), .FW(FW)) u_addr (
    .state_id(cur_state), .cur_frame,
    .tag_valid, .tag_frame,
    .hit(cache_hit), .cache_rd_addr, .gmm_addr, .cache_wr_addr
  );

  prob_cache #(.N_ST(N_ST), .LA(LA), .FW(FW)) u_cache (
    .clk, .rst_n,
    .rd_state(cur_state), .tag_valid, .tag_frame,
    .rd_addr(cache_rd_addr), .rd_data(cache_rd_data),
    .wr_en(cache_wr_en), .wr_state(cur_state), .wr_frame(cur_frame),
    .wr_addr(cache_wr_addr), .wr_data(cache_wr_data)
  );

  gmm_controller #(.P(P), .MIX(MIX), .N_ST(N_ST), .LA(LA), .FW(FW)) u_ctrl (
    .clk, .rst_n,
    .req_valid, .req_ready, .req_state,
    .frame_adv, .frame_adv_ready, .cur_frame,
    .res_valid, .res_state, .res_prob, .res_hit,
    .fv_full, .fv_advance, .fv_rd_dim,
    .cur_state, .cache_hit, .cache_rd_data, .gmm_addr,
    .cache_wr_en,
    .mem_req, .mem_addr, .mem_ready, .mem_rvalid,
    .lane_load_w(load_w), .lane_dim_valid(dim_valid), .lane_dim_last(dim_last),
    .lane_grp_first(grp_first), .lane_grp_last(grp_last),
    .lane_valid(lane_valid[0]), .lane_result0(lane_result[0])
  );

  for (genvar v = 0; v < NV; v++) begin : g_lane
    gmm_lane u_lane (
      .clk, .rst_n,
      .load_w, .dim_valid, .dim_last, .grp_first, .grp_last,
      .x(fv_x[v]), .pw(mem_rdata),
      .result(lane_result[v]), .result_valid(lane_valid[v])
    );
  end

  always_comb
    for (int k = 0; k < LA; k++) cache_wr_data[k] = lane_result[k+1];

  a_lanes_in_step: assert property (@(posedge clk) disable iff (!rst_n)
    lane_valid == '0 || lane_valid == '1) else $error("lanes out of step");

endmodule
