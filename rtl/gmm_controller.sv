// gmm_controller: sequences one output-probability request at a time.
//
//   IDLE   accept a state ID (only once the vector window is full), or a
//          frame advance (which bumps the frame counter and frees the oldest
//          vector slot);
//   LOOKUP read the state's cache tag and, through the address calculator,
//          the cached word; on a hit return it (res_hit = 1) and go idle;
//   FETCH  on a miss, stream the state's (N_MIX/NPAR)*(P+1) parameter words
//          from memory, one request per cycle while mem_ready is high;
//   WAIT   wait for the lanes; return lane 0 (the present frame) and write
//          lanes 1..LOOKAHEAD into the cache under the present frame's tag
//          (the lanes feed the cache directly; cache_wr_en times the write).
// Returned words (mem_rvalid, in order, any latency) are decoded by a
// separate counter into lane beats: group word 0 loads w, words 1..P carry
// dimension 0..P-1, which also addresses the feature vector RAM, so reading
// parameters and computing overlap.
//
// Timing, counted in clock edges from the edge that accepts the request to
// the edge that raises res_valid (a one-cycle pulse): 1 for a hit;
// (N_MIX/NPAR)*(P+1) + L + 4 for a miss when memory never stalls, L being
// the memory's latency from accepting a read to sampling its data. The next
// request can be accepted on the edge after that. The state encoding and the one-
// request-at-a-time policy are this design's choices.
module gmm_controller
  import gmm_pkg::*;
#(
  parameter int P       = P_DIM,
  parameter int MIX     = N_MIX,
  parameter int N_ST    = N_STATE,
  parameter int LA      = LOOKAHEAD,
  parameter int FW      = FRAME_W,
  localparam int SW     = $clog2(N_ST),
  localparam int MAW    = $clog2(N_ST * (MIX / NPAR) * (P + 1)),
  localparam int DW     = (P > 1) ? $clog2(P) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  // requests from the recogniser
  input  logic            req_valid,
  output logic            req_ready,
  input  logic [SW-1:0]   req_state,
  input  logic            frame_adv,
  output logic            frame_adv_ready,
  output logic [FW-1:0]   cur_frame,
  // results
  output logic            res_valid,
  output logic [SW-1:0]   res_state,
  output fx_t             res_prob,
  output logic            res_hit,
  // feature vector RAM
  input  logic            fv_full,
  output logic            fv_advance,
  output logic [DW-1:0]   fv_rd_dim,
  // cache and address calculator
  output logic [SW-1:0]   cur_state,
  input  logic            cache_hit,
  input  fx_t             cache_rd_data,
  input  logic [MAW-1:0]  gmm_addr,
  output logic            cache_wr_en,     // lanes 1..LA hold the entry
  // parameter memory
  output logic            mem_req,
  output logic [MAW-1:0]  mem_addr,
  input  logic            mem_ready,
  input  logic            mem_rvalid,
  // lanes
  output logic            lane_load_w,
  output logic            lane_dim_valid,
  output logic            lane_dim_last,
  output logic            lane_grp_first,
  output logic            lane_grp_last,
  input  logic            lane_valid,
  input  fx_t             lane_result0      // present-frame lane
);

  localparam int GROUPS = MIX / NPAR;
  localparam int TOTAL  = GROUPS * (P + 1);
  localparam int IW     = $clog2(TOTAL + 1);
  localparam int PW     = $clog2(P + 1);
  localparam int GW     = (GROUPS > 1) ? $clog2(GROUPS) : 1;

  typedef enum logic [1:0] {IDLE, LOOKUP, FETCH, WAIT} st_t;
  st_t st;

  logic [IW-1:0] icnt;      // words requested
  logic [PW-1:0] rpos;      // position of next returned word in its group
  logic [GW-1:0] rgrp;      // group of next returned word

  logic req_fire, adv_fire, issue_fire;
  assign frame_adv_ready = (st == IDLE);
  assign adv_fire        = frame_adv && frame_adv_ready;
  assign req_ready       = (st == IDLE) && fv_full && !frame_adv;
  assign req_fire        = req_valid && req_ready;
  assign fv_advance      = adv_fire;

  assign mem_req    = (st == FETCH);
  assign mem_addr   = gmm_addr + MAW'(icnt);
  assign issue_fire = mem_req && mem_ready;

  // lane beat decode of returned words
  assign lane_load_w    = mem_rvalid && (rpos == '0);
  assign lane_dim_valid = mem_rvalid && (rpos != '0);
  assign lane_dim_last  = (int'(rpos) == P);
  assign lane_grp_first = (rgrp == '0);
  assign lane_grp_last  = (int'(rgrp) == GROUPS - 1);
  assign fv_rd_dim      = (rpos == '0) ? '0 : DW'(rpos - 1'b1);

  // cache fill: the look-ahead lanes' results are written as they appear
  assign cache_wr_en = (st == WAIT) && lane_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= IDLE;
      cur_frame <= '0;
      cur_state <= '0;
      icnt      <= '0;
      rpos      <= '0;
      rgrp      <= '0;
      res_valid <= 1'b0;
      res_state <= '0;
      res_prob  <= '0;
      res_hit   <= 1'b0;
    end else begin
      res_valid <= 1'b0;
      if (mem_rvalid) begin
        if (int'(rpos) == P) begin
          rpos <= '0;
          rgrp <= (int'(rgrp) == GROUPS - 1) ? '0 : rgrp + 1'b1;
        end else begin
          rpos <= rpos + 1'b1;
        end
      end
      unique case (st)
        IDLE: begin
          if (adv_fire) cur_frame <= cur_frame + 1'b1;
          if (req_fire) begin
            cur_state <= req_state;
            st        <= LOOKUP;
          end
        end
        LOOKUP: begin
          if (cache_hit) begin
            res_valid <= 1'b1;
            res_state <= cur_state;
            res_prob  <= cache_rd_data;
            res_hit   <= 1'b1;
            st        <= IDLE;
          end else begin
            icnt <= '0;
            st   <= FETCH;
          end
        end
        FETCH: begin
          if (issue_fire) begin
            icnt <= icnt + 1'b1;
            if (int'(icnt) == TOTAL - 1) st <= WAIT;
          end
        end
        WAIT: begin
          if (lane_valid) begin
            res_valid <= 1'b1;
            res_state <= cur_state;
            res_prob  <= lane_result0;
            res_hit   <= 1'b0;
            st        <= IDLE;
          end
        end
        default: st <= IDLE;
      endcase
    end
  end

  a_rvalid_expected: assert property (@(posedge clk) disable iff (!rst_n)
    mem_rvalid |-> (st == FETCH || st == WAIT)) else $error("unexpected memory data");
  a_lane_only_waiting: assert property (@(posedge clk) disable iff (!rst_n)
    lane_valid |-> st == WAIT) else $error("lane result outside WAIT");

endmodule
