// address_calculator: all addresses one GMM request needs, from the state ID,
// the present frame number and the cache tag of that state.
//
//  * gmm_addr: first parameter-memory word of the state's GMM. Each state
//    occupies N_MIX/NPAR mixture groups of P+1 words (w, then P dimensions),
//    so gmm_addr = state * (N_MIX/NPAR) * (P+1).
//  * cache_rd_addr / hit: the cache keeps, per state, the probabilities of
//    the LOOKAHEAD frames that followed the frame in which it was last
//    computed (the tag). The entry for frame tag+k (k = 1..LOOKAHEAD) sits in
//    bank k-1, so the read address is (k-1)*N_ST + state, and the request
//    hits when the tag is valid and 1 <= frame - tag <= LOOKAHEAD
//    (difference taken modulo 2^FRAME_W).
//  * cache_wr_addr[k]: where a fresh computation stores its look-ahead result
//    for frame+k+1, k*N_ST + state; one address per bank, written together.
// Purely combinational. The bank-major cache layout and tag rule are this
// design's reading of "cache read address ... cache write addresses".
module address_calculator
  import gmm_pkg::*;
#(
  parameter int P       = P_DIM,
  parameter int MIX     = N_MIX,
  parameter int N_ST    = N_STATE,
  parameter int LA      = LOOKAHEAD,
  parameter int FW      = FRAME_W,
  localparam int SW     = $clog2(N_ST),
  localparam int CAW    = $clog2(LA * N_ST),
  localparam int MAW    = $clog2(N_ST * (MIX / NPAR) * (P + 1))
) (
  input  logic [SW-1:0]   state_id,
  input  logic [FW-1:0]   cur_frame,
  input  logic            tag_valid,
  input  logic [FW-1:0]   tag_frame,
  output logic            hit,
  output logic [CAW-1:0]  cache_rd_addr,
  output logic [MAW-1:0]  gmm_addr,
  output logic [CAW-1:0]  cache_wr_addr [LA]
);

  localparam int WORDS_PER_STATE = (MIX / NPAR) * (P + 1);

  logic [FW-1:0] age;

  always_comb begin
    age           = cur_frame - tag_frame;
    hit           = tag_valid && (age != '0) && (int'(age) <= LA);
    cache_rd_addr = CAW'((int'(age) - 1) * N_ST + int'(state_id));
    gmm_addr      = MAW'(int'(state_id) * WORDS_PER_STATE);
    for (int k = 0; k < LA; k++)
      cache_wr_addr[k] = CAW'(k * N_ST + int'(state_id));
  end

endmodule
