// prob_cache: cache of look-ahead output probabilities.
//
// LA banks of N_ST words (bank k holds, for each state, ln b_j of the frame
// k+1 frames after the tag frame), plus one tag per state: the frame number of
// the computation that filled the entry and a valid bit (cleared by reset).
// Reads are combinational: rd_state selects the tag, rd_addr the data word
// (bank = rd_addr / N_ST). A write stores all LA look-ahead results of one
// state in one cycle, one word per bank at wr_addr[k], and updates its tag.
// Sizing by state count and banking are this design's choices.
module prob_cache
  import gmm_pkg::*;
#(
  parameter int N_ST    = N_STATE,
  parameter int LA      = LOOKAHEAD,
  parameter int FW      = FRAME_W,
  localparam int SW     = $clog2(N_ST),
  localparam int CAW    = $clog2(LA * N_ST)
) (
  input  logic            clk,
  input  logic            rst_n,
  // tag read
  input  logic [SW-1:0]   rd_state,
  output logic            tag_valid,
  output logic [FW-1:0]   tag_frame,
  // data read
  input  logic [CAW-1:0]  rd_addr,
  output fx_t             rd_data,
  // fill
  input  logic            wr_en,
  input  logic [SW-1:0]   wr_state,
  input  logic [FW-1:0]   wr_frame,
  input  logic [CAW-1:0]  wr_addr [LA],
  input  fx_t             wr_data [LA]
);

  localparam int BW = (LA > 1) ? $clog2(LA) : 1;

  logic [FW-1:0]   tag   [N_ST];
  logic [N_ST-1:0] valid;
  fx_t             bank_q [LA];      // each bank's word at rd_addr's offset

  // one RAM per bank, so all LA look-ahead results are written in one cycle
  for (genvar k = 0; k < LA; k++) begin : g_bank
    fx_t mem [N_ST];
    always_ff @(posedge clk) begin
      if (wr_en) mem[SW'(int'(wr_addr[k]) % N_ST)] <= wr_data[k];
    end
    assign bank_q[k] = mem[SW'(int'(rd_addr) % N_ST)];
  end

  always_ff @(posedge clk) begin
    if (wr_en) tag[wr_state] <= wr_frame;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     valid <= '0;
    else if (wr_en) valid[wr_state] <= 1'b1;
  end

  assign tag_valid = valid[rd_state];
  assign tag_frame = tag[rd_state];
  assign rd_data   = bank_q[BW'((int'(rd_addr) / N_ST) % LA)];

  // Each write address must fall in its own bank.
  for (genvar k = 0; k < LA; k++) begin : g_chk
    a_bank: assert property (@(posedge clk) disable iff (!rst_n)
      wr_en |-> int'(wr_addr[k]) / N_ST == k) else $error("cache write outside bank");
  end

endmodule
