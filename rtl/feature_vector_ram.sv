// feature_vector_ram: ring buffer of the present feature vector and the
// LOOKAHEAD vectors that follow it (NVEC = LOOKAHEAD+1 slots of P dimensions).
//
// The host first fills all NVEC slots; after that, each frame advance frees
// the slot of the oldest (present) vector and the next vector written goes
// into it, so the window always holds frames t .. t+LOOKAHEAD. Writes arrive
// one dimension per cycle (wr_valid/wr_ready, dimension 0 first); a slot
// counts as loaded after its last dimension. The read port is combinational:
// for dimension rd_dim it returns every slot's value, rotated so that
// rd_x[k] belongs to frame t+k (lane k). full says the whole window is loaded.
// Slot-per-vector ring organisation, write order and handshake are this
// design's choices; the architecture states the buffer's role.
module feature_vector_ram
  import gmm_pkg::*;
#(
  parameter int P     = P_DIM,
  parameter int NV    = NVEC
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // host write port
  input  logic                     wr_valid,
  output logic                     wr_ready,
  input  fx_t                      wr_data,
  // frame advance: drop the present vector
  input  logic                     advance,
  // read port
  input  logic [$clog2(P)-1:0]     rd_dim,
  output fx_t  [NV-1:0]            rd_x,
  output logic                     full
);

  localparam int SW = (NV > 1) ? $clog2(NV) : 1;
  localparam int DW = (P > 1) ? $clog2(P) : 1;

  fx_t             mem [NV][P];
  logic [SW-1:0]   head;       // slot of the present frame
  logic [SW-1:0]   wslot;      // slot being written
  logic [DW-1:0]   wdim;
  logic [SW:0]     count;      // loaded slots

  function automatic logic [SW-1:0] inc_slot(input logic [SW-1:0] s);
    return (int'(s) == NV - 1) ? '0 : s + 1'b1;
  endfunction

  assign wr_ready = (int'(count) < NV);
  assign full     = (int'(count) == NV);

  logic wr_fire, wr_done, adv_fire;
  assign wr_fire  = wr_valid && wr_ready;
  assign wr_done  = wr_fire && (int'(wdim) == P - 1);
  assign adv_fire = advance && (count != '0);

  always_ff @(posedge clk) begin
    if (wr_fire) mem[wslot][wdim] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head  <= '0;
      wslot <= '0;
      wdim  <= '0;
      count <= '0;
    end else begin
      if (wr_fire) wdim <= wr_done ? '0 : wdim + 1'b1;
      if (wr_done) wslot <= inc_slot(wslot);
      if (adv_fire) head <= inc_slot(head);
      count <= count + (SW+1)'(wr_done) - (SW+1)'(adv_fire);
    end
  end

  always_comb begin
    for (int k = 0; k < NV; k++) begin
      rd_x[k] = mem[(int'(head) + k) % NV][rd_dim];
    end
  end

  a_no_empty_advance: assert property (@(posedge clk) disable iff (!rst_n)
    advance |-> count != '0) else $error("advance with empty vector buffer");

endmodule
