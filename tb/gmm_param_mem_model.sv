// gmm_param_mem_model: behavioural model of the external GMM parameter
// memory on the board (simulation only).
//
// Accepts one read per cycle while mem_ready is high; returns the word, in
// order, LAT cycles after acceptance with mem_rvalid. The word content is
// generated from the address by gmm_ref_pkg (w word at group position 0,
// mu/sigma words at positions 1..P), so no parameter image is stored.
// With STALL_PCT > 0, mem_ready drops at random in that percentage of
// cycles. reads and stalls count accepted reads and refused requests.
module gmm_param_mem_model
  import gmm_pkg::*;
  import gmm_ref_pkg::*;
#(
  parameter int P   = P_DIM,
  parameter int LAT = 3,
  parameter int AW  = 18
) (
  input  logic        clk,
  input  logic        rst_n,
  input  int          stall_pct,
  input  logic        mem_req,
  input  logic [AW-1:0] mem_addr,
  output logic        mem_ready,
  output logic        mem_rvalid,
  output param_word_t mem_rdata,
  output int          reads,
  output int          stalls
);

  int unsigned q_addr [$];
  longint      q_due  [$];
  longint      cyc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cyc        <= 0;
      mem_ready  <= 1'b1;
      mem_rvalid <= 1'b0;
      mem_rdata  <= '0;
      reads      <= 0;
      stalls     <= 0;
    end else begin
      cyc <= cyc + 1;
      if (mem_req && mem_ready) begin
        q_addr.push_back(32'(mem_addr));
        q_due.push_back(cyc + LAT - 1);
        reads <= reads + 1;
      end
      if (mem_req && !mem_ready) stalls <= stalls + 1;
      mem_ready  <= (stall_pct == 0) || ($urandom_range(0, 99) >= stall_pct);
      mem_rvalid <= 1'b0;
      if (q_due.size() > 0 && q_due[0] <= cyc) begin
        int unsigned a;
        int pos;
        a   = q_addr.pop_front();
        void'(q_due.pop_front());
        pos = int'(a % (P + 1));
        for (int k = 0; k < NPAR; k++) begin
          mem_rdata.mu[k]    <= to24(gen_mu(a, k, pos));
          mem_rdata.sigma[k] <= to24(gen_sigma(a, k, pos));
        end
        mem_rvalid <= 1'b1;
      end
    end
  end

endmodule
