// tb_address_calculator: random states, frames and tags; checks the GMM
// base address, the hit window (1..7 frames after the tag, modulo the
// frame counter), the cache read address and all seven write addresses.
module tb_address_calculator;
  import gmm_pkg::*;

  localparam int P = 25, MIX = 16, N_ST = 2048, LA = 7, FW = 16;

  logic [10:0] state_id;
  logic [FW-1:0] cur_frame, tag_frame;
  logic tag_valid, hit;
  logic [13:0] cache_rd_addr;
  logic [17:0] gmm_addr;
  logic [13:0] cache_wr_addr [LA];
  int checks = 0, failures = 0;

  address_calculator #(.P(P), .MIX(MIX), .N_ST(N_ST), .LA(LA), .FW(FW)) dut (.*);

  initial begin
    for (int i = 0; i < 5000; i++) begin
      int age;
      bit exp_hit;
      state_id  = 11'($urandom);
      cur_frame = 16'($urandom);
      age       = (i % 3 == 0) ? int'($urandom_range(0, 65535)) : int'($urandom_range(0, 9));
      tag_frame = cur_frame - 16'(age);
      tag_valid = (i % 7 != 0);
      #1;
      exp_hit = tag_valid && age >= 1 && age <= LA;
      checks += 3;
      if (hit !== exp_hit) begin failures++; $display("FAIL hit age %0d", age); end
      if (gmm_addr != 18'(int'(state_id) * 4 * 26)) begin failures++; $display("FAIL gmm_addr"); end
      if (exp_hit && cache_rd_addr != 14'((age - 1) * N_ST + int'(state_id))) begin
        failures++; $display("FAIL rd addr");
      end
      for (int k = 0; k < LA; k++) begin
        checks++;
        if (cache_wr_addr[k] != 14'(k * N_ST + int'(state_id))) begin
          failures++; $display("FAIL wr addr %0d", k);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
