// tb_prob_cache: after reset no tag is valid; fills random states with seven
// values each and checks tags and every bank word against a shadow copy,
// including overwrites of a state already cached.
module tb_prob_cache;
  import gmm_pkg::*;

  localparam int N_ST = 2048, LA = 7, FW = 16;

  logic clk = 0, rst_n = 0;
  logic [10:0] rd_state = '0, wr_state = '0;
  logic tag_valid, wr_en = 0;
  logic [FW-1:0] tag_frame, wr_frame = '0;
  logic [13:0] rd_addr = '0;
  logic [13:0] wr_addr [LA];
  fx_t  rd_data;
  fx_t  wr_data [LA];
  int   checks = 0, failures = 0;

  bit          sh_valid [N_ST];
  int          sh_tag   [N_ST];
  int          sh_data  [N_ST][LA];

  prob_cache #(.N_ST(N_ST), .LA(LA), .FW(FW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    foreach (wr_addr[k]) wr_addr[k] = '0;
    foreach (wr_data[k]) wr_data[k] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < N_ST; s += 37) begin
      rd_state = 11'(s); #1;
      checks++; if (tag_valid) begin failures++; $display("FAIL valid after reset %0d", s); end
    end
    for (int i = 0; i < 600; i++) begin
      int s;
      s = (i < 300) ? int'($urandom_range(0, N_ST - 1)) : int'($urandom_range(0, 63));
      @(negedge clk);
      wr_en = 1; wr_state = 11'(s); wr_frame = 16'($urandom);
      sh_valid[s] = 1; sh_tag[s] = int'(wr_frame);
      for (int k = 0; k < LA; k++) begin
        wr_addr[k] = 14'(k * N_ST + s);
        wr_data[k] = fx_t'($urandom);
        sh_data[s][k] = int'(wr_data[k]);
      end
      @(negedge clk);
      wr_en = 0;
      // read back a random cached state
      s = (i % 2) ? s : int'($urandom_range(0, 63));
      rd_state = 11'(s); #1;
      checks++;
      if (tag_valid != sh_valid[s] || (sh_valid[s] && int'(tag_frame) != sh_tag[s])) begin
        failures++; $display("FAIL tag state %0d", s);
      end
      if (sh_valid[s]) for (int k = 0; k < LA; k++) begin
        rd_addr = 14'(k * N_ST + s); #1;
        checks++;
        if (int'(rd_data) != sh_data[s][k]) begin failures++; $display("FAIL data %0d/%0d", s, k); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
