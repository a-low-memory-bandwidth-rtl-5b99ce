// tb_feature_vector_ram: fills the 8-slot window, checks that it reports
// full and refuses writes, that every lane reads frame t+k, and that after
// each advance the next vector overwrites the oldest slot while the window
// keeps sliding; also interleaves an advance with writes in flight.
module tb_feature_vector_ram;
  import gmm_pkg::*;
  import gmm_ref_pkg::*;

  localparam int P = 25, NV = 8;

  logic clk = 0, rst_n = 0;
  logic wr_valid = 0, wr_ready, advance = 0, full;
  fx_t  wr_data = '0;
  logic [$clog2(P)-1:0] rd_dim = '0;
  fx_t  [NV-1:0] rd_x;
  int   checks = 0, failures = 0;
  int   head_frame = 0, next_frame = 0;

  feature_vector_ram #(.P(P), .NV(NV)) dut (.*);

  always #5 clk = ~clk;

  task automatic write_vector(input int frame);
    for (int d = 0; d < P; d++) begin
      while (!wr_ready) @(negedge clk);
      wr_valid = 1; wr_data = to24(gen_x(frame, d));
      @(negedge clk);
    end
    wr_valid = 0;
  endtask

  task automatic check_window();
    for (int d = 0; d < P; d++) begin
      rd_dim = 5'(d);
      #1;
      for (int k = 0; k < NV; k++) begin
        checks++;
        if (longint'(rd_x[k]) != gen_x(head_frame + k, d)) begin
          failures++;
          $display("FAIL lane %0d dim %0d frame %0d: %0d", k, d, head_frame + k, rd_x[k]);
        end
      end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++; if (full || !wr_ready) begin failures++; $display("FAIL empty flags"); end
    for (int v = 0; v < NV; v++) begin
      checks++; if (full) begin failures++; $display("FAIL full too early"); end
      write_vector(next_frame++);
    end
    checks++; if (!full || wr_ready) begin failures++; $display("FAIL not full"); end
    check_window();
    for (int f = 0; f < 20; f++) begin
      advance = 1; @(negedge clk); advance = 0;
      head_frame++;
      checks++; if (full || !wr_ready) begin failures++; $display("FAIL after advance"); end
      write_vector(next_frame++);
      checks++; if (!full) begin failures++; $display("FAIL not refilled"); end
      check_window();
    end
    // two advances, then one refill overlapping the second advance
    advance = 1; @(negedge clk); advance = 0; head_frame++;
    wr_valid = 1;
    for (int d = 0; d < P; d++) begin
      wr_data = to24(gen_x(next_frame, d));
      advance = (d == P - 1);
      @(negedge clk);
    end
    advance = 0; wr_valid = 0; head_frame++; next_frame++;
    checks++; if (full) begin failures++; $display("FAIL count with simultaneous advance"); end
    write_vector(next_frame++);
    checks++; if (!full) begin failures++; $display("FAIL not full at end"); end
    check_window();
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
