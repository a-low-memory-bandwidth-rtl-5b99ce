// tb_addlog: checks the two-input log-add against the reference (bit exact)
// and against ln(e^a + e^b) in real arithmetic (within the table's error).
module tb_addlog;
  import gmm_pkg::*;
  import gmm_ref_pkg::*;

  fx_t a, b, y;
  int  checks = 0, failures = 0;

  addlog dut (.a, .b, .y);

  task automatic check(input longint va, input longint vb);
    longint exp_v;
    real    r, err;
    a = to24(va); b = to24(vb);
    #1;
    exp_v = addlog_ref(va, vb);
    checks++;
    if (longint'(y) != exp_v) begin
      failures++;
      $display("FAIL addlog(%0d,%0d) = %0d, expected %0d", va, vb, y, exp_v);
    end
    if (exp_v < FXMAX) begin
      r   = $ln($exp(real'(va - vb) / 1024.0) + 1.0) + real'(vb) / 1024.0;
      err = real'(y) / 1024.0 - r;
      checks++;
      if (err > 0.03 || err < -0.03) begin
        failures++;
        $display("FAIL addlog(%0d,%0d) error %f", va, vb, err);
      end
    end
  endtask

  initial begin
    check(0, 0);                       // ln 2
    check(1024, 1024);
    check(-5000, -5000);
    check(10000, 0);                   // beyond the table: max
    check(0, 8191);
    check(0, 8192);
    check(-8388608, -8388608);         // most negative
    check(8388607, 8388000);           // saturates
    for (int i = 0; i < 2000; i++) begin
      longint va, vb;
      va = longint'($urandom_range(0, 40000)) - 20000;
      vb = va + longint'($urandom_range(0, 12000)) - 6000;
      check(va, vb);
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
