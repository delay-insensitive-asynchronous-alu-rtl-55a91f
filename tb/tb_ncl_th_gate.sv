// tb_ncl_th_gate: self-checking testbench for the NCL threshold gate.
//
// Drives a TH2_3 and a TH4_4 gate (the C-element) with random input vectors,
// and a TH1_2 gate (an OR), and compares each output with a model of the
// threshold rule: set when at least M inputs are high, cleared when all are
// low, unchanged otherwise. Counts how often the hold (hysteresis) case was
// exercised with the output high and low, and fails if either never occurred.
module tb_ncl_th_gate;
  logic [2:0] a3;
  logic [3:0] a4;
  logic [1:0] a2;
  logic       z23, z44, z12;
  bit         m23 = 0, m44 = 0;
  int checks = 0, failures = 0, hold_hi = 0, hold_lo = 0;

  ncl_th_gate #(.N(3), .M(2)) u23 (.a(a3), .z(z23));
  ncl_th_gate #(.N(4), .M(4)) u44 (.a(a4), .z(z44));
  ncl_th_gate #(.N(2), .M(1)) u12 (.a(a2), .z(z12));

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a3 = '0; a4 = '0; a2 = '0; #1;
    check(z23 == 0 && z44 == 0 && z12 == 0, "all low after NULL");
    for (int k = 0; k < 4000; k++) begin
      a3 = 3'($urandom); a4 = 4'($urandom); a2 = 2'($urandom);
      if (k % 5 == 0) a3 = '0;
      if (k % 7 == 0) a4 = '0;
      if (k % 11 == 0) a4 = '1;
      #1;
      if ($countones(a3) >= 2) m23 = 1; else if (a3 == 0) m23 = 0;
      if (a4 == 4'hF) m44 = 1;
      else if (a4 == 0) m44 = 0;
      else if (m44) hold_hi++;
      else hold_lo++;
      check(z23 == m23, "TH23");
      check(z44 == m44, "TH44");
      check(z12 == (a2 != 0), "TH12");
    end
    check(hold_hi > 0, "hold high exercised");
    check(hold_lo > 0, "hold low exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
