// tb_ncl_alu_op: self-checking testbench for the operation slot.
//
// Instantiates all 18 slots (9 arithmetic, 9 logic) side by side, drives them
// with the same dual-rail input sets and checks, for every operation with
// corner and random operands, that only the addressed slot produces DATA
// (equal to the reference model's result), that all other slots stay NULL,
// and that the addressed slot holds its result on a partial NULL set and
// clears on a complete one.
module tb_ncl_alu_op;
  import alu_ref_pkg::*;
  import ncl_pkg::*;

  alu_in_dr_t  in;
  alu_out_dr_t out [2][9];
  int checks = 0, failures = 0;

  for (genvar ar = 0; ar < 2; ar++) begin : g_unit
    for (genvar k = 0; k < 9; k++) begin : g_op
      ncl_alu_op #(.ARITH(ar == 1), .OP(4'(k))) dut (.in(in), .out(out[ar][k]));
    end
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic run_op(bit is_arith, int op, int a, int b, bit cyi, bit aci);
    logic [47:0] full;
    logic [37:0] want;
    full = dr48(in_vec(is_arith, op, a, b, cyi, aci));
    want = dr38(ref_alu(is_arith, op, a, b, cyi, aci));
    in = '0; #1;
    in = alu_in_dr_t'(full); #1;
    for (int u = 0; u < 2; u++)
      for (int k = 0; k < 9; k++)
        if (u == int'(is_arith) && k == op)
          check(out[u][k] == want, $sformatf("slot %0d/%0d a=%0d b=%0d cy=%0d ac=%0d", u, k, a, b, cyi, aci));
        else
          check(out[u][k] == '0, $sformatf("slot %0d/%0d not addressed stays NULL", u, k));
    in = alu_in_dr_t'(full & {24{2'b11}} & ~48'h3); #1;  // tmp1 bit 0 back to NULL
    check(out[is_arith][op] == want, "hold on partial NULL");
    in = '0; #1;
    check(out[is_arith][op] == '0, "NULL after NULL set");
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int corner[5] = '{0, 15, 127, 128, 255};
    for (int u = 0; u < 2; u++)
      for (int op = 0; op < 9; op++) begin
        foreach (corner[i]) foreach (corner[j])
          run_op(u == 1, op, corner[i], corner[j], $urandom_range(1, 0) == 1, $urandom_range(1, 0) == 1);
        for (int k = 0; k < 100; k++)
          run_op(u == 1, op, $urandom_range(255, 0), $urandom_range(255, 0),
                 $urandom_range(1, 0) == 1, $urandom_range(1, 0) == 1);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
