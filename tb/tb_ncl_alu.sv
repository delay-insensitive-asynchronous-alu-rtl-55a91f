// tb_ncl_alu: self-checking testbench for ncl_alu.
//
// For random and corner-case operands of every operation the unit can run,
// it applies a NULL set, a partial DATA set (some signals still NULL), the
// complete DATA set, a partial NULL set and NULL again. It checks that the
// outputs stay NULL until the DATA set is complete, equal the dual-rail
// encoding of the reference model's result once it is, hold while the input
// returns to NULL signal by signal, and are NULL again at the end. A second
// phase lets the 24 input signals arrive and leave one at a time in random
// order and checks that outputs and Ko change only with the last one.
// It also checks the completion output Ko at every step.

module tb_ncl_alu;
  import alu_ref_pkg::*;
  import ncl_pkg::*;

  alu_in_dr_t  in;
  alu_out_dr_t out;
  logic        ko;
  int checks = 0, failures = 0;

  ncl_alu dut (.in(in), .out(out), .ko(ko));

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic run_op(bit is_arith, int op, int a, int b, bit cyi, bit aci);
    logic [47:0] full;
    logic [47:0] mask;
    logic [37:0] expect_out;
    bit          selected;
    full = dr48(in_vec(is_arith, op, a, b, cyi, aci));
    selected = 1'b1;
    expect_out = selected ? dr38(ref_alu(is_arith, op, a, b, cyi, aci)) : '0;
    in = '0; #1;
    check(out == '0, "NULL in gives NULL out");
    check(ko == 1'b0, "Ko low after NULL");
    // partial DATA: a random non-empty set of signals still NULL
    mask = '0;
    for (int i = 0; i < 24; i++) if ($urandom_range(1, 0) == 1) mask[2*i +: 2] = 2'b11;
    mask[2*$urandom_range(23, 0) +: 2] = 2'b00;
    in = alu_in_dr_t'(full & mask); #1;
    check(out == '0, "partial DATA keeps NULL out");
    check(ko == 1'b0, "Ko low on partial DATA");
    in = alu_in_dr_t'(full); #1;
    check(out == expect_out, $sformatf("result op=%0d arith=%0d a=%0d b=%0d cy=%0d ac=%0d", op, is_arith, a, b, cyi, aci));
    check(ko == 1'b1, "Ko high on complete DATA");
    // partial NULL: a random set of signals back to NULL, at least one left
    mask = '0;
    for (int i = 0; i < 24; i++) if ($urandom_range(1, 0) == 1) mask[2*i +: 2] = 2'b11;
    mask[2*$urandom_range(23, 0) +: 2] = 2'b11;
    in = alu_in_dr_t'(full & mask); #1;
    check(out == expect_out, "outputs hold on partial NULL");
    check(ko == selected, "Ko holds on partial NULL");
    in = '0; #1;
    check(out == '0, "NULL again");
  endtask


  // Signals arrive one at a time in a random order, as with arbitrary wire
  // delays, and then leave one at a time in another random order.
  task automatic run_ordered(bit is_arith, int op, int a, int b, bit cyi, bit aci);
    logic [47:0] full, cur;
    logic [37:0] expect_out;
    int          order[24];
    full = dr48(in_vec(is_arith, op, a, b, cyi, aci));
    expect_out = dr38(ref_alu(is_arith, op, a, b, cyi, aci));
    foreach (order[i]) order[i] = i;
    order.shuffle();
    cur = '0;
    in = '0; #1;
    foreach (order[i]) begin
      cur[2*order[i] +: 2] = full[2*order[i] +: 2];
      in = alu_in_dr_t'(cur); #1;
      if (i < 23) check(out == '0 && ko == 1'b0, "no DATA before the last input arrives");
      else        check(out == expect_out && ko == 1'b1, "DATA once the last input arrives");
    end
    order.shuffle();
    foreach (order[i]) begin
      cur[2*order[i] +: 2] = 2'b00;
      in = alu_in_dr_t'(cur); #1;
      if (i < 23) check(out == expect_out && ko == 1'b1, "DATA held until the last input leaves");
      else        check(out == '0 && ko == 1'b0, "NULL once the last input leaves");
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int corner[6] = '{0, 1, 9, 127, 128, 255};
    for (int u = 0; u < 2; u++) begin

      automatic bit ar = (u == 0);
      for (int op = 0; op < 9; op++) begin
        foreach (corner[i]) foreach (corner[j])
          run_op(ar, op, corner[i], corner[j], $urandom_range(1, 0) == 1, $urandom_range(1, 0) == 1);
        for (int k = 0; k < 200; k++)
          run_op(ar, op, $urandom_range(255, 0), $urandom_range(255, 0),
                 $urandom_range(1, 0) == 1, $urandom_range(1, 0) == 1);
      end
    end
    for (int k = 0; k < 200; k++)
      run_ordered($urandom_range(1, 0) == 1, $urandom_range(8, 0), $urandom_range(255, 0),
                  $urandom_range(255, 0), $urandom_range(1, 0) == 1, $urandom_range(1, 0) == 1);
    // decimal adjust after BCD additions
    for (int x = 0; x < 100; x += 7) for (int y = 0; y < 100; y += 3) begin
      automatic int s = (x / 10) * 16 + x % 10 + (y / 10) * 16 + y % 10;
      automatic bit hc = ((x % 10) + (y % 10)) > 15;
      run_op(1, 8, s % 256, 0, s > 255, hc);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
