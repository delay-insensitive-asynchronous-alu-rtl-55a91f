// tb_ncl_alu_chip: end-to-end testbench for the complete ALU chip, at its
// default sizes (48-bit input register, 38-bit output register).
//
// The testbench plays the part of the external pattern generator: it drives
// Clock, Data In and Nullcontrol and changes Nullcontrol only while Clock is
// low. For each instruction it
//   - checks that Ko is low (NULL has passed through the ALU),
//   - shifts the 48 dual-rail input wires in, most significant wire first,
//     while reading the previous result from Data Out (38 wires, MSB first),
//   - raises Nullcontrol and checks that Ko rises (DATA has passed through),
//   - gives two clocks with Ko high, checking that the input register is
//     frozen (its clock is gated) while the output register loads,
//   - lowers Nullcontrol and checks that Ko falls.
// Every result read back is decoded rail by rail and compared with the
// reference model. It runs all 18 instructions with corner and random
// operands and counts each mechanism: DATA and NULL wavefronts, gated input
// clocks, parallel loads, serial shifts, each instruction, and each of CY, AC
// and OV being set; a mechanism that never happened is a failure. It also
// checks the per-instruction cost of 48 + 2 clocks.
module tb_ncl_alu_chip;
  import alu_ref_pkg::*;

  logic clock = 0, data_in = 0, nullcontrol = 0;
  logic data_out, ko;
  int   checks = 0, failures = 0, clocks = 0;

  ncl_alu_chip dut (
    .clock(clock), .data_in(data_in), .nullcontrol(nullcontrol),
    .data_out(data_out), .ko(ko)
  );

  // mechanism counters
  int n_data_wave = 0, n_null_wave = 0, n_gated = 0, n_load = 0, n_shift = 0;
  int n_cy = 0, n_ac = 0, n_ov = 0;
  int n_op[2][9];

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic tick();
    #5 clock = 1;
    #5 clock = 0;
    clocks++;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit          have_prev = 0;
  logic [18:0] prev_expect;

  // Decode 38 received wires into 19 Boolean signals; flag illegal codes.
  task automatic compare_result(logic [37:0] got, logic [18:0] want);
    bit ok = 1;
    logic [18:0] val;
    for (int i = 0; i < 19; i++) begin
      if (got[2*i +: 2] != 2'b10 && got[2*i +: 2] != 2'b01) ok = 0;
      val[i] = got[2*i + 1];
    end
    check(ok, "every output wire pair holds DATA");
    check(val == want, $sformatf("result %h expected %h", val, want));
    if (want[18]) n_cy++;
    if (want[17]) n_ac++;
    if (want[16]) n_ov++;
  endtask

  task automatic run_instr(bit is_arith, int op, int a, int b, bit cyi, bit aci);
    logic [47:0] wires;
    logic [37:0] got;
    logic [47:0] frozen;
    int          start;
    wires = dr48(in_vec(is_arith, op, a, b, cyi, aci));
    start = clocks;
    check(ko == 1'b0, "Ko low before shifting in");
    for (int k = 0; k < 48; k++) begin
      data_in = wires[47 - k];
      if (k < 38) got[37 - k] = data_out;
      tick();
      n_shift++;
    end
    if (have_prev) compare_result(got, prev_expect);
    check(dut.u_sipo.q == wires, "input register holds the shifted word");
    nullcontrol = 1;
    #1;
    check(ko == 1'b1, "Ko high after DATA set");
    if (ko) n_data_wave++;
    frozen = dut.u_sipo.q;
    repeat (2) begin
      data_in = 1'($urandom);
      tick();
      check(dut.u_sipo.q == frozen, "input register frozen while Ko high");
      n_gated++;
    end
    n_load++;
    nullcontrol = 0;
    #1;
    check(ko == 1'b0, "Ko low after NULL set");
    if (!ko) n_null_wave++;
    check(clocks - start == 50, "48 + 2 clocks per instruction");
    prev_expect = ref_alu(is_arith, op, a, b, cyi, aci);
    have_prev = 1;
    n_op[is_arith][op]++;
  endtask

  initial begin
    int corner[5] = '{0, 9, 127, 128, 255};
    logic [37:0] got;
    #3;
    check(ko == 1'b0, "Ko low after power-up with NULL inputs");
    for (int ar = 0; ar < 2; ar++)
      for (int op = 0; op < 9; op++) begin
        foreach (corner[i])
          run_instr(ar == 1, op, corner[i], corner[(i + op) % 5], op[0], op[1]);
        for (int k = 0; k < 15; k++)
          run_instr(ar == 1, op, $urandom_range(255, 0), $urandom_range(255, 0),
                    $urandom_range(1, 0) == 1, $urandom_range(1, 0) == 1);
      end
    // shift out the last result
    for (int k = 0; k < 38; k++) begin
      got[37 - k] = data_out;
      tick();
    end
    compare_result(got, prev_expect);

    check(n_data_wave > 0, "DATA wavefront seen");
    check(n_null_wave > 0, "NULL wavefront seen");
    check(n_gated > 0, "input clock gated by Ko");
    check(n_load > 0, "parallel load of output register");
    check(n_shift > 0, "serial shift");
    check(n_cy > 0 && n_ac > 0 && n_ov > 0, "CY, AC and OV each set");
    for (int ar = 0; ar < 2; ar++)
      for (int op = 0; op < 9; op++) check(n_op[ar][op] > 0, "every instruction run");
    $display("mechanisms: data_waves=%0d null_waves=%0d gated_clocks=%0d loads=%0d shifts=%0d cy=%0d ac=%0d ov=%0d",
             n_data_wave, n_null_wave, n_gated, n_load, n_shift, n_cy, n_ac, n_ov);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
