// tb_ncl_input_control: self-checking testbench for the Nullcontrol gating
// and the Ko clock gate. For random register contents and every combination
// of Clock, Nullcontrol and Ko it checks that the ALU inputs equal the
// register bits only while Nullcontrol is high (all low otherwise) and that
// the register clock follows Clock only while Ko is low.
module tb_ncl_input_control;
  localparam int N = 48;
  logic         clock, nullcontrol, ko, sipo_clk;
  logic [N-1:0] sipo_q, alu_in;
  int checks = 0, failures = 0;

  ncl_input_control #(.N(N)) dut (
    .clock(clock), .nullcontrol(nullcontrol), .ko(ko),
    .sipo_q(sipo_q), .alu_in(alu_in), .sipo_clk(sipo_clk)
  );

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 500; k++) begin
      sipo_q = {16'($urandom), 32'($urandom)};
      for (int m = 0; m < 8; m++) begin
        {clock, nullcontrol, ko} = 3'(m);
        #1;
        checks++;
        if (alu_in != (nullcontrol ? sipo_q : '0)) failures++;
        checks++;
        if (sipo_clk != (clock && !ko)) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
