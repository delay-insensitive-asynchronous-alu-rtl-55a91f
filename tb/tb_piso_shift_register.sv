// tb_piso_shift_register: self-checking testbench for the 38-bit output
// register. Loads random words (load held for one or two clocks, as in the
// chip) and then shifts them out, checking that dout presents bit 37 right
// after the load and bit 37-k after k shift clocks, followed by zeros.
module tb_piso_shift_register;
  localparam int N = 38;
  logic         clk = 0, load = 0, dout;
  logic [N-1:0] d;
  int checks = 0, failures = 0, cycles = 0;

  piso_shift_register #(.N(N)) dut (.clk(clk), .load(load), .d(d), .dout(dout));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 20000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] word;
    @(negedge clk);
    for (int w = 0; w < 200; w++) begin
      word = {6'($urandom), 32'($urandom)};
      d = word; load = 1;
      repeat ($urandom_range(2, 1)) @(negedge clk);
      d = ~word; load = 0;  // the parallel input no longer matters
      for (int k = 0; k < N + 2; k++) begin
        checks++;
        if (dout !== ((k < N) ? word[N-1-k] : 1'b0)) begin
          failures++;
          if (failures < 10) $display("FAIL word %0d bit %0d", w, k);
        end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
