// tb_sipo_shift_register: self-checking testbench for the 48-bit serial-in
// register. Shifts random bits in and compares the parallel output after
// every clock with a model that holds the last 48 bits, the first of them in
// the most significant position.
module tb_sipo_shift_register;
  localparam int N = 48;
  logic         clk = 0, din = 0;
  logic [N-1:0] q;
  logic [N-1:0] model;
  int checks = 0, failures = 0, cycles = 0;

  sipo_shift_register #(.N(N)) dut (.clk(clk), .din(din), .q(q));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 5000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < N; k++) begin
      @(negedge clk) din = 1'($urandom);
      model = {model[N-2:0], din};
    end
    @(negedge clk);
    for (int k = 0; k < 1000; k++) begin
      checks++;
      if (q != model) begin
        failures++;
        if (failures < 10) $display("FAIL q=%h model=%h", q, model);
      end
      din = 1'($urandom);
      model = {model[N-2:0], din};
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
