// tb_ncl_completion: self-checking testbench for completion detection.
//
// Takes 19 dual-rail signals (the ALU output set) through many DATA/NULL
// cycles. Each cycle moves the signals from NULL to DATA one random group at
// a time and back again, and checks that `done` rises exactly when the last
// signal becomes DATA and falls exactly when the last signal returns to NULL.
module tb_ncl_completion;
  import ncl_pkg::*;
  localparam int N = 19;
  dr_t [N-1:0] sig;
  logic        done;
  int checks = 0, failures = 0;

  ncl_completion #(.N(N)) dut (.sig(sig), .done(done));

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sig = '0; #1;
    check(done == 0, "NULL gives 0");
    for (int cyc = 0; cyc < 100; cyc++) begin
      bit [N-1:0] is_data;
      is_data = '0;
      while (is_data != '1) begin
        int i;
        i = $urandom_range(N-1, 0);
        is_data[i] = 1;
        sig[i] = $urandom_range(1, 0) ? 2'b10 : 2'b01;
        #1;
        check(done == (is_data == '1), "rise only on complete DATA");
      end
      while (is_data != '0) begin
        int i;
        i = $urandom_range(N-1, 0);
        is_data[i] = 0;
        sig[i] = 2'b00;
        #1;
        check(done == (is_data != '0), "fall only on complete NULL");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
