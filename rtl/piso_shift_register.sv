// piso_shift_register: parallel-in serial-out shift register with a
// per-bit select.
//
// Each flip-flop takes, on the rising clock edge, either its parallel input
// (load = 1) or the previous flip-flop's output (load = 0); bit 0 takes 0
// when shifting. dout is the last flip-flop, q[N-1], so the word leaves most
// significant bit first: dout shows bit N-1 right after the load and bit
// N-1-k after k shift clocks. In the ALU chip load is Ko, so the register
// captures the ALU outputs while they are complete DATA and shifts them out
// once the ALU has returned to NULL. No reset.
module piso_shift_register #(
  parameter int unsigned N = 38
) (
  input  logic         clk,
  input  logic         load,
  input  logic [N-1:0] d,
  output logic         dout
);

  logic [N-1:0] q;

  always_ff @(posedge clk) q <= load ? d : {q[N-2:0], 1'b0};

  assign dout = q[N-1];

endmodule
