// sipo_shift_register: serial-in parallel-out shift register.
//
// On every rising edge of clk the register shifts one place towards the
// most significant bit and takes din into bit 0, so after N clocks the first
// bit shifted in sits in q[N-1]. In the ALU chip it holds the 48 input wires
// of the ALU and its clock is gated off while Ko is high, which freezes the
// operands while the ALU holds DATA. No reset: every bit is written by
// shifting before it is used.
module sipo_shift_register #(
  parameter int unsigned N = 48
) (
  input  logic         clk,
  input  logic         din,
  output logic [N-1:0] q
);

  always_ff @(posedge clk) q <= {q[N-2:0], din};

endmodule
