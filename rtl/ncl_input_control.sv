// ncl_input_control: the glue between the input shift register and the ALU.
//
// Every ALU input wire is the AND of a shift-register bit and Nullcontrol:
// with Nullcontrol low all ALU inputs are low, a NULL set; with Nullcontrol
// high the stored DATA set reaches the ALU. The input register's clock is
// Clock AND NOT Ko, so the register shifts only while the ALU is NULL (Ko
// low) and is frozen while the ALU holds DATA. Both gates follow the chip's
// block diagram. Nullcontrol should change only while Clock is low so that
// the gated clock cannot glitch.
module ncl_input_control #(
  parameter int unsigned N = 48
) (
  input  logic         clock,
  input  logic         nullcontrol,
  input  logic         ko,
  input  logic [N-1:0] sipo_q,
  output logic [N-1:0] alu_in,
  output logic         sipo_clk
);

  assign alu_in   = sipo_q & {N{nullcontrol}};
  assign sipo_clk = clock & ~ko;

endmodule
