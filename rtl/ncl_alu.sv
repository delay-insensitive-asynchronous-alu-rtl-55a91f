// ncl_alu: the dual-rail NCL 8051 ALU core.
//
// The input set (TMP1, TMP2, AL, AC, CYi, LOS, AOS, 48 wires) goes to an
// arithmetic and a logic unit of nine operation slots each. AOS or LOS
// together with the code on AL steer the operands to one slot: only that
// slot computes, every other slot and the other unit keep their outputs
// NULL, so the two unit results are merged by ORing them rail by rail. The merged
// output set (resultL, resultH, OV, AC, CY, 38 wires) feeds a completion
// detector whose output Ko rises once the whole output set is DATA and falls
// once it is all NULL again.
//
// Use: apply NULL (all wires low), wait for Ko = 0, apply a complete DATA set,
// wait for Ko = 1, read the outputs, return to NULL. Exactly one of AOS and
// LOS must be DATA 1 and AL must be 0 to 8: both selects DATA 1 gives illegal
// codes on the outputs; both DATA 0, or a larger code, leaves them NULL so
// that Ko never rises. Steering the operands to one operation and ORing all
// results follows the original; the grouping into two units, the operation
// codes and Ko's polarity (high = complete DATA) are this design's reading.
module ncl_alu
  import ncl_pkg::*;
(
  input  alu_in_dr_t  in,
  output alu_out_dr_t out,
  output logic        ko
);

  alu_out_dr_t arith_out, logic_out;

  ncl_alu_arith u_arith (.in(in), .out(arith_out));
  ncl_alu_logic u_logic (.in(in), .out(logic_out));

  assign out = arith_out | logic_out;

  ncl_completion #(.N(OUT_SIGNALS)) u_cd (.sig(out), .done(ko));

endmodule
