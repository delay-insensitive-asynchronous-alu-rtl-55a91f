// ncl_alu_logic: logic unit of the NCL 8051 ALU.
//
// Nine operation slots (ncl_alu_op) for ANL, ORL, XRL, CPL, RL, RR, RLC,
// RRC and SWAP, codes 0 to 8 on AL. All slots see the same dual-rail
// input set; only the slot selected by LOS = DATA 1 and its code on AL
// produces DATA, the others stay NULL, so the unit output is the OR of all
// slot outputs, wire by wire. With LOS = DATA 0, or a code above 8, the
// outputs stay NULL. Outputs go to DATA only after a complete DATA input set
// and back to NULL only after a complete NULL input set.
module ncl_alu_logic
  import ncl_pkg::*;
(
  input  alu_in_dr_t  in,
  output alu_out_dr_t out
);

  localparam int unsigned NOPS = 9;

  alu_out_dr_t slot_out [NOPS];

  for (genvar k = 0; k < NOPS; k++) begin : g_op
    ncl_alu_op #(.ARITH(1'b0), .OP(4'(k))) u_op (.in(in), .out(slot_out[k]));
  end

  always_comb begin
    out = '0;
    for (int k = 0; k < NOPS; k++) out |= slot_out[k];
  end

endmodule
