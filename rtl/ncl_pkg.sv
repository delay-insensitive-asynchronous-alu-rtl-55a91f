// ncl_pkg: shared types for the dual-rail NULL Convention Logic (NCL) 8051 ALU.
//
// Every ALU signal is carried on two wires (dual rail): rail t high means
// DATA 1, rail f high means DATA 0, both low is NULL and both high is an
// illegal code. The ALU input set holds 24 such signals (48 wires) and the
// output set 19 signals (38 wires), which matches the 48-bit input and 38-bit
// output shift registers of the chip. The grouping of the 24 input signals
// (TMP1, TMP2, AL, AC, CYi, LOS, AOS) follows the chip's block diagram; the
// width of AL (4 bits) and the operation codes below are this design's own
// choice, since only the operation names are known.
package ncl_pkg;

  // One dual-rail signal: t = rail 1, f = rail 0.
  typedef struct packed {
    logic t;
    logic f;
  } dr_t;


  // Operation codes carried on AL. AOS = DATA 1 selects the arithmetic unit,
  // LOS = DATA 1 selects the logic unit; exactly one of them must be DATA 1.
  typedef enum logic [3:0] {
    OP_ADD      = 4'd0,
    OP_ADDC     = 4'd1,
    OP_SUBB     = 4'd2,
    OP_INC      = 4'd3,
    OP_DEC      = 4'd4,
    OP_INC_DPTR = 4'd5,
    OP_MUL      = 4'd6,
    OP_DIV      = 4'd7,
    OP_DA       = 4'd8
  } arith_op_e;

  typedef enum logic [3:0] {
    OP_ANL  = 4'd0,
    OP_ORL  = 4'd1,
    OP_XRL  = 4'd2,
    OP_CPL  = 4'd3,
    OP_RL   = 4'd4,
    OP_RR   = 4'd5,
    OP_RLC  = 4'd6,
    OP_RRC  = 4'd7,
    OP_SWAP = 4'd8
  } logic_op_e;

  // Boolean view of the ALU input set (24 signals), highest field first.
  typedef struct packed {
    logic       aos;   // arithmetic operation select
    logic       los;   // logic operation select
    logic       cyi;   // carry in
    logic       ac;    // auxiliary carry in
    logic [3:0] al;    // operation code
    logic [7:0] tmp2;  // second operand (B, source byte, DPH)
    logic [7:0] tmp1;  // first operand (A, DPL)
  } alu_in_bool_t;

  // Boolean view of the ALU output set (19 signals).
  typedef struct packed {
    logic       cy;
    logic       ac;
    logic       ov;
    logic [7:0] result_h;
    logic [7:0] result_l;
  } alu_out_bool_t;

  localparam int unsigned IN_SIGNALS  = $bits(alu_in_bool_t);   // 24
  localparam int unsigned OUT_SIGNALS = $bits(alu_out_bool_t);  // 19

  // Dual-rail views: signal i of the Boolean view sits on wires 2i+1 (t) and 2i (f).
  typedef dr_t [IN_SIGNALS-1:0]  alu_in_dr_t;   // 48 wires
  typedef dr_t [OUT_SIGNALS-1:0] alu_out_dr_t;  // 38 wires

  function automatic alu_out_dr_t encode_out(alu_out_bool_t b);
    alu_out_dr_t r;
    for (int i = 0; i < OUT_SIGNALS; i++) begin
      r[i].t = b[i];
      r[i].f = ~b[i];
    end
    return r;
  endfunction

  function automatic alu_in_bool_t decode_in(alu_in_dr_t d);
    alu_in_bool_t b;
    for (int i = 0; i < IN_SIGNALS; i++) b[i] = d[i].t;
    return b;
  endfunction

  // True when every signal of the input set holds DATA (exactly one rail high).
  function automatic logic in_all_data(alu_in_dr_t d);
    logic ok = 1'b1;
    for (int i = 0; i < IN_SIGNALS; i++) ok &= d[i].t ^ d[i].f;
    return ok;
  endfunction

endpackage
