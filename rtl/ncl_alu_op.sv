// ncl_alu_op: one operation of the NCL 8051 ALU.
//
// Each of the 18 ALU operations has its own slot. A slot takes the whole
// dual-rail input set and produces DATA only when the operands are steered
// to it: its unit select (AOS for ARITH = 1, LOS for ARITH = 0) is DATA 1 and
// the operation code AL equals OP. Every other slot keeps its outputs NULL,
// so the outputs of all slots can be merged by ORing them wire by wire.
//
// NCL behaviour: the outputs go to DATA only once every input signal holds
// DATA (input completeness) and return to NULL only once every input signal
// is NULL; in between they hold. That hold is the hysteresis of the
// threshold gates that make up an NCL circuit and is written here as a
// latch on each output rail, which is why synthesis reports latches. The
// original gate-level netlist is not available, so the Boolean function of
// the slot is written at word level; the DATA/NULL behaviour at its outputs
// is the same.
//
// Results and flags follow the 8051 instruction set. Operand use (this
// design's choice): A = TMP1, B or source byte = TMP2, INC DPTR treats
// TMP2:TMP1 as DPH:DPL. resultL carries the 8-bit result (MUL: low byte, DIV:
// quotient) and resultH the second byte (MUL: high byte, DIV: remainder, INC
// DPTR: DPH), 0 otherwise. Flags an operation leaves alone are passed from
// CYi and AC; OV, having no input, is then 0.
module ncl_alu_op
  import ncl_pkg::*;
#(
  parameter bit          ARITH = 1'b1,
  parameter logic [3:0]  OP    = 4'd0
) (
  input  alu_in_dr_t  in,
  output alu_out_dr_t out
);

  function automatic alu_out_bool_t arith_result(alu_in_bool_t b);
    alu_out_bool_t r;
    logic [8:0]    s9, da;
    logic [4:0]    s5;
    logic [7:0]    s7;
    logic [15:0]   p16;
    logic          c, dacy;
    r    = '0;
    r.cy = b.cyi;
    r.ac = b.ac;
    c    = (OP == OP_ADDC || OP == OP_SUBB) ? b.cyi : 1'b0;
    case (OP)
      OP_ADD, OP_ADDC: begin
        s9 = {1'b0, b.tmp1} + {1'b0, b.tmp2} + {8'd0, c};
        s5 = {1'b0, b.tmp1[3:0]} + {1'b0, b.tmp2[3:0]} + {4'd0, c};
        s7 = {1'b0, b.tmp1[6:0]} + {1'b0, b.tmp2[6:0]} + {7'd0, c};
        r.result_l = s9[7:0];
        r.cy = s9[8];          // carry out of bit 7
        r.ac = s5[4];          // carry out of bit 3
        r.ov = s9[8] ^ s7[7];  // carry into bit 7 differs from carry out
      end
      OP_SUBB: begin
        s9 = {1'b0, b.tmp1} - {1'b0, b.tmp2} - {8'd0, c};
        s5 = {1'b0, b.tmp1[3:0]} - {1'b0, b.tmp2[3:0]} - {4'd0, c};
        s7 = {1'b0, b.tmp1[6:0]} - {1'b0, b.tmp2[6:0]} - {7'd0, c};
        r.result_l = s9[7:0];
        r.cy = s9[8];          // borrow out of bit 7
        r.ac = s5[4];          // borrow out of bit 3
        r.ov = s9[8] ^ s7[7];  // borrow into bit 7 differs from borrow out
      end
      OP_INC: r.result_l = b.tmp1 + 8'd1;
      OP_DEC: r.result_l = b.tmp1 - 8'd1;
      OP_INC_DPTR: {r.result_h, r.result_l} = {b.tmp2, b.tmp1} + 16'd1;
      OP_MUL: begin
        p16 = 16'(b.tmp1) * 16'(b.tmp2);
        {r.result_h, r.result_l} = p16;
        r.cy = 1'b0;
        r.ov = |p16[15:8];
      end
      OP_DIV: begin
        r.cy = 1'b0;
        if (b.tmp2 == 8'd0) begin
          r.result_l = 8'hFF;  // undefined in the 8051; flagged by OV
          r.result_h = b.tmp1;
          r.ov = 1'b1;
        end else begin
          r.result_l = b.tmp1 / b.tmp2;
          r.result_h = b.tmp1 % b.tmp2;
        end
      end
      OP_DA: begin
        da   = {1'b0, b.tmp1};
        dacy = b.cyi;
        if (da[3:0] > 4'd9 || b.ac) begin
          da   = da + 9'h006;
          dacy = dacy | da[8];
        end
        if (da[7:4] > 4'd9 || dacy) begin
          da   = {1'b0, da[7:0]} + 9'h060;
          dacy = dacy | da[8];
        end
        r.result_l = da[7:0];
        r.cy = dacy;
      end
      default: ;
    endcase
    return r;
  endfunction

  function automatic alu_out_bool_t logic_result(alu_in_bool_t b);
    alu_out_bool_t r;
    r    = '0;
    r.cy = b.cyi;
    r.ac = b.ac;
    case (OP)
      OP_ANL:  r.result_l = b.tmp1 & b.tmp2;
      OP_ORL:  r.result_l = b.tmp1 | b.tmp2;
      OP_XRL:  r.result_l = b.tmp1 ^ b.tmp2;
      OP_CPL:  r.result_l = ~b.tmp1;
      OP_RL:   r.result_l = {b.tmp1[6:0], b.tmp1[7]};
      OP_RR:   r.result_l = {b.tmp1[0], b.tmp1[7:1]};
      OP_RLC: begin
        r.result_l = {b.tmp1[6:0], b.cyi};
        r.cy = b.tmp1[7];
      end
      OP_RRC: begin
        r.result_l = {b.cyi, b.tmp1[7:1]};
        r.cy = b.tmp1[0];
      end
      OP_SWAP: r.result_l = {b.tmp1[3:0], b.tmp1[7:4]};
      default: ;
    endcase
    return r;
  endfunction

  alu_in_bool_t  b;
  alu_out_bool_t r;
  logic          sel, all_data, all_null;

  assign b        = decode_in(in);
  assign all_data = in_all_data(in);
  assign all_null = (in == '0);
  assign sel      = (ARITH ? b.aos : b.los) && (b.al == OP);
  assign r        = ARITH ? arith_result(b) : logic_result(b);

  always_latch begin
    if (all_null)             out = '0;
    else if (all_data && sel) out = encode_out(r);
  end

endmodule
