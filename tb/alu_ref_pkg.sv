// alu_ref_pkg: independent reference model of the 8051 ALU operations, used
// by the testbenches. It works on plain integers, one instruction at a time,
// following the 8051 instruction-set rules for results and flags, and returns
// the 19 output signals packed as {CY, AC, OV, resultH[7:0], resultL[7:0]}.
// Operation numbering (arithmetic with aos, logic with los):
//   arithmetic 0 ADD 1 ADDC 2 SUBB 3 INC 4 DEC 5 INC DPTR 6 MUL 7 DIV 8 DA
//   logic      0 ANL 1 ORL  2 XRL  3 CPL 4 RL  5 RR       6 RLC 7 RRC 8 SWAP
package alu_ref_pkg;

  function automatic logic [18:0] ref_alu(bit is_arith, int op, int a, int b,
                                          bit cy_in, bit ac_in);
    int  l = 0, h = 0, t, sa, sb, sr;
    bit  cy = cy_in, ac = ac_in, ov = 0;
    if (is_arith) begin
      case (op)
        0, 1: begin
          t  = (op == 1) ? int'(cy_in) : 0;
          l  = (a + b + t) % 256;
          cy = (a + b + t) > 255;
          ac = ((a % 16) + (b % 16) + t) > 15;
          sa = (a > 127) ? a - 256 : a;
          sb = (b > 127) ? b - 256 : b;
          sr = sa + sb + t;
          ov = (sr > 127) || (sr < -128);
        end
        2: begin
          t  = int'(cy_in);
          l  = (a - b - t + 512) % 256;
          cy = (a - b - t) < 0;
          ac = ((a % 16) - (b % 16) - t) < 0;
          sa = (a > 127) ? a - 256 : a;
          sb = (b > 127) ? b - 256 : b;
          sr = sa - sb - t;
          ov = (sr > 127) || (sr < -128);
        end
        3: l = (a + 1) % 256;
        4: l = (a + 255) % 256;
        5: begin
          t = (b * 256 + a + 1) % 65536;
          l = t % 256;
          h = t / 256;
        end
        6: begin
          t  = a * b;
          l  = t % 256;
          h  = t / 256;
          cy = 0;
          ov = t > 255;
        end
        7: begin
          cy = 0;
          if (b == 0) begin
            l = 255; h = a; ov = 1;
          end else begin
            l = a / b; h = a % b;
          end
        end
        8: begin
          t = a;
          if ((t % 16) > 9 || ac_in) begin
            t = t + 6;
            if (t > 255) cy = 1;
            t = t % 256;
          end
          if ((t / 16) > 9 || cy) begin
            t = t + 96;
            if (t > 255) cy = 1;
            t = t % 256;
          end
          l = t;
        end
        default: ;
      endcase
    end else begin
      case (op)
        0: l = a & b;
        1: l = a | b;
        2: l = a ^ b;
        3: l = 255 - a;
        4: l = ((a * 2) % 256) + (a / 128);
        5: l = (a / 2) + 128 * (a % 2);
        6: begin l = ((a * 2) % 256) + int'(cy_in); cy = a / 128; end
        7: begin l = (a / 2) + 128 * int'(cy_in); cy = a % 2; end
        8: l = (a % 16) * 16 + a / 16;
        default: ;
      endcase
    end
    return {cy, ac, ov, 8'(h), 8'(l)};
  endfunction

  // Dual-rail encoding of a Boolean vector: bit i on wires 2i+1 (true rail)
  // and 2i (false rail).
  function automatic logic [47:0] dr48(logic [23:0] v);
    logic [47:0] r;
    for (int i = 0; i < 24; i++) r[2*i +: 2] = v[i] ? 2'b10 : 2'b01;
    return r;
  endfunction

  function automatic logic [37:0] dr38(logic [18:0] v);
    logic [37:0] r;
    for (int i = 0; i < 19; i++) r[2*i +: 2] = v[i] ? 2'b10 : 2'b01;
    return r;
  endfunction

  // Input set as a Boolean vector: {aos, los, cyi, ac, al[3:0], tmp2, tmp1}.
  function automatic logic [23:0] in_vec(bit is_arith, int op, int a, int b,
                                         bit cy_in, bit ac_in);
    return {is_arith, ~is_arith, cy_in, ac_in, 4'(op), 8'(b), 8'(a)};
  endfunction

endpackage
