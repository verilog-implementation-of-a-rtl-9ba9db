// sparrow_ref_pkg: reference models used by the testbenches.
//
// Plain integer arithmetic, written apart from the RTL, for the SPARROW
// stage-1 lane operations, the stage-2 reductions, the RV32M multiplies and
// instruction encoding helpers. Operation codes are written as literals so a
// wrong constant in the RTL package is caught.
package sparrow_ref_pkg;

  function automatic int sx8(int v);   // 8-bit value as signed integer
    v = v & 255;
    return (v >= 128) ? v - 256 : v;
  endfunction

  function automatic int sat_s(int v);
    return (v > 127) ? 127 : (v < -128) ? -128 : v;
  endfunction

  function automatic int sat_u(int v);
    return (v > 255) ? 255 : (v < 0) ? 0 : v;
  endfunction

  // Shift of one lane; a non-negative b shifts left, b bit 0 = arithmetic.
  function automatic int ref_shift(int a, int b, bit do_sat);
    int bs, amt, v, r;
    bit arith;
    bs    = sx8(b);
    arith = (b & 1) != 0;
    amt   = ((bs < 0) ? -bs : bs) / 2;
    v     = arith ? sx8(a) : (a & 255);
    if (bs >= 0) begin
      if (v == 0)        r = 0;
      else if (amt >= 16) r = (v < 0) ? -(1 << 20) : (1 << 20);
      else               r = v * (1 << amt);
    end else begin
      if (amt >= 16)     r = (v < 0) ? -1 : 0;
      else               r = v >>> amt;
    end
    if (do_sat) r = arith ? sat_s(r) : sat_u(r);
    return r & 255;
  endfunction

  function automatic int ref_lane(int op, int a, int b);
    int as_, bs_;
    a = a & 255; b = b & 255;
    as_ = sx8(a); bs_ = sx8(b);
    case (op)
      5'b00001: return (a + b) & 255;
      5'b00010: return (a - b) & 255;
      5'b00011, 5'b10011: return (a * b) & 255;
      5'b00101: return ((as_ > bs_) ? as_ : bs_) & 255;
      5'b00110: return ((as_ < bs_) ? as_ : bs_) & 255;
      5'b10101: return (a > b) ? a : b;
      5'b10110: return (a < b) ? a : b;
      5'b00111: return a & b;
      5'b01000: return a | b;
      5'b01001: return a ^ b;
      5'b01010: return (~(a & b)) & 255;
      5'b01011: return (~(a | b)) & 255;
      5'b01100: return (~(a ^ b)) & 255;
      5'b01101: return sat_s(as_ + bs_) & 255;
      5'b01110: return sat_s(as_ - bs_) & 255;
      5'b01111: return sat_s(as_ * bs_) & 255;
      5'b11101: return sat_u(a + b);
      5'b11110: return sat_u(a - b);
      5'b11111: return sat_u(a * b);
      5'b10001: return ref_shift(a, b, 1'b0);
      5'b11001: return ref_shift(a, b, 1'b1);
      5'b10000: return b;
      default:  return a;
    endcase
  endfunction

  function automatic logic [31:0] ref_s1(int op, logic [31:0] a, logic [31:0] b);
    logic [31:0] r;
    for (int i = 0; i < 4; i++)
      r[8*i +: 8] = 8'(ref_lane(op, int'(a[8*i +: 8]), int'(b[8*i +: 8])));
    return r;
  endfunction

  function automatic bit ref_is_sat(int op1);
    return op1 == 5'b01101 || op1 == 5'b01110 || op1 == 5'b01111 ||
           op1 == 5'b11001 || op1 == 5'b11101 || op1 == 5'b11110 ||
           op1 == 5'b11111;
  endfunction

  function automatic logic [31:0] ref_s2(int op2, logic [31:0] w, bit sat);
    int v[4];
    int sum, mx, mn, x;
    bit sgn;
    sgn = (op2 & 4) == 0;
    for (int i = 0; i < 4; i++)
      v[i] = sgn ? sx8(int'(w[8*i +: 8])) : int'(w[8*i +: 8]);
    sum = v[0] + v[1] + v[2] + v[3];
    mx = v[0]; mn = v[0]; x = 0;
    for (int i = 0; i < 4; i++) begin
      if (v[i] > mx) mx = v[i];
      if (v[i] < mn) mn = v[i];
      x = x ^ int'(w[8*i +: 8]);
    end
    if (sat) sum = sgn ? sat_s(sum) : sat_u(sum);
    case (op2)
      0: return w;
      1, 5: return 32'(sum);
      2, 6: return 32'(mx);
      3, 7: return 32'(mn);
      default: return 32'(x);
    endcase
  endfunction

  function automatic logic [31:0] ref_sparrow(int op1, int op2, logic [31:0] a,
                                               logic [31:0] b);
    return ref_s2(op2, ref_s1(op1, a, b), ref_is_sat(op1));
  endfunction

  function automatic logic [31:0] ref_mul(int kind, logic [31:0] a, logic [31:0] b);
    longint sa, sb, ua, ub;
    logic [127:0] p;
    sa = longint'(signed'(a)); sb = longint'(signed'(b));
    ua = longint'(a);          ub = longint'(b);
    case (kind)
      0: p = 128'(ua * ub);
      1: p = 128'(signed'(sa * sb));
      2: p = 128'(signed'(sa * ub));
      default: p = 128'(ua * ub);
    endcase
    return (kind == 0) ? p[31:0] : p[63:32];
  endfunction

  // Instruction encoders.
  function automatic logic [31:0] enc_sparrow(int op1, int op2, int rd, int rs1, int rs2);
    return {2'b00, 5'(op1), 5'(rs2), 5'(rs1), 3'(op2), 5'(rd), 7'b0001011};
  endfunction

  function automatic logic [31:0] enc_mul(int kind, int rd, int rs1, int rs2);
    return {7'b0000001, 5'(rs2), 5'(rs1), 3'(kind), 5'(rd), 7'b0110011};
  endfunction

endpackage
