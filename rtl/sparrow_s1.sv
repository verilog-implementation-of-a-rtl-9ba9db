// sparrow_s1: SPARROW stage 1 (S1_ALU + S1_select), purely combinational.
//
// The 32-bit inputs ra and rb are split into four 8-bit lanes and the same
// operation, chosen by the 5-bit code op1 (sd1), is applied to every lane
// pair. The result is the four lanes s1_res; nop passes ra and merg passes rb
// as whole words.
//
// Arithmetic follows the SPARROW operation table: add/sub/mul and their
// saturating forms, signed and unsigned max/min, the six bitwise operations,
// and shifts. Saturation clamps to [-128,127] for signed and [0,255] for
// unsigned data. Non-saturating results keep their low 8 bits.
//
// Shifts: the sign of the rb lane selects the direction, its bit 0 selects an
// arithmetic (signed data) or logical (unsigned data) shift, and the amount is
// |rb lane| / 2. The choices that the operation table leaves open are this
// design's own: a non-negative rb lane shifts left, bit 0 = 1 means
// arithmetic, amounts above 8 act like 8, and undefined codes act as nop.
//
// Timing: no clock; the result is valid in the same cycle as the inputs.
module sparrow_s1
  import sparrow_pkg::*;
(
  input  logic [XLEN-1:0] ra,
  input  logic [XLEN-1:0] rb,
  input  logic [4:0]      op1,
  output lanes_t          res
);

  function automatic lane_t clamp_s(logic signed [17:0] v);
    if (v > 18'sd127)       return 8'h7f;
    else if (v < -18'sd128) return 8'h80;
    else                    return v[7:0];
  endfunction

  function automatic lane_t clamp_u(logic signed [17:0] v);
    if (v > 18'sd255)     return 8'hff;
    else if (v < 18'sd0)  return 8'h00;
    else                  return v[7:0];
  endfunction

  function automatic lane_t lane_op(lane_t a, lane_t b, logic [4:0] op);
    logic signed [17:0] sa, sb, ua, ub;   // sign- and zero-extended operands
    logic signed [17:0] sh_val, sh_res;
    logic [8:0]         b_abs;
    logic [3:0]         amt;
    logic               arith, left;
    lane_t              r;
    sa = 18'(signed'(a));
    sb = 18'(signed'(b));
    ua = 18'(a);
    ub = 18'(b);
    // shift controls
    left   = ~b[7];
    arith  = b[0];
    b_abs  = b[7] ? (9'd0 - 9'(signed'(b))) : 9'(b);
    amt    = (b_abs[8:1] > 8'd8) ? 4'd8 : b_abs[4:1];
    sh_val = arith ? sa : ua;
    sh_res = left ? (sh_val <<< amt) : (sh_val >>> amt);
    case (op)
      S1_ADD:   r = a + b;
      S1_SUB:   r = a - b;
      S1_MUL,
      S1_UMUL:  r = 8'(a * b);
      S1_MAX:   r = (sa > sb) ? a : b;
      S1_MIN:   r = (sa < sb) ? a : b;
      S1_UMAX:  r = (a > b) ? a : b;
      S1_UMIN:  r = (a < b) ? a : b;
      S1_AND:   r = a & b;
      S1_OR:    r = a | b;
      S1_XOR:   r = a ^ b;
      S1_NAND:  r = ~(a & b);
      S1_NOR:   r = ~(a | b);
      S1_XNOR:  r = ~(a ^ b);
      S1_SADD:  r = clamp_s(sa + sb);
      S1_SSUB:  r = clamp_s(sa - sb);
      S1_SMUL:  r = clamp_s(sa * sb);
      S1_USADD: r = clamp_u(ua + ub);
      S1_USSUB: r = clamp_u(ua - ub);
      S1_USMUL: r = clamp_u(ua * ub);
      S1_SHFT:  r = sh_res[7:0];
      S1_SSHFT: r = arith ? clamp_s(sh_res) : clamp_u(sh_res);
      S1_MERG:  r = b;
      default:  r = a;             // nop and undefined codes
    endcase
    return r;
  endfunction

  lanes_t a_l, b_l;
  assign a_l = ra;
  assign b_l = rb;

  always_comb begin
    for (int i = 0; i < LANES; i++) res[i] = lane_op(a_l[i], b_l[i], op1);
  end

endmodule
