// sparrow_s2: SPARROW stage 2 (S2_ALU + S2_select), purely combinational.
//
// Reduces the four 8-bit lanes produced by stage 1 to one 32-bit value, as
// chosen by the 3-bit code op2 (sd2): sum, max, min, xor and their unsigned
// forms usum, umax, umin. Bit 2 of op2 selects unsigned lane data (its
// complement is the signed select). Code 000 (nop) passes the four lanes as a
// packed word. When sat is set, which the instruction's stage-1 code decides,
// sum clamps to [-128,127] and usum to [0,255]; otherwise the sum keeps its
// full width. Sign-extension of signed results and zero-extension of unsigned
// results to 32 bits is this design's choice.
//
// Timing: no clock; the result is valid in the same cycle as the inputs.
module sparrow_s2
  import sparrow_pkg::*;
(
  input  lanes_t          lanes,
  input  logic [2:0]      op2,
  input  logic            sat,
  output logic [XLEN-1:0] res
);

  logic                  is_signed;
  logic signed [10:0]    ext [LANES];   // lanes extended by sign or zero
  logic signed [10:0]    sum, mx, mn, sum_c;
  lane_t                 xr;

  assign is_signed = ~op2[2];

  always_comb begin
    for (int i = 0; i < LANES; i++)
      ext[i] = is_signed ? 11'(signed'(lanes[i])) : 11'(lanes[i]);
    sum = '0;
    xr  = '0;
    mx  = ext[0];
    mn  = ext[0];
    for (int i = 0; i < LANES; i++) begin
      sum = sum + ext[i];
      xr  = xr ^ lanes[i];
      if (ext[i] > mx) mx = ext[i];
      if (ext[i] < mn) mn = ext[i];
    end
    sum_c = sum;
    if (sat) begin
      if (is_signed) begin
        if (sum > 11'sd127)       sum_c = 11'sd127;
        else if (sum < -11'sd128) sum_c = -11'sd128;
      end else if (sum > 11'sd255) begin
        sum_c = 11'sd255;
      end
    end
    unique case (op2)
      S2_NOP:          res = lanes;
      S2_SUM, S2_USUM: res = XLEN'(sum_c);
      S2_MAX, S2_UMAX: res = XLEN'(mx);
      S2_MIN, S2_UMIN: res = XLEN'(mn);
      S2_XOR:          res = XLEN'(xr);
      default:         res = lanes;
    endcase
  end

endmodule
