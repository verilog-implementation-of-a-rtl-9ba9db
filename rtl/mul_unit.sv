// mul_unit: the integer multiplier of the multiply pipe, three stages.
//
// Computes the RV32M products mul (low word), mulh (signed x signed, high
// word), mulhsu (signed x unsigned, high word) and mulhu (unsigned x
// unsigned, high word). The enclosing pipe presents the M1 operands a and b
// combinationally (after its own M1 register and late-operand mux) together
// with the kind op_m1. M2 registers the 66-bit product of the sign- or
// zero-extended operands, M3 registers the selected 32-bit half. With the
// M1 register in the pipe, a result appears three clock edges after issue.
// hold freezes both registers. The host core only names this multiplier; its
// three-stage split is the simplest one that gives that latency.
module mul_unit
  import sparrow_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            hold,
  input  mul_op_e         op_m1,
  input  logic [XLEN-1:0] a,
  input  logic [XLEN-1:0] b,
  output logic [XLEN-1:0] result
);

  logic signed [XLEN:0]     a_ext, b_ext;
  logic signed [2*XLEN+1:0] prod_m2;
  mul_op_e                  op_m2;
  logic [XLEN-1:0]          res_m3;

  assign a_ext = {(op_m1 inside {MUL_HSS, MUL_HSU}) & a[XLEN-1], a};
  assign b_ext = {(op_m1 == MUL_HSS) & b[XLEN-1], b};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prod_m2 <= '0;
      op_m2   <= MUL_LO;
      res_m3  <= '0;
    end else if (!hold) begin
      prod_m2 <= a_ext * b_ext;
      op_m2   <= op_m1;
      res_m3  <= (op_m2 == MUL_LO) ? prod_m2[XLEN-1:0]
                                   : prod_m2[2*XLEN-1:XLEN];
    end
  end

  assign result = res_m3;

endmodule
