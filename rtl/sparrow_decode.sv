// sparrow_decode: recognises the instructions of the multiply class.
//
// Two families go to the multiply pipe: the RV32M multiplies (major opcode
// OP, funct7 0000001, funct3 000-011: mul, mulh, mulhsu, mulhu) and the
// SPARROW instructions, which the core treats as a subset of the multiplies
// so that they reuse the pipe's issue, writeback and forwarding paths. The
// decoder raises mul_class for both and is_sparrow for the latter, and fills
// the control word with the multiply kind, the SPARROW codes, rd and its
// write enable (rd != x0). Divisions (funct3 100-111) are left to the
// divider and are not in the class.
//
// SPARROW layout (this design's choice; R-type on the custom-0 opcode):
//   [31:30] 00   [29:25] sd1   [24:20] rs2   [19:15] rs1
//   [14:12] sd2  [11:7]  rd    [6:0]   0001011
// Purely combinational.
module sparrow_decode
  import sparrow_pkg::*;
(
  input  logic [31:0] instr,
  output logic        mul_class,
  output mp_ctl_t     ctl,
  output logic [4:0]  rs1,
  output logic [4:0]  rs2
);

  logic is_mul, is_sp;

  assign is_mul = (instr[6:0] == OPC_OP) && (instr[31:25] == F7_MULDIV)
                  && (instr[14] == 1'b0);
  assign is_sp  = (instr[6:0] == OPC_CUSTOM0) && (instr[31:30] == 2'b00);

  assign mul_class      = is_mul | is_sp;
  assign rs1            = instr[19:15];
  assign rs2            = instr[24:20];
  assign ctl.is_sparrow = is_sp;
  assign ctl.mul_op     = mul_op_e'(instr[13:12]);
  assign ctl.sp_op1     = is_sp ? instr[29:25] : 5'd0;
  assign ctl.sp_op2     = is_sp ? instr[14:12] : 3'd0;
  assign ctl.rd         = instr[11:7];
  assign ctl.rd_we      = mul_class && (instr[11:7] != 5'd0);

endmodule
