// sparrow_eh1_top: the multiply-pipe slice of a dual-issue RISC-V core with
// the SPARROW SIMD accelerator integrated into it.
//
// An instruction offered on dec_instr with dec_valid is decoded; if it is an
// RV32M multiply or a SPARROW instruction (dec_accept) it enters M1 at the
// next clock edge that is not frozen, with the register-file operands
// rs1_data / rs2_data read at the indices dec_rs1 / dec_rs2. Three unfrozen
// edges later its result is on m3_result with m3_valid, m3_rd and m3_we.
// The rest of the core (fetch, the integer and load/store pipes, the
// divider, the register file, commit and writeback, the closely coupled
// memories) is outside this block: the register-file operands, the stall
// (freeze) and the forwarded late operands come in as ports.
// Timing: one instruction per cycle; latency three cycles, like a multiply.
// Placing SPARROW in the multiply pipe and treating its instructions as
// multiplies follow the published integration into the SweRV EH1 core; the
// port list of this slice is this design's own cut through that core.
module sparrow_eh1_top
  import sparrow_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            dec_valid,
  input  logic [31:0]     dec_instr,
  input  logic [XLEN-1:0] rs1_data,
  input  logic [XLEN-1:0] rs2_data,
  input  logic            freeze,
  input  logic            late_rs1_en,
  input  logic [XLEN-1:0] late_rs1_data,
  input  logic            late_rs2_en,
  input  logic [XLEN-1:0] late_rs2_data,
  output logic            dec_accept,
  output logic [4:0]      dec_rs1,
  output logic [4:0]      dec_rs2,
  output logic            m3_valid,
  output logic [4:0]      m3_rd,
  output logic            m3_we,
  output logic [XLEN-1:0] m3_result,
  output logic [XLEN-1:0] sp_bp1,
  output logic [XLEN-1:0] sp_bp2
);

  logic    mul_class;
  mp_ctl_t ctl;

  sparrow_decode u_dec (
    .instr     (dec_instr),
    .mul_class (mul_class),
    .ctl       (ctl),
    .rs1       (dec_rs1),
    .rs2       (dec_rs2)
  );

  assign dec_accept = dec_valid & mul_class;

  mul_pipe u_pipe (
    .clk           (clk),
    .rst_n         (rst_n),
    .in_valid      (dec_accept),
    .in_ctl        (ctl),
    .in_rs1        (rs1_data),
    .in_rs2        (rs2_data),
    .freeze        (freeze),
    .late_rs1_en   (late_rs1_en),
    .late_rs1_data (late_rs1_data),
    .late_rs2_en   (late_rs2_en),
    .late_rs2_data (late_rs2_data),
    .out_valid     (m3_valid),
    .out_rd        (m3_rd),
    .out_we        (m3_we),
    .out_result    (m3_result),
    .sp_bp1        (sp_bp1),
    .sp_bp2        (sp_bp2)
  );

endmodule
