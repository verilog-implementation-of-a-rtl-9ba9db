// mul_pipe: the host core's three-stage multiply pipe (M1, M2, M3) with the
// SPARROW accelerator placed inside it.
//
// Every instruction of the multiply class, whether an RV32M multiply or a
// SPARROW instruction, enters M1 at the clock edge where in_valid is high and
// freeze is low, and leaves M3 three edges later on one shared result port.
// The pipe carries valid, rd, the destination write enable and the
// is_sparrow flag down M1-M3; at M3 is_sparrow selects between the multiplier
// result and SPARROW's r.s3. Because both datapaths give their result at M3,
// the host treats a SPARROW result exactly like a multiply result for
// writeback and forwarding.
//
// Operands may arrive late: in M1, late_rs1_en / late_rs2_en replace the
// registered operand by late_rs1_data / late_rs2_data for both datapaths.
// freeze holds every register (pipe control, multiplier and SPARROW) so a
// stall loses nothing; the late operand then only has to be valid in the
// cycle the pipe moves on. Placing SPARROW in the multiply pipe, the fixed
// three-cycle latency and holding state during stalls follow the published
// integration; the late-operand muxes with one enable per operand and the
// SPARROW bypass words brought out as ports (sp_bp1 in M1, sp_bp2 in M2) are
// this design's own.
module mul_pipe
  import sparrow_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  mp_ctl_t         in_ctl,
  input  logic [XLEN-1:0] in_rs1,
  input  logic [XLEN-1:0] in_rs2,
  input  logic            freeze,
  input  logic            late_rs1_en,
  input  logic [XLEN-1:0] late_rs1_data,
  input  logic            late_rs2_en,
  input  logic [XLEN-1:0] late_rs2_data,
  output logic            out_valid,
  output logic [4:0]      out_rd,
  output logic            out_we,
  output logic [XLEN-1:0] out_result,
  output logic [XLEN-1:0] sp_bp1,
  output logic [XLEN-1:0] sp_bp2
);

  typedef struct packed {
    logic       valid;
    logic       is_sparrow;
    mul_op_e    mul_op;
    logic [4:0] rd;
    logic       rd_we;
  } stage_t;

  stage_t          m1, m2, m3;
  logic [XLEN-1:0] m1_rs1, m1_rs2;
  logic [XLEN-1:0] op_a, op_b;
  logic [XLEN-1:0] mul_res;
  sp_in_t          sdi;
  sp_out_t         sdo;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m1     <= '0;
      m2     <= '0;
      m3     <= '0;
      m1_rs1 <= '0;
      m1_rs2 <= '0;
    end else if (!freeze) begin
      m1     <= '{valid: in_valid, is_sparrow: in_ctl.is_sparrow,
                  mul_op: in_ctl.mul_op, rd: in_ctl.rd,
                  rd_we: in_valid & in_ctl.rd_we};
      m2     <= m1;
      m3     <= m2;
      m1_rs1 <= in_rs1;
      m1_rs2 <= in_rs2;
    end
  end

  assign op_a = late_rs1_en ? late_rs1_data : m1_rs1;
  assign op_b = late_rs2_en ? late_rs2_data : m1_rs2;

  mul_unit u_mul (
    .clk    (clk),
    .rst_n  (rst_n),
    .hold   (freeze),
    .op_m1  (m1.mul_op),
    .a      (op_a),
    .b      (op_b),
    .result (mul_res)
  );

  assign sdi = '{ra: in_rs1, rb: in_rs2,
                 rc_we: in_valid & in_ctl.is_sparrow & in_ctl.rd_we,
                 op1: in_ctl.sp_op1, op2: in_ctl.sp_op2};

  sparrow_core u_sparrow (
    .clk        (clk),
    .rst_n      (rst_n),
    .hold       (freeze),
    .sdi        (sdi),
    .late_ra_en (late_rs1_en),
    .late_ra    (late_rs1_data),
    .late_rb_en (late_rs2_en),
    .late_rb    (late_rs2_data),
    .sdo        (sdo)
  );

  assign out_valid  = m3.valid;
  assign out_rd     = m3.rd;
  assign out_we     = m3.is_sparrow ? (m3.valid & sdo.result_we) : m3.rd_we;
  assign out_result = m3.is_sparrow ? sdo.result : mul_res;
  assign sp_bp1     = sdo.bp1;
  assign sp_bp2     = sdo.bp2;

  // A stall may not drop an instruction: while frozen, M3 keeps its contents.
  a_freeze_holds: assert property (@(posedge clk) disable iff (!rst_n)
                                   freeze |=> $stable(m3));

endmodule
