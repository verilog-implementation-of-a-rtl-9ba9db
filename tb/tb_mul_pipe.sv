// tb_mul_pipe: a random mix of multiplies and SPARROW operations enters the
// pipe one per cycle, with random freezes, bubbles and late operands. A
// cycle model of M1-M3 built on the reference functions predicts out_valid,
// out_rd, out_we and out_result at every cycle, so the three-cycle latency,
// the hold during freeze, the late-operand mux and the M3 result select are
// all checked.
module tb_mul_pipe;
  import sparrow_ref_pkg::*;
  import sparrow_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic        in_valid = 0, freeze = 0;
  mp_ctl_t     in_ctl;
  logic [31:0] in_rs1 = 0, in_rs2 = 0;
  logic        late_rs1_en = 0, late_rs2_en = 0;
  logic [31:0] late_rs1_data = 0, late_rs2_data = 0;
  logic        out_valid, out_we;
  logic [4:0]  out_rd;
  logic [31:0] out_result, sp_bp1, sp_bp2;
  int checks = 0, failures = 0;
  int n_sp = 0, n_mul = 0, n_frz = 0, n_late = 0;

  mul_pipe dut (.*);

  typedef struct {
    bit v; mp_ctl_t c; logic [31:0] a, b, r;
  } ent_t;
  ent_t s1, s2, s3;

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got=%h exp=%h at %0t", what, got, exp, $time);
    end
  endtask

  function automatic logic [31:0] calc(mp_ctl_t c, logic [31:0] a, logic [31:0] b);
    return c.is_sparrow ? ref_sparrow(int'(c.sp_op1), int'(c.sp_op2), a, b)
                        : ref_mul(int'(c.mul_op), a, b);
  endfunction

  initial begin
    in_ctl = '0;
    s1 = '{default: '0}; s2 = '{default: '0}; s3 = '{default: '0};
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      in_valid          = ($urandom % 8) != 0;
      in_ctl.is_sparrow = 1'($urandom);
      in_ctl.mul_op     = mul_op_e'($urandom % 4);
      in_ctl.sp_op1     = in_ctl.is_sparrow ? 5'($urandom) : 5'd0;
      in_ctl.sp_op2     = in_ctl.is_sparrow ? 3'($urandom) : 3'd0;
      in_ctl.rd         = 5'($urandom);
      in_ctl.rd_we      = in_ctl.rd != 0;
      in_rs1 = $urandom; in_rs2 = $urandom;
      freeze = ($urandom % 6) == 0;
      late_rs1_en = ($urandom % 4) == 0; late_rs1_data = $urandom;
      late_rs2_en = ($urandom % 4) == 0; late_rs2_data = $urandom;
      #1;
      chk("valid", 32'(out_valid), 32'(s3.v));
      if (s3.v) begin
        chk("rd", 32'(out_rd), 32'(s3.c.rd));
        chk("we", 32'(out_we), 32'(s3.c.rd_we));
        chk("result", out_result, s3.r);
      end else begin
        chk("we idle", 32'(out_we), 0);
      end
      if (freeze) n_frz++;
      @(posedge clk);
      if (!freeze) begin
        if (s3.v) begin
          if (s3.c.is_sparrow) n_sp++; else n_mul++;
        end
        s3 = s2;
        s2 = s1;
        if (s2.v) begin
          if (late_rs1_en || late_rs2_en) n_late++;
          s2.a = late_rs1_en ? late_rs1_data : s2.a;
          s2.b = late_rs2_en ? late_rs2_data : s2.b;
          s2.r = calc(s2.c, s2.a, s2.b);
        end
        s1 = '{v: in_valid, c: in_ctl, a: in_rs1, b: in_rs2, r: 0};
        if (!in_valid) s1.c.rd_we = 0;
      end
      @(negedge clk);
    end
    if (n_sp == 0 || n_mul == 0 || n_frz == 0 || n_late == 0) begin
      failures++;
      $display("FAIL mechanism missing");
    end
    $display("sparrow=%0d mul=%0d freezes=%0d late=%0d", n_sp, n_mul, n_frz, n_late);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
