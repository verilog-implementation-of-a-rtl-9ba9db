// tb_sparrow_decode: encodes every SPARROW code pair and every RV32M multiply,
// plus divisions, other OP and custom-0 words and random words, and checks the
// class flag, the control word and the register indices against the
// expected decoding.
module tb_sparrow_decode;
  import sparrow_ref_pkg::*;
  import sparrow_pkg::*;

  logic [31:0] instr;
  logic        mul_class;
  mp_ctl_t     ctl;
  logic [4:0]  rs1, rs2;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  sparrow_decode dut (.instr, .mul_class, .ctl, .rs1, .rs2);

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s instr=%h got=%0d exp=%0d", what, instr, got, exp);
    end
  endtask

  initial begin
    int rd, r1, r2;
    for (int o1 = 0; o1 < 32; o1++)
      for (int o2 = 0; o2 < 8; o2++) begin
        rd = $urandom % 32; r1 = $urandom % 32; r2 = $urandom % 32;
        instr = enc_sparrow(o1, o2, rd, r1, r2);
        #1;
        chk("sp class", mul_class, 1);
        chk("sp flag", ctl.is_sparrow, 1);
        chk("op1", ctl.sp_op1, o1);
        chk("op2", ctl.sp_op2, o2);
        chk("rd", ctl.rd, rd);
        chk("we", ctl.rd_we, rd != 0);
        chk("rs1", rs1, r1);
        chk("rs2", rs2, r2);
      end
    for (int k = 0; k < 4; k++) begin
      rd = 5; r1 = 6; r2 = 7;
      instr = enc_mul(k, rd, r1, r2);
      #1;
      chk("mul class", mul_class, 1);
      chk("mul flag", ctl.is_sparrow, 0);
      chk("mul op", int'(ctl.mul_op), k);
      chk("mul we", ctl.rd_we, 1);
      instr = enc_mul(k + 4, rd, r1, r2);   // div, divu, rem, remu
      #1;
      chk("div not class", mul_class, 0);
    end
    instr = 32'h00b50533; #1; chk("add", mul_class, 0);            // add
    instr = 32'h4000_050b; #1; chk("custom0 top bits", mul_class, 0);
    instr = enc_mul(0, 0, 1, 2); #1; chk("rd x0 we", ctl.rd_we, 0);
    for (int k = 0; k < 2000; k++) begin
      instr = $urandom;
      #1;
      chk("random class", mul_class,
          ((instr[6:0] == 7'b0110011) && (instr[31:25] == 7'b0000001) && !instr[14]) ||
          ((instr[6:0] == 7'b0001011) && (instr[31:30] == 2'b00)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
