// tb_mul_unit: random and corner operands for mul, mulh, mulhsu and mulhu,
// one per cycle with random holds; each result must appear two unfrozen
// edges after its M1 operands (the M1 register sits in the enclosing pipe).
module tb_mul_unit;
  import sparrow_ref_pkg::*;
  import sparrow_pkg::*;

  logic clk = 0, rst_n = 0, hold = 0;
  always #5 clk = ~clk;
  mul_op_e     op;
  logic [31:0] a, b, result;
  int checks = 0, failures = 0, n_hold = 0;
  logic [31:0] e1 = 0, e2 = 0;   // expected after 1 and 2 edges
  logic [31:0] corner [6] = '{32'h0, 32'h1, 32'hffff_ffff, 32'h8000_0000,
                              32'h7fff_ffff, 32'h0001_0000};

  mul_unit dut (.clk, .rst_n, .hold, .op_m1(op), .a, .b, .result);

  initial begin
    op = MUL_LO; a = 0; b = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int cyc = 0; cyc < 3000; cyc++) begin
      op = mul_op_e'($urandom % 4);
      if (cyc < 144) begin
        a = corner[cyc % 6]; b = corner[(cyc / 6) % 6];
      end else begin
        a = $urandom; b = $urandom;
      end
      hold = (cyc >= 144) && (($urandom % 6) == 0);
      if (hold) n_hold++;
      #1;
      checks++;
      if (result !== e2) begin
        failures++;
        if (failures < 20) $display("FAIL got=%h exp=%h", result, e2);
      end
      @(posedge clk);
      if (!hold) begin
        e2 = e1;
        e1 = ref_mul(int'(op), a, b);
      end
      @(negedge clk);
    end
    if (n_hold == 0) failures++;
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
