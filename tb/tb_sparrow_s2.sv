// tb_sparrow_s2: checks every stage-2 reduction code with and without
// saturation on directed words (sums that overflow 8 bits either way) and on
// random words, against the integer reference model.
module tb_sparrow_s2;
  import sparrow_ref_pkg::*;
  import sparrow_pkg::*;

  logic [31:0] w;
  logic [2:0]  op2;
  logic        sat;
  logic [31:0] res;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  sparrow_s2 dut (.lanes(w), .op2(op2), .sat(sat), .res(res));

  task automatic check(int op, logic [31:0] x, bit s);
    logic [31:0] exp;
    op2 = 3'(op); w = x; sat = s;
    #1;
    exp = ref_s2(op, x, s);
    checks++;
    if (res !== exp) begin
      failures++;
      if (failures < 20)
        $display("FAIL op2=%0d sat=%0d w=%h got=%h exp=%h", op, s, x, res, exp);
    end
  endtask

  initial begin
    for (int op = 0; op < 8; op++)
      for (int s = 0; s < 2; s++) begin
        check(op, 32'h7f7f7f7f, s[0]);
        check(op, 32'h80808080, s[0]);
        check(op, 32'hffffffff, s[0]);
        check(op, 32'h01ff807f, s[0]);
        check(op, 32'h30303030, s[0]);
        for (int k = 0; k < 500; k++) check(op, $urandom, s[0]);
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
