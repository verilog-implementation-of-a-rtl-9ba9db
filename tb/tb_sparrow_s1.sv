// tb_sparrow_s1: checks every stage-1 operation code, including the codes
// the table leaves undefined, on directed corner values (saturation edges,
// shift directions and amounts) and on random lane data, against the
// integer reference model.
module tb_sparrow_s1;
  import sparrow_ref_pkg::*;
  import sparrow_pkg::*;

  logic [31:0] ra, rb;
  logic [4:0]  op1;
  lanes_t      res;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  sparrow_s1 dut (.ra(ra), .rb(rb), .op1(op1), .res(res));

  task automatic check(int op, logic [31:0] a, logic [31:0] b);
    logic [31:0] exp;
    op1 = 5'(op); ra = a; rb = b;
    #1;
    exp = ref_s1(op, a, b);
    checks++;
    if (res !== exp) begin
      failures++;
      if (failures < 20)
        $display("FAIL op=%b a=%h b=%h got=%h exp=%h", 5'(op), a, b, res, exp);
    end
  endtask

  initial begin
    // directed: saturation and shift corners
    check(5'b01101, 32'h7f80_7f01, 32'h0180_80ff);  // sadd
    check(5'b01110, 32'h807f_0000, 32'h7f80_0101);  // ssub
    check(5'b01111, 32'h107f_80f0, 32'h1002_80f0);  // smul
    check(5'b11101, 32'hff80_01f0, 32'h0180_0120);  // usadd
    check(5'b11110, 32'h0010_ff00, 32'h0120_0001);  // ussub
    check(5'b11111, 32'h1010_ff02, 32'h1011_0102);  // usmul
    check(5'b10001, 32'h81_81_81_81, 32'h02_03_fd_fc); // shft both dirs
    check(5'b11001, 32'h40_c0_40_c0, 32'h02_03_03_7f); // sshft saturate
    check(5'b10001, 32'hff_80_7f_01, 32'h80_81_7e_10); // large amounts
    check(5'b00000, 32'h1234_5678, 32'h9abc_def0);  // nop
    check(5'b10000, 32'h1234_5678, 32'h9abc_def0);  // merg
    for (int op = 0; op < 32; op++)
      for (int k = 0; k < 300; k++)
        check(op, $urandom, $urandom);
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
