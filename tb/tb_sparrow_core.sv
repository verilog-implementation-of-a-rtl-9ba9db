// tb_sparrow_core: streams random SPARROW operations into the accelerator,
// one per cycle, with random stalls (hold) and random late operands, and
// checks bp1 one edge, bp2 two edges and result three edges after an input
// is taken, against a cycle model of the three registers built on the
// integer reference. Also checks that a held pipe keeps its outputs.
module tb_sparrow_core;
  import sparrow_ref_pkg::*;
  import sparrow_pkg::*;

  logic clk = 0, rst_n = 0, hold = 0;
  always #5 clk = ~clk;
  sp_in_t  sdi;
  sp_out_t sdo;
  logic        late_ra_en = 0, late_rb_en = 0;
  logic [31:0] late_ra = 0, late_rb = 0;
  int checks = 0, failures = 0;
  int n_hold = 0, n_late = 0, n_sat = 0;

  sparrow_core dut (.clk, .rst_n, .hold, .sdi, .late_ra_en, .late_ra,
                    .late_rb_en, .late_rb, .sdo);

  // model of r.s1 (inputs), r.s2 (stage-1 word, codes), r.s3 (result)
  sp_in_t      m1;
  logic [31:0] m2_w; int m2_op1, m2_op2; bit m2_we;
  logic [31:0] m3_r; bit m3_we;

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got=%h exp=%h at %0t", what, got, exp, $time);
    end
  endtask

  function automatic logic [31:0] eff_a();
    return late_ra_en ? late_ra : m1.ra;
  endfunction
  function automatic logic [31:0] eff_b();
    return late_rb_en ? late_rb : m1.rb;
  endfunction

  initial begin
    sdi = '0;
    m1 = '0; m2_w = 0; m2_op1 = 0; m2_op2 = 0; m2_we = 0; m3_r = 0; m3_we = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      // drive inputs for the coming edge
      sdi.ra    = $urandom; sdi.rb = $urandom;
      sdi.rc_we = 1'($urandom);
      sdi.op1   = 5'($urandom);
      sdi.op2   = 3'($urandom);
      hold       = ($urandom % 5) == 0;
      late_ra_en = ($urandom % 4) == 0; late_ra = $urandom;
      late_rb_en = ($urandom % 4) == 0; late_rb = $urandom;
      #1;
      // combinational outputs of the current state
      chk("bp1", sdo.bp1, ref_s1(int'(m1.op1), eff_a(), eff_b()));
      chk("bp2", sdo.bp2, ref_s2(m2_op2, m2_w, ref_is_sat(m2_op1)));
      chk("result", sdo.result, m3_r);
      chk("we", 32'(sdo.result_we), 32'(m3_we));
      if (hold) n_hold++;
      if (!hold && (late_ra_en || late_rb_en)) n_late++;
      if (!hold && ref_is_sat(int'(m1.op1))) n_sat++;
      @(posedge clk);
      if (!hold) begin
        m3_r  = ref_s2(m2_op2, m2_w, ref_is_sat(m2_op1));
        m3_we = m2_we;
        m2_w  = ref_s1(int'(m1.op1), eff_a(), eff_b());
        m2_op1 = int'(m1.op1); m2_op2 = int'(m1.op2); m2_we = m1.rc_we;
        m1 = sdi;
      end
      @(negedge clk);
    end
    // latency check: one instruction alone appears exactly 3 edges later
    hold = 0; late_ra_en = 0; late_rb_en = 0;
    sdi = '0;
    repeat (3) @(negedge clk);   // flush with zero nops
    sdi = '{ra: 32'h0102_0304, rb: 32'h0506_0708, rc_we: 1'b1,
            op1: 5'b00011, op2: 3'b001};
    @(negedge clk);
    sdi = '0;
    @(negedge clk);
    chk("not yet", sdo.result, 32'h0);
    @(negedge clk);
    chk("latency 3", sdo.result, 32'd70);   // 1*5+2*6+3*7+4*8
    if (n_hold == 0 || n_late == 0 || n_sat == 0) begin
      failures++;
      $display("FAIL a mechanism never happened: hold=%0d late=%0d sat=%0d",
               n_hold, n_late, n_sat);
    end
    $display("holds=%0d late operands=%0d saturating ops=%0d", n_hold, n_late, n_sat);
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
