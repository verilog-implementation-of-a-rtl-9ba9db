// tb_sparrow_eh1_top: end-to-end test of the multiply pipe with SPARROW.
//
// The testbench plays the rest of the core: it holds the register file,
// issues a program one instruction per cycle, forwards results and writes
// back what leaves M3. Its issue rules mirror a core whose multiply results
// are ready at M3:
//   - a consumer whose producer is one stage ahead (in M1) waits one cycle
//     (a bubble);
//   - a consumer whose producer is two stages ahead gets the value as a late
//     operand in M1, taken from the M3 result;
//   - a consumer whose producer is in M3 reads the M3 result at decode;
//   - a random freeze stalls the whole pipe and the issue.
// Odd trials run a greyscale conversion of four RGB pixels (a logical right
// shift by 4 per lane, then umul+usum with weights 5, 9, 2) and two output
// pixels of a 3x3 int8 convolution (three smul+sum, one per kernel row, and
// two sadd combining the partial sums). Even trials load random 4x4 int8
// matrices and polynomial coefficients and run
//   - a 4x4 matrix multiplication, one saturating dot product (smul, sum)
//     per output element, with the four products of a row/column pair in
//     one instruction;
//   - four cubic polynomials, one per lane, by Horner's rule as a chain of
//     dependent saturating smul/sadd instructions;
//   - RV32M mul, mulh, mulhsu, mulhu on the same data, and an add that the
//     pipe must refuse;
// and compares the register file with a sequential execution of the program
// and all four kernels' results with scalar arithmetic. The M3
// valid/rd/we outputs are compared every cycle with a shadow pipeline, which
// checks the three-cycle latency. All parameters are at their defaults.
module tb_sparrow_eh1_top;
  import sparrow_ref_pkg::*;

  localparam int TRIALS = 80;
  localparam int N = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        dec_valid = 0, freeze = 0;
  logic [31:0] dec_instr = 0, rs1_data = 0, rs2_data = 0;
  logic        late_rs1_en = 0, late_rs2_en = 0;
  logic [31:0] late_rs1_data = 0, late_rs2_data = 0;
  logic        dec_accept, m3_valid, m3_we;
  logic [4:0]  dec_rs1, dec_rs2, m3_rd;
  logic [31:0] m3_result, sp_bp1, sp_bp2;

  sparrow_eh1_top dut (.*);

  int checks = 0, failures = 0;
  int n_sparrow = 0, n_mul = 0, n_freeze = 0, n_late = 0, n_fwd = 0;
  int n_bubble = 0, n_sat = 0, n_reduce = 0, n_reject = 0, n_bp = 0;
  int n_grey = 0, n_filter = 0;
  longint cycles = 0;

  logic [31:0] rf [32];
  logic [31:0] rf_ref [32];
  logic [31:0] prog [$];

  typedef struct {
    bit v; bit we; logic [4:0] rd; bit l1, l2; logic [31:0] ins, a, b;
  } sh_t;
  sh_t sh1, sh2, sh3;

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got=%h exp=%h at %0t", what, got, exp, $time);
    end
  endtask

  function automatic logic [31:0] exec(logic [31:0] ins, logic [31:0] a, logic [31:0] b);
    if (ins[6:0] == 7'b0001011) return ref_sparrow(int'(ins[29:25]), int'(ins[14:12]), a, b);
    return ref_mul(int'(ins[13:12]), a, b);
  endfunction

  // one clock cycle of the harness; issue = instruction offered (or none)
  task automatic cycle(input bit have, input logic [31:0] ins, output bit taken);
    logic [4:0] s1, s2, rd;
    bit hz, l1, l2, busy1;
    logic [31:0] a, b;
    taken = 0;
    freeze = (($urandom % 7) == 0);
    s1 = ins[19:15]; s2 = ins[24:20]; rd = ins[11:7];
    busy1 = sh1.v && sh1.we;
    hz = have && busy1 && (sh1.rd == s1 || sh1.rd == s2);
    l1 = sh2.v && sh2.we && sh2.rd == s1 && !(busy1 && sh1.rd == s1);
    l2 = sh2.v && sh2.we && sh2.rd == s2 && !(busy1 && sh1.rd == s2);
    // late operands for the instruction now in M1 come from M3
    late_rs1_en = sh1.v && sh1.l1; late_rs1_data = m3_result;
    late_rs2_en = sh1.v && sh1.l2; late_rs2_data = m3_result;
    // operand read with decode-stage forwarding from M3
    a = rf[s1]; b = rf[s2];
    if (sh3.v && sh3.we && sh3.rd == s1 && s1 != 0) a = m3_result;
    if (sh3.v && sh3.we && sh3.rd == s2 && s2 != 0) b = m3_result;
    dec_valid = have && !hz && !freeze;
    dec_instr = ins; rs1_data = a; rs2_data = b;
    #1;
    // checks against the shadow pipeline
    chk("m3_valid", 32'(m3_valid), 32'(sh3.v));
    chk("m3_we", 32'(m3_we), 32'(sh3.v && sh3.we));
    if (sh3.v) chk("m3_rd", 32'(m3_rd), 32'(sh3.rd));
    if (sh1.v && sh1.ins[6:0] == 7'b0001011) begin
      chk("bp1", sp_bp1, ref_s1(int'(sh1.ins[29:25]),
                                sh1.l1 ? m3_result : sh1.a, sh1.l2 ? m3_result : sh1.b));
      n_bp++;
    end
    if (have && !hz && ins[6:0] == 7'b0110011 && ins[25] == 1'b0) begin
      chk("reject", 32'(dec_accept), 0);   // not a multiply: other pipes
      n_reject++;
      taken = 1;
      dec_valid = 0;
    end else if (dec_valid) begin
      chk("accept", 32'(dec_accept), 1);
      chk("dec_rs1", 32'(dec_rs1), 32'(s1));
      chk("dec_rs2", 32'(dec_rs2), 32'(s2));
    end
    if (freeze) n_freeze++;
    if (hz && !freeze) n_bubble++;
    @(posedge clk);
    cycles++;
    if (!freeze) begin
      if (dec_valid && !l1 && !l2 && sh3.v && sh3.we && (sh3.rd == s1 || sh3.rd == s2))
        n_fwd++;
      if (sh3.v && sh3.we) rf[sh3.rd] = m3_result;
      if (sh3.v) begin
        if (sh3.ins[6:0] == 7'b0001011) n_sparrow++; else n_mul++;
      end
      if (sh1.v && (sh1.l1 || sh1.l2)) n_late++;
      sh3 = sh2;
      sh2 = sh1;
      if (dec_valid) begin
        sh1 = '{v: 1, we: rd != 0, rd: rd, l1: l1, l2: l2, ins: ins, a: a, b: b};
        taken = 1;
      end else begin
        sh1 = '{v: 0, we: 0, rd: 0, l1: 0, l2: 0, ins: 0, a: 0, b: 0};
      end
    end
    @(negedge clk);
  endtask

  task automatic run_prog();
    int pc = 0;
    bit t;
    while (pc < prog.size()) begin
      cycle(1, prog[pc], t);
      if (t) pc++;
    end
    repeat (6) cycle(0, 0, t);     // drain
  endtask


  // Greyscale and 3x3 filter trial.
  //   greyscale: pixel word [R,G,B,0] (unsigned); shft by -8 per lane (right
  //   by 4, logical), then umul+usum with weights [5,9,2,0]:
  //   gray = 5(R>>4) + 9(G>>4) + 2(B>>4), two dependent instructions.
  //   filter: output pixel = sum over 3x3 of clamp(img*k), with three
  //   smul+sum instructions (one per kernel row, lane 3 zero) and two sadd
  //   that combine the partial sums in lane 0.
  // Registers: x1..x3 kernel rows, x4..x9 windows of two output pixels,
  // x10..x15 partial sums, x16/x17 filter results, x18..x21 pixels,
  // x22 weights, x23 shift control, x24..x27 grey values.
  task automatic grey_filter_trial(int trial);
    int img[4][4], k[3][3], px[4][3], exp, acc, pv;
    bit narrow;
    narrow = (trial % 4) == 1;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        img[r][c] = narrow ? int'($urandom % 15) - 7 : sx8(int'($urandom));
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++)
        k[r][c] = narrow ? int'($urandom % 7) - 3 : sx8(int'($urandom));
    for (int r = 1; r < 32; r++) rf[r] = 0;
    for (int r = 0; r < 3; r++) begin
      for (int c = 0; c < 3; c++) begin
        rf[1 + r][8*c +: 8] = 8'(k[r][c]);
        rf[4 + r][8*c +: 8] = 8'(img[r][c]);       // output pixel (1,1)
        rf[7 + r][8*c +: 8] = 8'(img[r + 1][c + 1]); // output pixel (2,2)
      end
    end
    for (int p = 0; p < 4; p++) begin
      for (int c = 0; c < 3; c++) begin
        px[p][c] = int'($urandom % 256);
        rf[18 + p][8*c +: 8] = 8'(px[p][c]);
      end
    end
    rf[22] = 32'h0002_0905;
    rf[23] = 32'hf8f8_f8f8;
    for (int r = 0; r < 32; r++) rf_ref[r] = rf[r];
    prog.delete();
    for (int o = 0; o < 2; o++) begin
      for (int r = 0; r < 3; r++)
        prog.push_back(enc_sparrow(5'b01111, 3'b001, 10 + 3*o + r, 4 + 3*o + r, 1 + r));
      prog.push_back(enc_sparrow(5'b01101, 3'b000, 16 + o, 10 + 3*o, 11 + 3*o));
      prog.push_back(enc_sparrow(5'b01101, 3'b000, 16 + o, 16 + o, 12 + 3*o));
    end
    for (int p = 0; p < 4; p++) begin
      prog.push_back(enc_sparrow(5'b10001, 3'b000, 24 + p, 18 + p, 23));
      prog.push_back(enc_sparrow(5'b10011, 3'b101, 24 + p, 24 + p, 22));
    end
    foreach (prog[q])
      rf_ref[prog[q][11:7]] = exec(prog[q], rf_ref[prog[q][19:15]], rf_ref[prog[q][24:20]]);
    run_prog();
    for (int r = 0; r < 32; r++) chk($sformatf("gf x%0d", r), rf[r], rf_ref[r]);
    for (int o = 0; o < 2; o++) begin
      int p3[3];
      for (int r = 0; r < 3; r++) begin
        acc = 0;
        for (int c = 0; c < 3; c++) begin
          pv = img[r + o][c + o] * k[r][c];
          if (pv > 127 || pv < -128) n_sat++;
          acc += sat_s(pv);
        end
        p3[r] = sat_s(acc);
      end
      exp = sat_s(sat_s(p3[0] + p3[1]) + p3[2]);
      chk("filter", 32'(sx8(int'(rf[16 + o][7:0]))), 32'(exp));
      n_filter++;
    end
    for (int p = 0; p < 4; p++) begin
      exp = 5 * (px[p][0] >> 4) + 9 * (px[p][1] >> 4) + 2 * (px[p][2] >> 4);
      chk("grey", rf[24 + p], 32'(exp));
      n_grey++;
    end
  endtask

  function automatic int lane(logic [31:0] w, int i);
    return sx8(int'(w[8*i +: 8]));
  endfunction

  initial begin
    int A[N][N], B[N][N];
    int exp, acc, pv;
    bit t;
    sh1 = '{v: 0, we: 0, rd: 0, l1: 0, l2: 0, ins: 0, a: 0, b: 0};
    sh2 = sh1; sh3 = sh1;
    for (int r = 0; r < 32; r++) begin rf[r] = 0; rf_ref[r] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int trial = 0; trial < TRIALS; trial++) begin
      if (trial % 2 == 1) begin
        grey_filter_trial(trial);
        continue;
      end
      // --- data: x1..x4 rows of A, x5..x8 columns of B, x27 x, x28..x31 coeffs;
      // results: x9..x24 C, x25 multiplies, x26 polynomials
      for (int i = 0; i < N; i++)
        for (int k = 0; k < N; k++) begin
          // narrow values in early trials, full int8 range later (saturation)
          A[i][k] = (trial < 4) ? int'($urandom % 9) - 4 : sx8(int'($urandom));
          B[i][k] = (trial < 4) ? int'($urandom % 9) - 4 : sx8(int'($urandom));
        end
      for (int i = 0; i < N; i++)
        for (int k = 0; k < N; k++) begin
          rf[1 + i][8*k +: 8] = 8'(A[i][k]);
          rf[5 + i][8*k +: 8] = 8'(B[k][i]);
        end
      for (int r = 27; r < 32; r++) rf[r] = $urandom & 32'h0707_0707;
      for (int r = 0; r < 32; r++) rf_ref[r] = rf[r];
      // --- program
      prog.delete();
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++)
          prog.push_back(enc_sparrow(5'b01111, 3'b001, 9 + 4*i + j, 1 + i, 5 + j));
      prog.push_back(enc_mul(0, 25, 1, 5));
      prog.push_back(32'h0020_80b3);                    // add x1,x1,x2
      prog.push_back(enc_sparrow(5'b00001, 3'b100, 0, 3, 4));  // to x0
      prog.push_back(enc_mul(1 + trial % 3, 25, 25, 2));  // depends on x25
      prog.push_back(enc_sparrow(5'b01111, 3'b000, 26, 28, 27));  // a3*x
      prog.push_back(enc_sparrow(5'b01101, 3'b000, 26, 26, 29));  // +a2
      prog.push_back(enc_sparrow(5'b01111, 3'b000, 26, 26, 27));  // *x
      prog.push_back(enc_sparrow(5'b01101, 3'b000, 26, 26, 30));  // +a1
      prog.push_back(enc_sparrow(5'b01111, 3'b000, 26, 26, 27));  // *x
      prog.push_back(enc_sparrow(5'b01101, 3'b000, 26, 26, 31));  // +a0
      prog.push_back(enc_sparrow(5'b00000, 3'b010, 0, 26, 0));    // max lane, to x0
      // --- sequential reference
      foreach (prog[p]) begin
        if (prog[p][6:0] == 7'b0110011 && prog[p][25] == 1'b0) continue;
        if (prog[p][11:7] != 0)
          rf_ref[prog[p][11:7]] = exec(prog[p], rf_ref[prog[p][19:15]], rf_ref[prog[p][24:20]]);
      end
      run_prog();
      for (int r = 0; r < 32; r++) chk($sformatf("x%0d", r), rf[r], rf_ref[r]);
      // --- scalar matrix product with saturation at each step
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) begin
          acc = 0;
          for (int k = 0; k < N; k++) begin
            pv = A[i][k] * B[k][j];
            if (pv > 127 || pv < -128) n_sat++;
            acc += sat_s(pv);
          end
          exp = sat_s(acc);
          chk("C", rf[9 + 4*i + j], 32'(exp));
          n_reduce++;
        end
      // --- scalar Horner per lane
      for (int l = 0; l < 4; l++) begin
        int x;
        x = lane(rf[27], l);
        acc = sat_s(lane(rf[28], l) * x);
        acc = sat_s(acc + lane(rf[29], l));
        acc = sat_s(acc * x);
        acc = sat_s(acc + lane(rf[30], l));
        acc = sat_s(acc * x);
        acc = sat_s(acc + lane(rf[31], l));
        if (acc == 127 || acc == -128) n_sat++;
        chk("poly", 32'(lane(rf[26], l)), 32'(acc));
      end
        end
    $display("cycles=%0d sparrow=%0d mul=%0d freeze=%0d late=%0d fwd=%0d bubble=%0d",
             cycles, n_sparrow, n_mul, n_freeze, n_late, n_fwd, n_bubble);
    $display("saturations=%0d reductions=%0d rejected=%0d bp1_checks=%0d grey=%0d filter=%0d",
             n_sat, n_reduce, n_reject, n_bp, n_grey, n_filter);
    if (n_sparrow == 0 || n_mul == 0 || n_freeze == 0 || n_late == 0 || n_fwd == 0 ||
        n_bubble == 0 || n_sat == 0 || n_reduce == 0 || n_reject == 0 || n_bp == 0 ||
        n_grey == 0 || n_filter == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
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
