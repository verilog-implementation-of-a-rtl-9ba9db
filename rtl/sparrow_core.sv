// sparrow_core: the two-stage SPARROW SIMD accelerator.
//
// SPARROW works on the host core's own 32-bit registers, seen as four 8-bit
// lanes, so it needs no register file of its own. Three registers split it:
//   r.s1  captures the inputs (ra, rb, rc_we, op1, op2);
//   stage 1 (sparrow_s1) applies op1 to the four lane pairs, and the lanes are
//         packed back into a word (to_word) as the bypass output bp1;
//   r.s2  captures the stage-1 lanes, op2, rc_we and the saturation flag;
//   stage 2 (sparrow_s2) reduces the lanes as op2 asks, giving bypass bp2;
//   r.s3  registers the stage-2 result as sdo.result.
// An input applied before clock edge 1 gives bp1 after edge 1, bp2 after edge
// 2 and result after edge 3, so a stream of one instruction per cycle runs at
// full rate with a three-cycle latency.
//
// hold freezes r.s1, r.s2 and r.s3 so nothing is lost while the host stalls.
// late_ra_en / late_rb_en replace the r.s1 operands in front of stage 1, for
// operands that the host forwards only during the first execute stage; the
// enables and data are sampled in the cycle the stage advances (hold low).
// These two controls, the reset and the lane order are this design's choices
// for fitting the accelerator into a host pipeline; the three registers, the
// stages and the bypass outputs follow the published SPARROW structure.
module sparrow_core
  import sparrow_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            hold,
  input  sp_in_t          sdi,
  input  logic            late_ra_en,
  input  logic [XLEN-1:0] late_ra,
  input  logic            late_rb_en,
  input  logic [XLEN-1:0] late_rb,
  output sp_out_t         sdo
);

  typedef struct packed {
    lanes_t     ra;       // stage-1 result lanes
    logic       sat;
    logic [2:0] op2;
    logic       rc_we;
  } s2_reg_t;

  typedef struct packed {
    logic [XLEN-1:0] res;
    logic            rc_we;
  } s3_reg_t;

  sp_in_t          r_s1;
  s2_reg_t         r_s2;
  s3_reg_t         r_s3;

  logic [XLEN-1:0] s1_ra, s1_rb;
  lanes_t          s1_res;
  logic [XLEN-1:0] s2_res;

  // Late operands override the registered ones in stage 1.
  assign s1_ra = late_ra_en ? late_ra : r_s1.ra;
  assign s1_rb = late_rb_en ? late_rb : r_s1.rb;

  sparrow_s1 u_s1 (
    .ra  (s1_ra),
    .rb  (s1_rb),
    .op1 (r_s1.op1),
    .res (s1_res)
  );

  sparrow_s2 u_s2 (
    .lanes (r_s2.ra),
    .op2   (r_s2.op2),
    .sat   (r_s2.sat),
    .res   (s2_res)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_s1 <= '0;
      r_s2 <= '0;
      r_s3 <= '0;
    end else if (!hold) begin
      r_s1 <= sdi;
      r_s2 <= '{ra: s1_res, sat: op1_is_sat(r_s1.op1), op2: r_s1.op2,
                rc_we: r_s1.rc_we};
      r_s3 <= '{res: s2_res, rc_we: r_s2.rc_we};
    end
  end

  // to_word: lane i goes to bits 8i+7:8i.
  assign sdo.bp1       = s1_res;
  assign sdo.bp2       = s2_res;
  assign sdo.result    = r_s3.res;
  assign sdo.result_we = r_s3.rc_we;

endmodule
