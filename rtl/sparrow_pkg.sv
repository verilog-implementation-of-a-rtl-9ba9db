// sparrow_pkg: types and constants shared by the SPARROW accelerator and the
// multiply pipe it lives in.
//
// SPARROW treats each 32-bit register as four 8-bit lanes. Stage 1 applies one
// of the operations below (code sd1, 5 bits) to every lane pair; stage 2
// reduces the four lane results (code sd2, 3 bits). The code values are the
// published SPARROW opcode tables. In sd1, bit 4 marks the unsigned variant of
// an operation where one exists. In sd2, bit 2 marks the unsigned reductions.
// The instruction layout on the RISC-V custom-0 opcode, the lane order (lane 0
// in bits 7:0) and the treatment of undefined sd1 codes (as nop) are choices of
// this implementation.
package sparrow_pkg;

  localparam int unsigned XLEN     = 32;
  localparam int unsigned LANES    = 4;
  localparam int unsigned LANE_W   = 8;

  typedef logic [LANE_W-1:0]             lane_t;
  typedef lane_t [LANES-1:0]             lanes_t;   // lanes_t[i] = bits 8i+7:8i

  // Stage-1 operation codes (sd1).
  typedef enum logic [4:0] {
    S1_NOP   = 5'b00000,  // rd' = rs1
    S1_ADD   = 5'b00001,
    S1_SUB   = 5'b00010,
    S1_MUL   = 5'b00011,
    S1_MAX   = 5'b00101,
    S1_MIN   = 5'b00110,
    S1_AND   = 5'b00111,
    S1_OR    = 5'b01000,
    S1_XOR   = 5'b01001,
    S1_NAND  = 5'b01010,
    S1_NOR   = 5'b01011,
    S1_XNOR  = 5'b01100,
    S1_SADD  = 5'b01101,
    S1_SSUB  = 5'b01110,
    S1_SMUL  = 5'b01111,
    S1_MERG  = 5'b10000,  // rd' = rs2
    S1_SHFT  = 5'b10001,
    S1_UMUL  = 5'b10011,
    S1_UMAX  = 5'b10101,
    S1_UMIN  = 5'b10110,
    S1_SSHFT = 5'b11001,
    S1_USADD = 5'b11101,
    S1_USSUB = 5'b11110,
    S1_USMUL = 5'b11111
  } s1_op_e;

  // Stage-2 reduction codes (sd2).
  typedef enum logic [2:0] {
    S2_NOP  = 3'b000,
    S2_SUM  = 3'b001,
    S2_MAX  = 3'b010,
    S2_MIN  = 3'b011,
    S2_XOR  = 3'b100,
    S2_USUM = 3'b101,
    S2_UMAX = 3'b110,
    S2_UMIN = 3'b111
  } s2_op_e;

  // The saturation option of an instruction is carried by its stage-1 code
  // and applies to both stages.
  function automatic logic op1_is_sat(logic [4:0] op1);
    return op1 inside {S1_SADD, S1_SSUB, S1_SMUL, S1_SSHFT,
                       S1_USADD, S1_USSUB, S1_USMUL};
  endfunction

  // SPARROW data input, the sdi bundle.
  typedef struct packed {
    logic [XLEN-1:0] ra;
    logic [XLEN-1:0] rb;
    logic            rc_we;
    logic [4:0]      op1;
    logic [2:0]      op2;
  } sp_in_t;

  // SPARROW data output: two bypass words and the registered result.
  typedef struct packed {
    logic [XLEN-1:0] bp1;
    logic [XLEN-1:0] bp2;
    logic [XLEN-1:0] result;
    logic            result_we;
  } sp_out_t;

  // RV32M multiply kinds handled by the multiply pipe (funct3 values).
  typedef enum logic [1:0] {
    MUL_LO   = 2'b00,  // mul
    MUL_HSS  = 2'b01,  // mulh
    MUL_HSU  = 2'b10,  // mulhsu
    MUL_HUU  = 2'b11   // mulhu
  } mul_op_e;

  // Control word the decoder hands to the multiply pipe.
  typedef struct packed {
    logic       is_sparrow;
    mul_op_e    mul_op;
    logic [4:0] sp_op1;
    logic [2:0] sp_op2;
    logic [4:0] rd;
    logic       rd_we;
  } mp_ctl_t;

  // Instruction encoding constants.
  localparam logic [6:0] OPC_OP      = 7'b0110011;  // RV32M lives here
  localparam logic [6:0] OPC_CUSTOM0 = 7'b0001011;  // SPARROW (own choice)
  localparam logic [6:0] F7_MULDIV   = 7'b0000001;

endpackage
