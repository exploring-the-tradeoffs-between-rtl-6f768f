// maven_pkg: types and constants shared by the vector-thread (VT) vector unit.
//
// The unit follows a Maven-style VT organisation: a control processor sends
// vector commands (configure, set vector length, vector fetch, scalar-to-vector
// move, vector load/store) to a vector issue unit, which fetches scalar
// microthread (uT) instructions and runs them across the lanes under an active
// uT mask. The instruction set itself is not fixed by the architecture
// description this unit was built from; the 32-bit uT encoding and the command
// format below are this design's own choices:
//
//   uT instruction  [31:26] opcode  [25:21] ra  [20:16] rb  [15:11] rc  [15:0] imm
//     R-type   ra <- rb op rc
//     I-type   ra <- rb op sext(imm)        (LUI: ra <- imm << 16)
//     FADD/FSUB/FMUL/FDIV  ra <- rb op rc, FSQRT ra <- sqrt(rb)
//                                       (IEEE single precision)
//     LW       ra <- mem[rb + sext(imm)]    (uT load, word)
//     SW       mem[rb + sext(imm)] <- ra    (uT store, word)
//     Bxx      compare ra with rb; target = pc + 4 + (sext(imm) << 2)
//     UTIDX    ra <- index of this uT within the vector
//     STOP     ends the current vector fragment
//   Register 0 reads as zero and ignores writes.
package maven_pkg;

  localparam int unsigned XLEN       = 32;
  localparam int unsigned LINE_BYTES = 16;  // bytes returned per data-cache response
  localparam int unsigned LINE_BITS  = LINE_BYTES * 8;
  localparam int unsigned REG_IDX_W  = 5;   // up to 32 registers per uT

  typedef logic [XLEN-1:0] word_t;
  typedef logic [LINE_BITS-1:0] line_t;

  // ---------------------------------------------------------------- uT ISA
  typedef enum logic [5:0] {
    OP_ADD   = 6'd0,
    OP_SUB   = 6'd1,
    OP_AND   = 6'd2,
    OP_OR    = 6'd3,
    OP_XOR   = 6'd4,
    OP_SLT   = 6'd5,
    OP_SLTU  = 6'd6,
    OP_SLL   = 6'd7,
    OP_SRL   = 6'd8,
    OP_SRA   = 6'd9,
    OP_ADDI  = 6'd16,
    OP_ANDI  = 6'd17,
    OP_ORI   = 6'd18,
    OP_XORI  = 6'd19,
    OP_SLTI  = 6'd20,
    OP_LUI   = 6'd21,
    OP_MUL   = 6'd24,
    OP_DIV   = 6'd25,
    OP_REM   = 6'd26,
    OP_FSQRT = 6'd27,
    OP_FADD  = 6'd28,
    OP_FSUB  = 6'd29,
    OP_FMUL  = 6'd30,
    OP_FDIV  = 6'd31,
    OP_LW    = 6'd32,
    OP_SW    = 6'd33,
    OP_BEQ   = 6'd40,
    OP_BNE   = 6'd41,
    OP_BLT   = 6'd42,
    OP_BGE   = 6'd43,
    OP_UTIDX = 6'd48,
    OP_STOP  = 6'd63
  } ut_op_e;

  // Functions of the per-bank integer ALU.
  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR, ALU_SLT, ALU_SLTU,
    ALU_SLL, ALU_SRL, ALU_SRA, ALU_PASSB
  } alu_fn_e;

  typedef enum logic [1:0] {CMP_EQ, CMP_NE, CMP_LT, CMP_GE} cmp_fn_e;

  // What a lane does with one micro-op.
  typedef enum logic [3:0] {
    K_ALU,     // integer op on the per-bank ALU, result written back
    K_MUL,     // long-latency multiplier
    K_DIV,     // long-latency divider (quotient or remainder)
    K_BR,      // branch compare, produces one resolution bit per uT
    K_LD,      // uT load through the uT address / load-data path
    K_ST,      // uT store through the uT address / store-data path
    K_MOVSV,   // write a scalar into every uT below the vector length
    K_UTIDX,   // write each uT's index
    K_FADD,    // floating-point adder (add or subtract)
    K_FMUL,    // floating-point multiplier
    K_FDIV,    // floating-point divider
    K_FSQRT    // floating-point square root
  } lane_kind_e;

  typedef struct packed {
    lane_kind_e          kind;
    alu_fn_e             alu_fn;
    cmp_fn_e             cmp_fn;
    logic                use_imm;  // second ALU operand is the immediate
    logic                div_rem;  // K_DIV: 1 = remainder; K_FADD: 1 = subtract
    logic [REG_IDX_W-1:0] rd;      // destination (or store-data source)
    logic [REG_IDX_W-1:0] rs;      // first source
    logic [REG_IDX_W-1:0] rt;      // second source
    word_t               imm;      // immediate or scalar operand
  } lane_uop_t;

  // ------------------------------------------------------- vector commands
  typedef enum logic [2:0] {
    VC_CONFIG = 3'd0,  // data = registers needed per uT; responds with max vector length
    VC_SETVL  = 3'd1,  // data = application vector length; responds with vl
    VC_VFETCH = 3'd2,  // data = uT code address
    VC_MOVSV  = 3'd3,  // vreg <- data in every uT
    VC_LOADV  = 3'd4,  // vreg <- mem[data + i*stride]
    VC_STOREV = 3'd5,  // mem[data + i*stride] <- vreg
    VC_SYNC   = 3'd6   // responds once every earlier command has finished
  } vcmd_op_e;

  typedef struct packed {
    vcmd_op_e             op;
    logic [REG_IDX_W-1:0] vreg;
    word_t                data;
    word_t                stride;  // bytes between elements
  } vcmd_t;

  // ----------------------------------------------------- memory interface
  // Word requests; every request (store included) gets one response, in order,
  // carrying the aligned LINE_BYTES block that holds the addressed word.
  typedef struct packed {
    word_t addr;
    logic  we;
    word_t wdata;
  } mem_req_t;

endpackage
