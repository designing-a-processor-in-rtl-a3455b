// mips_pkg: types and constants shared by the 2-way out-of-order MIPS I core.
//
// Register indices are 6 bits wide so that the HI and LO special registers can be
// named like general registers (32 = HI, 33 = LO); this unified "register or HI/LO"
// index is the destination/source type used everywhere in the core. The epoch is a
// six-bit counter, as the core's fetch unit requires. Everything else here (opcode
// enumerations, struct layouts) is this implementation's own encoding.
package mips_pkg;

  localparam int XLEN      = 32;
  localparam int EPOCH_W   = 6;
  localparam int REG_W     = 6;
  localparam logic [REG_W-1:0] REG_HI = 6'd32;
  localparam logic [REG_W-1:0] REG_LO = 6'd33;

  typedef logic [XLEN-1:0]    word_t;
  typedef logic [EPOCH_W-1:0] epoch_t;
  typedef logic [REG_W-1:0]   regidx_t;

  // Instruction class: decides which execution resource takes the instruction.
  typedef enum logic [1:0] {
    IT_ALU    = 2'd0,
    IT_LOAD   = 2'd1,
    IT_STORE  = 2'd2,
    IT_BRANCH = 2'd3
  } itype_t;

  // ALU operations. Multiplies and divides are split into a HI half and a LO half,
  // each computed by the ALU for its own reorder-buffer slot.
  typedef enum logic [4:0] {
    OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_NOR, OP_SLT, OP_SLTU,
    OP_SLL, OP_SRL, OP_SRA, OP_LUI, OP_PASS,
    OP_MULT_HI, OP_MULT_LO, OP_MULTU_HI, OP_MULTU_LO,
    OP_DIV_HI, OP_DIV_LO, OP_DIVU_HI, OP_DIVU_LO
  } aluop_t;

  // Branch/jump conditions, resolved inside the reorder buffer.
  typedef enum logic [2:0] {
    BR_EQ, BR_NE, BR_LEZ, BR_GTZ, BR_LTZ, BR_GEZ, BR_J, BR_JR
  } brop_t;

  typedef enum logic [1:0] {
    MS_BYTE = 2'd0,
    MS_HALF = 2'd1,
    MS_WORD = 2'd2
  } msize_t;

  // Decoded instruction, as held in the decode FIFO and inserted into the ROB.
  // op carries an aluop_t for IT_ALU, a brop_t for IT_BRANCH and {signed,msize} for
  // loads/stores. imm holds the sign/zero-extended immediate, the shift amount, the
  // memory offset, or the branch/jump target address already computed by decode.
  typedef struct packed {
    word_t   ia;        // instruction address
    word_t   pred_ia;   // predicted address of the instruction fetched after this one
    epoch_t  epoch;
    itype_t  itype;
    logic [4:0] op;
    logic    muldiv;    // occupies two consecutive ROB slots (HI then LO)
    logic    src1_v;
    regidx_t src1;
    logic    src2_v;    // 0: operand 2 is imm
    regidx_t src2;
    word_t   imm;
    logic    dest_v;
    regidx_t dest;
  } dinst_t;

  // Fetched (undecoded) instruction on the fetch -> decode channel.
  typedef struct packed {
    word_t  ia;
    word_t  pred_ia;
    epoch_t epoch;
    word_t  instr;
  } finst_t;

  // Request from the ROB to the ALU, and the tagged result coming back.
  typedef struct packed {
    logic [7:0] tag;
    aluop_t     op;
    word_t      v1;
    word_t      v2;
  } alu_req_t;

  typedef struct packed {
    logic [7:0] tag;
    word_t      value;
  } alu_res_t;

  // Memory instruction with all operands resolved: base, offset and store value.
  typedef struct packed {
    logic [7:0] tag;
    logic       store;
    logic       sgn;
    msize_t     size;
    word_t      base;
    word_t      offset;
    word_t      data;
  } mem_req_t;

  typedef struct packed {
    logic [7:0] tag;
    logic       err;
    word_t      value;
  } mem_res_t;

  // Branch-miss notification from the ROB to fetch and the BTB.
  typedef struct packed {
    word_t  correct_ia;  // address that must follow the branch's delay slot
    word_t  branch_ia;
    epoch_t epoch;       // new epoch
  } miss_t;

endpackage
