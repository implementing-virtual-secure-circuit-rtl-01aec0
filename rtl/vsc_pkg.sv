// vsc_pkg: types and constants shared by the balanced processor.
//
// A balanced processor executes "virtual secure circuits": software that
// keeps every sensitive value in a register twice, once as is (direct) and
// once inverted (complementary), and evaluates direct and complementary
// logic in the same instruction. The two halves share each 32-bit word bit
// by bit: the direct copy sits in the odd bit positions and the
// complementary copy in the even positions next to it, so word bit 2i+1
// holds direct bit i and word bit 2i holds its inverse.
//
// The instruction encoding is a subset of SPARC V8, the architecture of the
// processor the balanced instructions were first added to. The two opcodes
// that SPARC gives to ANDN and ORN carry balanced AND (b_and) and balanced
// OR (b_or) instead. The subset, the interleaved layout's bit order and the
// halt-on-UNIMP convention are this design's choices.
package vsc_pkg;

  localparam int unsigned XLEN   = 32;          // 32-bit processor
  localparam int unsigned NREGS  = 32;
  localparam int unsigned RADDR  = $clog2(NREGS);

  // Odd bits carry the direct value, even bits its complement.
  localparam logic [XLEN-1:0] DIRECT_MASK = 32'hAAAA_AAAA;

  // Format field op[31:30]
  localparam logic [1:0] OP_BRANCH = 2'b00;     // SETHI / UNIMP (op2)
  localparam logic [1:0] OP_ARITH  = 2'b10;
  localparam logic [1:0] OP_MEM    = 2'b11;

  // op2 field [24:22] for op = 00
  localparam logic [2:0] OP2_UNIMP = 3'b000;
  localparam logic [2:0] OP2_BICC  = 3'b010;
  localparam logic [2:0] OP2_SETHI = 3'b100;

  // op3 field [24:19] for op = 10
  typedef enum logic [5:0] {
    OP3_ADD  = 6'h00,
    OP3_AND  = 6'h01,
    OP3_OR   = 6'h02,
    OP3_XOR  = 6'h03,
    OP3_SUB  = 6'h04,
    OP3_BAND = 6'h05,   // ANDN opcode, carries b_and
    OP3_BOR  = 6'h06,   // ORN opcode, carries b_or
    OP3_XNOR = 6'h07,
    OP3_ADDCC = 6'h10,  // set the integer condition codes
    OP3_ANDCC = 6'h11,
    OP3_ORCC  = 6'h12,
    OP3_XORCC = 6'h13,
    OP3_SUBCC = 6'h14,
    OP3_SLL  = 6'h25,
    OP3_SRL  = 6'h26,
    OP3_SRA  = 6'h27
  } arith_op3_e;

  // op3 field [24:19] for op = 11
  typedef enum logic [5:0] {
    OP3_LD   = 6'h00,
    OP3_LDUB = 6'h01,
    OP3_ST   = 6'h04,
    OP3_STB  = 6'h05
  } mem_op3_e;

  // Operations of the bitwise logic unit
  typedef enum logic [2:0] {
    LOGIC_AND,
    LOGIC_OR,
    LOGIC_XOR,
    LOGIC_XNOR,
    LOGIC_BAND,
    LOGIC_BOR
  } logic_op_e;

  // Operations of the ALU
  typedef enum logic [3:0] {
    ALU_ADD,
    ALU_SUB,
    ALU_AND,
    ALU_OR,
    ALU_XOR,
    ALU_XNOR,
    ALU_BAND,
    ALU_BOR,
    ALU_SLL,
    ALU_SRL,
    ALU_SRA,
    ALU_PASSB           // result = operand b (SETHI)
  } alu_op_e;

  // Integer condition codes
  typedef struct packed {
    logic n;
    logic z;
    logic v;
    logic c;
  } icc_t;

  // Branch conditions (cond field [28:25] of Bicc)
  typedef enum logic [3:0] {
    BR_N   = 4'h0, BR_E   = 4'h1, BR_LE  = 4'h2, BR_L   = 4'h3,
    BR_LEU = 4'h4, BR_CS  = 4'h5, BR_NEG = 4'h6, BR_VS  = 4'h7,
    BR_A   = 4'h8, BR_NE  = 4'h9, BR_G   = 4'hA, BR_GE  = 4'hB,
    BR_GU  = 4'hC, BR_CC  = 4'hD, BR_POS = 4'hE, BR_VC  = 4'hF
  } cond_e;

  // Access size on the memory-load / memory-store datapaths
  typedef enum logic {
    MEM_WORD,
    MEM_BYTE
  } mem_size_e;

  // Retirement trace of one instruction
  typedef struct packed {
    logic             valid;
    logic [XLEN-1:0]  pc;
    logic [XLEN-1:0]  instr;
    logic             rd_we;
    logic [RADDR-1:0] rd;
    logic [XLEN-1:0]  wdata;
  } retire_t;

endpackage
