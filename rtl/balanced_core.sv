// balanced_core: a single-cycle processor with balanced instructions.
//
// The core executes one instruction per clock cycle along the three
// datapaths of a load/store processor: register file -> ALU -> register
// file (computation), memory -> register file (load) and register file ->
// memory (store). The ALU contains the balanced logic unit, so the
// instruction set holds both regular instructions and the two balanced
// ones, b_and and b_or. A balanced program ("virtual secure circuit")
// keeps each secret value as a direct/complementary pair in one register
// and evaluates each gate with two instructions: the same balanced
// instruction first with both operands %r0 (pre-charge: the destination
// becomes all zeros) and then with the real operands (evaluation). No
// extra hardware is needed for pre-charge.
//
// Instruction subset (SPARC V8 encoding):
//   op=10  ADD SUB AND OR XOR XNOR SLL SRL SRA, b_and (ANDN opcode),
//          b_or (ORN opcode), ADDcc SUBcc ANDcc ORcc XORcc; operand 2 is
//          rs2 or simm13 (i bit)
//   op=11  LD LDUB (register or immediate offset), ST STB (immediate
//          offset only: port 2 of the register file reads the store data)
//   op=00  SETHI; Bicc (all 16 conditions on N, Z, V, C, with the SPARC
//          delay slot and annul bit); UNIMP (all-zero op2) halts the core
// Anything else halts the core and raises illegal. Balanced instructions
// have no cc-setting form: condition codes would expose the secret value.
//
// Control flow follows SPARC: the core keeps PC and next-PC. A branch
// changes next-PC, so the instruction after it (the delay slot) still
// runs, unless the annul bit is set and the branch is untaken or
// unconditional; an annulled slot takes one cycle and does nothing.
//
// Timing: after reset the core waits in IDLE. A one-cycle start pulse sets
// PC to 0 and the core runs, one instruction per cycle, until it fetches
// UNIMP or an illegal word; it then sits in HALT (halted high) until the
// next start. The retire output reports each executed instruction with its
// register write.
//
// The balanced instructions in place of ANDN/ORN follow the published VSC approach. The
// single-cycle organisation, the instruction subset, the halt convention
// and the immediate-offset restriction on stores are this design's
// choices.
module balanced_core
  import vsc_pkg::*;
#(
  parameter int unsigned IMEM_AW = 16,  // instruction memory word-address bits
  parameter int unsigned DMEM_AW = 12   // data memory word-address bits
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  output logic                busy,
  output logic                halted,
  output logic                illegal,
  // instruction fetch
  output logic [IMEM_AW-1:0]  imem_addr,
  input  logic [XLEN-1:0]     imem_rdata,
  // data memory
  output logic [DMEM_AW-1:0]  dmem_addr,
  output logic                dmem_we,
  output logic [3:0]          dmem_be,
  output logic [XLEN-1:0]     dmem_wdata,
  input  logic [XLEN-1:0]     dmem_rdata,
  // retirement trace
  output retire_t             retire
);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_HALT} state_e;

  state_e           state;
  logic [XLEN-1:0]  pc, npc;
  logic             annul_q;        // current instruction is an annulled delay slot
  logic             ill_q;
  icc_t             icc;

  // ---------------- decode ----------------
  logic [XLEN-1:0]  ir;
  logic [1:0]       op;
  logic [4:0]       rd, rs1, rs2;
  logic [5:0]       op3;
  logic [2:0]       op2;
  logic             imm_sel;
  logic             annul_bit;
  cond_e            cond;
  logic [XLEN-1:0]  simm, sethi_imm, br_target;

  assign ir        = imem_rdata;
  assign op        = ir[31:30];
  assign rd        = ir[29:25];
  assign annul_bit = ir[29];
  assign cond      = cond_e'(ir[28:25]);
  assign op3       = ir[24:19];
  assign op2       = ir[24:22];
  assign rs1       = ir[18:14];
  assign imm_sel   = ir[13];
  assign rs2       = ir[4:0];
  assign simm      = {{(XLEN-13){ir[12]}}, ir[12:0]};
  assign sethi_imm = {ir[21:0], 10'd0};
  assign br_target = pc + {{(XLEN-24){ir[21]}}, ir[21:0], 2'b00};

  alu_op_e    alu_op;
  logic       use_sethi;     // operand b is the SETHI immediate
  logic       rf_we_dec;
  logic       set_cc;
  logic       is_branch;
  logic       mem_req, mem_store;
  mem_size_e  mem_size;
  logic       is_unimp, is_illegal;

  always_comb begin
    alu_op     = ALU_ADD;
    use_sethi  = 1'b0;
    rf_we_dec  = 1'b0;
    set_cc     = 1'b0;
    is_branch  = 1'b0;
    mem_req    = 1'b0;
    mem_store  = 1'b0;
    mem_size   = MEM_WORD;
    is_unimp   = 1'b0;
    is_illegal = 1'b0;
    unique case (op)
      OP_BRANCH: begin
        if (op2 == OP2_SETHI) begin
          alu_op    = ALU_PASSB;
          use_sethi = 1'b1;
          rf_we_dec = 1'b1;
        end else if (op2 == OP2_BICC) begin
          is_branch = 1'b1;
        end else if (op2 == OP2_UNIMP) begin
          is_unimp  = 1'b1;
        end else begin
          is_illegal = 1'b1;
        end
      end
      OP_ARITH: begin
        rf_we_dec = 1'b1;
        case (op3)
          OP3_ADD  : alu_op = ALU_ADD;
          OP3_SUB  : alu_op = ALU_SUB;
          OP3_AND  : alu_op = ALU_AND;
          OP3_OR   : alu_op = ALU_OR;
          OP3_XOR  : alu_op = ALU_XOR;
          OP3_XNOR : alu_op = ALU_XNOR;
          OP3_BAND : alu_op = ALU_BAND;
          OP3_BOR  : alu_op = ALU_BOR;
          OP3_SLL  : alu_op = ALU_SLL;
          OP3_SRL  : alu_op = ALU_SRL;
          OP3_SRA  : alu_op = ALU_SRA;
          OP3_ADDCC: begin alu_op = ALU_ADD; set_cc = 1'b1; end
          OP3_SUBCC: begin alu_op = ALU_SUB; set_cc = 1'b1; end
          OP3_ANDCC: begin alu_op = ALU_AND; set_cc = 1'b1; end
          OP3_ORCC : begin alu_op = ALU_OR;  set_cc = 1'b1; end
          OP3_XORCC: begin alu_op = ALU_XOR; set_cc = 1'b1; end
          default  : begin
            rf_we_dec  = 1'b0;
            is_illegal = 1'b1;
          end
        endcase
      end
      OP_MEM: begin
        alu_op  = ALU_ADD;               // address = rs1 + offset
        mem_req = 1'b1;
        case (op3)
          OP3_LD  : rf_we_dec = 1'b1;
          OP3_LDUB: begin rf_we_dec = 1'b1; mem_size = MEM_BYTE; end
          OP3_ST  : mem_store = 1'b1;
          OP3_STB : begin mem_store = 1'b1; mem_size = MEM_BYTE; end
          default : begin mem_req = 1'b0; is_illegal = 1'b1; end
        endcase
        if (mem_store && !imm_sel) begin
          mem_req    = 1'b0;
          mem_store  = 1'b0;
          is_illegal = 1'b1;
        end
      end
      default: is_illegal = 1'b1;        // CALL is not supported
    endcase
  end

  // ---------------- branch condition ----------------
  logic taken;

  always_comb begin
    unique case (cond)
      BR_N  : taken = 1'b0;
      BR_E  : taken = icc.z;
      BR_LE : taken = icc.z | (icc.n ^ icc.v);
      BR_L  : taken = icc.n ^ icc.v;
      BR_LEU: taken = icc.c | icc.z;
      BR_CS : taken = icc.c;
      BR_NEG: taken = icc.n;
      BR_VS : taken = icc.v;
      BR_A  : taken = 1'b1;
      BR_NE : taken = ~icc.z;
      BR_G  : taken = ~(icc.z | (icc.n ^ icc.v));
      BR_GE : taken = ~(icc.n ^ icc.v);
      BR_GU : taken = ~(icc.c | icc.z);
      BR_CC : taken = ~icc.c;
      BR_POS: taken = ~icc.n;
      default: taken = ~icc.v;           // BR_VC
    endcase
  end

  logic running, active, exec;
  assign running = (state == S_RUN);
  assign active  = running && !annul_q;                  // not an annulled slot
  assign exec    = active && !is_unimp && !is_illegal;

  // ---------------- register file ----------------
  logic [XLEN-1:0] rs1_val, port2_val;
  logic [4:0]      raddr2;
  logic            rf_we;
  logic [XLEN-1:0] rf_wdata;

  // Port 2 reads rs2, or rd for a store (which then has an immediate offset)
  assign raddr2 = mem_store ? rd : rs2;
  assign rf_we  = exec && rf_we_dec;

  regfile u_rf (
    .clk    (clk),
    .rst_n  (rst_n),
    .raddr1 (rs1),
    .rdata1 (rs1_val),
    .raddr2 (raddr2),
    .rdata2 (port2_val),
    .we     (rf_we),
    .waddr  (rd),
    .wdata  (rf_wdata)
  );

  // ---------------- operand (immediate) mux and ALU ----------------
  logic [XLEN-1:0] opb, alu_y;
  icc_t            alu_flags;

  always_comb begin
    if (use_sethi)    opb = sethi_imm;
    else if (imm_sel) opb = simm;
    else              opb = port2_val;
  end

  balanced_alu u_alu (
    .op    (alu_op),
    .a     (rs1_val),
    .b     (opb),
    .y     (alu_y),
    .flags (alu_flags)
  );

  // ---------------- memory interface ----------------
  logic [XLEN-1:0] load_data;

  mem_interface #(.AW(DMEM_AW)) u_mif (
    .req        (exec && mem_req),
    .is_store   (mem_store),
    .size       (mem_size),
    .addr       (alu_y),
    .store_data (port2_val),
    .load_data  (load_data),
    .mem_addr   (dmem_addr),
    .mem_we     (dmem_we),
    .mem_be     (dmem_be),
    .mem_wdata  (dmem_wdata),
    .mem_rdata  (dmem_rdata)
  );

  // ---------------- result mux ----------------
  assign rf_wdata = mem_req ? load_data : alu_y;

  // ---------------- control ----------------
  assign imem_addr = pc[IMEM_AW+1:2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      pc      <= '0;
      npc     <= 32'd4;
      annul_q <= 1'b0;
      ill_q   <= 1'b0;
      icc     <= '0;
    end else begin
      unique case (state)
        S_IDLE, S_HALT: begin
          if (start) begin
            state   <= S_RUN;
            pc      <= '0;
            npc     <= 32'd4;
            annul_q <= 1'b0;
            ill_q   <= 1'b0;
          end
        end
        S_RUN: begin
          if (annul_q) begin
            pc      <= npc;
            npc     <= npc + 32'd4;
            annul_q <= 1'b0;
          end else if (is_unimp || is_illegal) begin
            state <= S_HALT;
            ill_q <= is_illegal;
          end else begin
            pc  <= npc;
            npc <= (is_branch && taken) ? br_target : npc + 32'd4;
            // the delay slot is annulled when a=1 and the branch is
            // untaken or unconditional (BA, BN)
            annul_q <= is_branch && annul_bit &&
                       (!taken || cond == BR_A || cond == BR_N);
            if (set_cc) icc <= alu_flags;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy    = running;
  assign halted  = (state == S_HALT);
  assign illegal = ill_q;

  always_comb begin
    retire.valid = exec;
    retire.pc    = pc;
    retire.instr = ir;
    retire.rd_we = rf_we && (rd != '0);
    retire.rd    = rd;
    retire.wdata = rf_wdata;
  end

  // The core touches data memory only while it executes an instruction.
  a_store_only_when_running: assert property (
    @(posedge clk) disable iff (!rst_n) dmem_we |-> exec);

endmodule
