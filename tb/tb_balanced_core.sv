// tb_balanced_core: runs random programs of every supported instruction on
// the core, with instruction and data memories modelled in the testbench,
// and compares each retired instruction (destination and written value),
// the final data memory and the cycle count with an instruction-level
// reference model written here. Programs include condition-code
// instructions and forward branches of every condition, with and without
// the annul bit, and a counted backward loop. Also checks halt on UNIMP,
// halt with illegal on an unsupported opcode, and restart after halt.
module tb_balanced_core;
  import vsc_pkg::*;
  import vsc_asm_pkg::*;

  localparam int IAW = 8, DAW = 6;
  localparam int NWORDS = 1 << DAW;

  logic clk = 0, rst_n = 0, start = 0;
  logic busy, halted, illegal;
  logic [IAW-1:0]  imem_addr;
  logic [31:0]     imem_rdata;
  logic [DAW-1:0]  dmem_addr;
  logic            dmem_we;
  logic [3:0]      dmem_be;
  logic [31:0]     dmem_wdata, dmem_rdata;
  retire_t         retire;

  logic [31:0] prog [1 << IAW];
  logic [31:0] dm   [NWORDS];

  balanced_core #(.IMEM_AW(IAW), .DMEM_AW(DAW)) dut (.*);

  assign imem_rdata = prog[imem_addr];
  assign dmem_rdata = dm[dmem_addr];
  always_ff @(posedge clk)
    if (dmem_we) for (int i = 0; i < 4; i++)
      if (dmem_be[i]) dm[dmem_addr][8*i +: 8] <= dmem_wdata[8*i +: 8];

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // ---------------- reference model ----------------
  logic [31:0] mregs [32];
  logic        mn, mz, mv, mc;
  logic [7:0]  mbytes [NWORDS*4];
  typedef struct { bit we; int rd; logic [31:0] v; } eff_t;
  eff_t exp_q [$];

  localparam logic [5:0] ARITH_OPS [16] = '{6'h00, 6'h01, 6'h02, 6'h03, 6'h04, 6'h05, 6'h06, 6'h07,
                                            6'h25, 6'h26, 6'h27, 6'h10, 6'h11, 6'h12, 6'h13, 6'h14};

  function automatic logic [31:0] sx13(logic [31:0] ins);
    return {{19{ins[12]}}, ins[12:0]};
  endfunction

  function automatic logic [31:0] bal_and(logic [31:0] x, logic [31:0] y);
    logic [31:0] r;
    for (int i = 0; i < 32; i++) r[i] = (i % 2 == 1) ? (x[i] & y[i]) : (x[i] | y[i]);
    return r;
  endfunction
  function automatic logic [31:0] bal_or(logic [31:0] x, logic [31:0] y);
    logic [31:0] r;
    for (int i = 0; i < 32; i++) r[i] = (i % 2 == 1) ? (x[i] | y[i]) : (x[i] & y[i]);
    return r;
  endfunction

  function automatic bit is_bicc(logic [31:0] ins);
    return ins[31:30] == 2'b00 && ins[24:22] == 3'b010;
  endfunction

  // executes one non-branch instruction in the model, returns its register effect
  function automatic eff_t model_step(logic [31:0] ins);
    eff_t e = '{0, 0, 0};
    logic [31:0] a = mregs[ins[18:14]];
    logic [31:0] b = ins[13] ? sx13(ins) : mregs[ins[4:0]];
    int unsigned ea = (a + b) % (NWORDS * 4);
    int rd = int'(ins[29:25]);
    if (ins[31:30] == 2'b00) begin
      e = '{1, rd, {ins[21:0], 10'd0}};
    end else if (ins[31:30] == 2'b10) begin
      e.we = 1; e.rd = rd;
      case (ins[24:19])
        6'h00: e.v = a + b;
        6'h04: e.v = a - b;
        6'h01: e.v = a & b;
        6'h02: e.v = a | b;
        6'h03: e.v = a ^ b;
        6'h07: e.v = ~(a ^ b);
        6'h05: e.v = bal_and(a, b);
        6'h06: e.v = bal_or(a, b);
        6'h25: e.v = a << b[4:0];
        6'h26: e.v = a >> b[4:0];
        6'h27: e.v = $signed(a) >>> b[4:0];
        6'h10: begin e.v = a + b; mc = ({1'b0, a} + {1'b0, b}) > 33'h0_FFFF_FFFF;
                     mv = (a[31] == b[31]) && (e.v[31] != a[31]); end
        6'h14: begin e.v = a - b; mc = a < b;
                     mv = (a[31] != b[31]) && (e.v[31] != a[31]); end
        6'h11: begin e.v = a & b; mc = 0; mv = 0; end
        6'h12: begin e.v = a | b; mc = 0; mv = 0; end
        6'h13: begin e.v = a ^ b; mc = 0; mv = 0; end
        default: e.we = 0;
      endcase
      if (ins[24:19] inside {6'h10, 6'h11, 6'h12, 6'h13, 6'h14}) begin
        mn = e.v[31]; mz = (e.v == 0);
      end
    end else begin
      case (ins[24:19])
        6'h00: begin ea = ea & ~3; e = '{1, rd, {mbytes[ea], mbytes[ea+1], mbytes[ea+2], mbytes[ea+3]}}; end
        6'h01: e = '{1, rd, {24'd0, mbytes[ea]}};
        6'h04: begin ea = ea & ~3; for (int i = 0; i < 4; i++) mbytes[ea+i] = mregs[rd][31-8*i -: 8]; end
        6'h05: mbytes[ea] = mregs[rd][7:0];
        default: ;
      endcase
    end
    if (e.we && e.rd != 0) mregs[e.rd] = e.v;
    if (e.rd == 0) e.we = 0;
    return e;
  endfunction

  function automatic bit model_taken(logic [3:0] cnd);
    case (cnd)
      4'h0: return 0;                4'h8: return 1;
      4'h1: return mz;               4'h9: return !mz;
      4'h2: return mz | (mn ^ mv);   4'hA: return !(mz | (mn ^ mv));
      4'h3: return mn ^ mv;          4'hB: return !(mn ^ mv);
      4'h4: return mc | mz;          4'hC: return !(mc | mz);
      4'h5: return mc;               4'hD: return !mc;
      4'h6: return mn;               4'hE: return !mn;
      4'h7: return mv;               default: return !mv;
    endcase
  endfunction

  function automatic logic [31:0] bicc(int cnd, bit an, int disp);
    return {2'b00, an, 4'(cnd), 3'b010, 22'(disp)};
  endfunction

  // runs the model from address 0 to the halting instruction; returns the
  // number of cycles the core should spend running
  function automatic int model_run();
    int unsigned pc = 0, npc = 4;
    bit annul = 0;
    int cycles = 0;
    forever begin
      logic [31:0] ins = prog[(pc / 4) % (1 << IAW)];
      cycles++;
      if (annul) begin
        annul = 0; pc = npc; npc = npc + 4;
        continue;
      end
      if (ins[31:30] == 2'b00 && ins[24:22] == 3'b000) return cycles;
      if (ins[31:30] == 2'b10 && !(ins[24:19] inside {ARITH_OPS})) return cycles;
      if (is_bicc(ins)) begin
        bit t = model_taken(ins[28:25]);
        int unsigned target = pc + {{8{ins[21]}}, ins[21:0], 2'b00};
        exp_q.push_back('{0, 0, 0});
        pc = npc;
        npc = t ? target : npc + 4;
        annul = ins[29] && (!t || ins[28:25] == 4'h8 || ins[28:25] == 4'h0);
      end else begin
        exp_q.push_back(model_step(ins));
        pc = npc; npc = npc + 4;
      end
    end
  endfunction

  // ---------------- random program generator ----------------
  function automatic logic [31:0] rand_instr();
    int rd = $urandom % 32, rs1 = $urandom % 32, rs2 = $urandom % 32;
    int k = $urandom % 24;
    if (k < 10) return f3(2'b10, ARITH_OPS[$urandom % 16], rd, rs1, rs2);
    if (k < 15) return f3i(2'b10, ARITH_OPS[$urandom % 16], rd, rs1, $urandom % 8192);
    if (k < 16) return b_sethi($urandom, rd);
    if (k < 18) return m_ld(0, ($urandom % NWORDS) * 4, rd);
    if (k < 19) return m_ldr(rs1, rs2, rd);
    if (k < 20) return m_ldub(0, $urandom % (NWORDS * 4), rd);
    if (k < 22) return m_st(rd, 0, ($urandom % NWORDS) * 4);
    return m_stb(rd, 0, $urandom % (NWORDS * 4));
  endfunction

  int n_retired, n_cycles, n_branches;
  always @(posedge clk) if (busy) n_cycles++;

  // compare each retirement with the model's expectation
  always @(posedge clk) begin
    if (retire.valid) begin
      n_retired++;
      if (is_bicc(retire.instr)) n_branches++;
      if (exp_q.size() == 0) begin
        failures++; $display("FAIL unexpected retirement pc=%h", retire.pc);
      end else begin
        automatic eff_t e = exp_q.pop_front();
        checks++;
        if (retire.rd_we !== e.we || (e.we && (retire.rd !== 5'(e.rd) || retire.wdata !== e.v))) begin
          failures++;
          $display("FAIL retire pc=%h ins=%h: we=%0d rd=%0d v=%h expected we=%0d rd=%0d v=%h",
                   retire.pc, retire.instr, retire.rd_we, retire.rd, retire.wdata, e.we, e.rd, e.v);
        end
      end
    end
  end

  task automatic run_program(int n, int exp_cycles, bit expect_illegal);
    n_retired = 0; n_cycles = 0;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    wait (halted);
    @(negedge clk);
    check("retired count", n_retired, n);
    check("cycles: one per instruction or annulled slot, plus the halting fetch", n_cycles, exp_cycles);
    check("illegal flag", 32'(illegal), 32'(expect_illegal));
    check("expectations consumed", exp_q.size(), 0);
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (prog[i]) prog[i] = '0;
    foreach (mregs[i]) mregs[i] = '0;
    {mn, mz, mv, mc} = '0;
    foreach (dm[i]) begin
      dm[i] = $urandom;
      for (int b = 0; b < 4; b++) mbytes[4*i + b] = dm[i][31 - 8*b -: 8];
    end
    repeat (3) @(posedge clk);
    rst_n = 1;

    for (int t = 0; t < 40; t++) begin
      automatic int n = 50 + $urandom % 150;
      automatic bit ill = (t % 5 == 4);
      automatic int cyc;
      for (int i = 0; i < n; i++) begin
        // forward branch (never directly after another branch) or another instruction
        if ($urandom % 8 == 0 && !(i > 0 && is_bicc(prog[i-1])))
          prog[i] = bicc($urandom % 16, 1'($urandom % 2), 2 + $urandom % 4);
        else
          prog[i] = rand_instr();
      end
      // end with UNIMP, or an unsupported opcode (op3 0x3F) that must raise
      // illegal; branches that jump past the end land on the same word
      for (int i = n; i < n + 8; i++) prog[i] = ill ? f3(2'b10, 6'h3F, 1, 1, 1) : UNIMP;
      cyc = model_run();
      run_program(exp_q.size(), cyc, ill);
      for (int w = 0; w < NWORDS; w++)
        check($sformatf("dmem word %0d", w), dm[w],
              {mbytes[4*w], mbytes[4*w+1], mbytes[4*w+2], mbytes[4*w+3]});
    end

    // counted backward loop: r1 counts down from 10; the delay slot adds 3
    // to r2. With the annul bit the last (untaken) pass skips the slot.
    for (int an = 0; an < 2; an++) begin
      automatic int cyc;
      prog[0] = a_addi(0, 10, 1);            // r1 = 10
      prog[1] = a_addi(0, 0, 2);             // r2 = 0
      prog[2] = f3i(2'b10, 6'h14, 1, 1, 1);  // subcc r1, 1, r1
      prog[3] = bicc(4'h9, 1'(an), -1);      // bne back to address 2
      prog[4] = a_addi(2, 3, 2);             // delay slot: r2 += 3
      prog[5] = m_st(2, 0, 0);
      prog[6] = UNIMP;
      cyc = model_run();
      run_program(exp_q.size(), cyc, 0);
      check("loop result", dm[0], an ? 32'd27 : 32'd30);
      check("loop cycles (an annulled slot still takes its cycle)", cyc, 2 + 10*3 + 1 + 1);
    end
    check("branches executed", 32'(n_branches > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
