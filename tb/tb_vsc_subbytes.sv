// tb_vsc_subbytes: runs the first AddRoundKey and SubBytes of AES on all 16
// state bytes as a virtual secure circuit on the default-size system, and
// compares it with two weakened builds of the same program.
//
// The state is bitsliced: plane k (k = 0..7) holds bit k of all 16 bytes,
// one byte per direct bit, and each plane is stored as a balanced word (the
// direct plane interleaved with its complement). The testbench compiles a
// gate netlist into balanced code:
//   AddRoundKey : plane XOR key plane
//   SubBytes    : inverse in GF(2^8) as x^254 (11 multiplications; each
//                 multiplication is 64 ANDs and XOR trees with reduction by
//                 x^8 + x^4 + x^3 + x + 1), then the affine map, with the
//                 constant 0x63 applied as NOT on planes 0, 1, 5, 6.
// Every gate reads its operands from data memory and writes its result
// back. Every load is preceded by a load of an all-zero word into the same
// register, every store by a store of %r0 to the same word, and every
// logic instruction by the same instruction on %r0 operands (pre-charge).
// XOR is expanded into NOT, b_and and b_or, as XNOR cannot be pre-charged
// with zeros.
// The same netlist is also compiled
//   - without any pre-charge instruction ("no pre-charge"), and
//   - on the direct half only ("direct only"): inputs carry zero
//     complement bits and the gates are the ordinary and/xor instructions,
//     NOT being an xor with a word holding the direct-bit mask.
// Each program starts, like a program receiving its plaintext from a host,
// by turning the raw plaintext planes (16 bits each) into balanced words
// with ordinary instructions: the bits are spread to the even positions by
// shift/or/and steps with constant masks built by SETHI, and then
// w = (x << 1) | (x ^ 0x55555555); the direct-only build keeps x << 1. The
// prologue ends by clearing the registers it used. The key planes are
// written balanced by the host.
// Each build is run on random inputs. The results are compared with an
// S-box computed here by searching for the multiplicative inverse, and the
// cycle count with one cycle per instruction plus one.
// Leakage model: for every instruction the testbench records the Hamming
// distance of the state it changes (the destination register, or the
// stored memory word). A build is data-independent when, instruction by
// instruction, this number is the same for every input. The full build
// must have no data-dependent instruction; the two weakened builds must
// have some. A first run of each build only brings memory and registers
// into a steady state and is not compared. The prologue handles the
// plaintext with ordinary instructions and is left out of the comparison
// and out of the balance checks.
// For the full build a monitor also checks pre-charge values and that each
// evaluation and each load of a balanced word writes a balanced word.
module tb_vsc_subbytes;
  import vsc_pkg::*;
  import vsc_asm_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic        prog_we = 0, host_we = 0, start = 0;
  logic [15:0] prog_addr = 0;
  logic [11:0] host_addr = 0;
  logic [31:0] prog_wdata = 0, host_wdata = 0, host_rdata;
  logic        busy, halted, illegal;
  retire_t     retire;

  vsc_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference S-box ----------------
  function automatic logic [7:0] gmul(logic [7:0] a, logic [7:0] b);
    logic [7:0] p = 0;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= a;
      a = a[7] ? ((a << 1) ^ 8'h1B) : (a << 1);
    end
    return p;
  endfunction

  function automatic logic [7:0] sbox(logic [7:0] x);
    logic [7:0] inv = 0, s;
    for (int c = 1; c < 256; c++) if (gmul(x, 8'(c)) == 8'h01) inv = 8'(c);
    for (int i = 0; i < 8; i++)
      s[i] = inv[i] ^ inv[(i+4)%8] ^ inv[(i+5)%8] ^ inv[(i+6)%8] ^ inv[(i+7)%8];
    return s ^ 8'h63;
  endfunction

  // ---------------- compiler: memory slots and gates ----------------
  typedef enum int {V_VSC, V_NOPRCH, V_NOCOMP} variant_e;
  localparam int NVAR = 3;
  localparam string VNAME [NVAR] = '{"full VSC", "no pre-charge", "direct only"};
  variant_e variant;
  localparam int ZERO = 0;          // word kept at zero
  localparam int PT0 = 1, KEY0 = 9, OUT0 = 17, MASKW = 31, PERS0 = 32, TEMP0 = 160;
  localparam int RAW0 = 1000;       // raw plaintext planes from the host
  int pro_len;                      // prologue length in instructions
  logic [31:0] prog [$];
  int next_pers = PERS0, next_temp = TEMP0;

  function automatic bit prch();
    return variant != V_NOPRCH;
  endfunction
  task automatic emit_logic(logic [31:0] pc_ins, logic [31:0] ins);
    if (prch()) prog.push_back(pc_ins);
    prog.push_back(ins);
  endtask
  task automatic ld_pc(int slot, int r);
    if (prch()) prog.push_back(m_ld(0, 4*ZERO, r));  // pre-charge register and load path
    prog.push_back(m_ld(0, 4*slot, r));
  endtask
  task automatic st_pc(int r, int slot);
    if (prch()) prog.push_back(m_st(0, 0, 4*slot));  // pre-charge memory word and store path
    prog.push_back(m_st(r, 0, 4*slot));
  endtask
  task automatic g_and(int a, int b, int d);
    ld_pc(a, 1); ld_pc(b, 2);
    if (variant == V_NOCOMP) emit_logic(a_and(0, 0, 3), a_and(1, 2, 3));
    else                     emit_logic(a_band(0, 0, 3), a_band(1, 2, 3));
    st_pc(3, d);
  endtask
  task automatic g_xor(int a, int b, int d);
    ld_pc(a, 1); ld_pc(b, 2);
    if (variant == V_NOCOMP) begin
      emit_logic(a_xor(0, 0, 7), a_xor(1, 2, 7));
    end else begin
      emit_logic(a_not(0, 3),     a_not(1, 3));
      emit_logic(a_not(0, 4),     a_not(2, 4));
      emit_logic(a_band(0, 0, 5), a_band(3, 2, 5));
      emit_logic(a_band(0, 0, 6), a_band(4, 1, 6));
      emit_logic(a_bor(0, 0, 7),  a_bor(5, 6, 7));
    end
    st_pc(7, d);
  endtask
  task automatic g_not(int a, int d);
    ld_pc(a, 1);
    if (variant == V_NOCOMP) begin
      ld_pc(MASKW, 2);
      emit_logic(a_xor(0, 0, 3), a_xor(1, 2, 3));
    end else
      emit_logic(a_not(0, 3), a_not(1, 3));
    st_pc(3, d);
  endtask
  task automatic g_copy(int a, int d);
    ld_pc(a, 1); st_pc(1, d);
  endtask

  typedef int plane8_t [8];

  // D = A * B in GF(2^8), planes in persistent slots
  task automatic gf_mul(plane8_t A, plane8_t B, output plane8_t D);
    int c [15];
    int first [15];
    next_temp = TEMP0;
    foreach (first[k]) first[k] = -1;
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) begin
        int t = next_temp++;
        g_and(A[i], B[j], t);
        if (first[i+j] < 0) first[i+j] = t;
        else begin
          int n = next_temp++;
          g_xor(first[i+j], t, n);
          first[i+j] = n;
        end
      end
    foreach (c[k]) c[k] = first[k];
    for (int k = 14; k >= 8; k--) begin
      int offs [4] = '{8, 7, 5, 4};
      foreach (offs[o]) begin
        int n = next_temp++;
        g_xor(c[k - offs[o]], c[k], n);
        c[k - offs[o]] = n;
      end
    end
    for (int i = 0; i < 8; i++) begin
      D[i] = next_pers++;
      g_copy(c[i], D[i]);
    end
  endtask

  // ---------------- retire monitor ----------------
  localparam int RUNS = 5;          // run 0 of each build settles the state
  localparam int MAXI = 32768;
  int n_pc_logic, n_pc_load, n_pc_store, n_eval, n_bal_load, n_store;
  logic [31:0] pc_val [32];
  logic [31:0] sh_reg [32];         // register contents seen through the trace
  logic [31:0] sh_mem [1024];       // data memory words the programs use
  shortint     hd [RUNS][MAXI];     // Hamming distance per instruction and run
  int          run_no, idx;
  bit          measuring;

  always @(posedge clk) begin
    if (retire.valid) begin
      automatic logic [31:0] ins = retire.instr;
      automatic logic [5:0] o3 = ins[24:19];
      automatic int flips = 0;
      if (ins[31:30] == 2'b11 && o3 == 6'h04) begin
        automatic int w = int'(ins[12:0]) / 4;
        flips = $countones(sh_mem[w] ^ sh_reg[ins[29:25]]);
        sh_mem[w] = sh_reg[ins[29:25]];
      end else if (retire.rd_we) begin
        flips = $countones(sh_reg[retire.rd] ^ retire.wdata);
        sh_reg[retire.rd] = retire.wdata;
      end
      if (measuring && idx < MAXI) hd[run_no][idx] = shortint'(flips);
      idx++;
    end
    if (retire.valid && variant == V_VSC && retire.pc >= 32'(4*pro_len)) begin
      automatic logic [31:0] ins = retire.instr;
      automatic logic [5:0] o3 = ins[24:19];
      if (ins[31:30] == 2'b11 && o3 == 6'h00) begin
        checks++;
        if (ins[13] && ins[12:0] == 13'(4*ZERO)) begin
          n_pc_load++;
          if (retire.wdata !== 0) begin failures++; $display("FAIL load pre-charge %h", retire.wdata); end
        end else begin
          n_bal_load++;
          if (!is_balanced(retire.wdata)) begin failures++; $display("FAIL unbalanced load %h", retire.wdata); end
        end
        pc_val[retire.rd] = retire.wdata;
      end else if (ins[31:30] == 2'b11) begin
        if (ins[29:25] == 0) n_pc_store++; else n_store++;
      end else if (ins[31:30] == 2'b10) begin
        checks++;
        if (ins[18:14] == 0 && ins[4:0] == 0 && !ins[13]) begin
          n_pc_logic++;
          if (retire.wdata !== ((o3 == 6'h07) ? 32'hFFFF_FFFF : 32'h0)) begin
            failures++; $display("FAIL pre-charge %h", retire.wdata);
          end
        end else begin
          n_eval++;
          if (!is_balanced(retire.wdata) || $countones(retire.wdata ^ pc_val[retire.rd]) != 16) begin
            failures++; $display("FAIL unbalanced evaluation %h at pc %h", retire.wdata, retire.pc);
          end
        end
        pc_val[retire.rd] = retire.wdata;
      end
    end
  end

  // ---------------- host ----------------
  task automatic host_write(int addr, logic [31:0] v);
    @(negedge clk); host_we = 1; host_addr = 12'(addr); host_wdata = v;
    @(negedge clk); host_we = 0;
    if (addr < 1024) sh_mem[addr] = v;
  endtask
  task automatic host_read(int addr, output logic [31:0] v);
    @(negedge clk); host_addr = 12'(addr); #1 v = host_rdata;
  endtask

  task automatic compile();
    plane8_t X, x2, x3, x6, x12, x14, x15, x30, x60, x120, x240, inv;
    prog.delete();
    next_pers = PERS0;
    next_temp = TEMP0;
    // prologue: masks in r10..r13, then spread and complement each plane
    begin
      automatic logic [31:0] masks [4] = '{32'h00FF_00FF, 32'h0F0F_0F0F, 32'h3333_3333, 32'h5555_5555};
      automatic int sh [4] = '{8, 4, 2, 1};
      foreach (masks[m]) begin
        prog.push_back(b_sethi(int'(masks[m][31:10]), 10 + m));
        prog.push_back(a_orI(10 + m, int'(masks[m][9:0]), 10 + m));
      end
      for (int k = 0; k < 8; k++) begin
        prog.push_back(m_ld(0, 4*(RAW0 + k), 1));
        foreach (sh[m]) begin
          prog.push_back(a_slli(1, sh[m], 2));
          prog.push_back(a_or(1, 2, 1));
          prog.push_back(a_and(1, 10 + m, 1));
        end
        prog.push_back(a_slli(1, 1, 2));
        if (variant == V_NOCOMP) prog.push_back(a_or(2, 0, 1));
        else begin
          prog.push_back(a_xor(1, 13, 3));
          prog.push_back(a_or(2, 3, 1));
        end
        prog.push_back(m_st(1, 0, 4*(PT0 + k)));
      end
      foreach (masks[m]) prog.push_back(a_or(0, 0, 10 + m));
      for (int r = 1; r <= 3; r++) prog.push_back(a_or(0, 0, r));
      pro_len = prog.size();
    end
    for (int k = 0; k < 8; k++) begin
      X[k] = next_pers++;
      g_xor(PT0 + k, KEY0 + k, X[k]);              // AddRoundKey
    end
    gf_mul(X, X, x2);
    gf_mul(x2, X, x3);
    gf_mul(x3, x3, x6);
    gf_mul(x6, x6, x12);
    gf_mul(x12, x2, x14);
    gf_mul(x12, x3, x15);
    gf_mul(x15, x15, x30);
    gf_mul(x30, x30, x60);
    gf_mul(x60, x60, x120);
    gf_mul(x120, x120, x240);
    gf_mul(x240, x14, inv);                        // x^254 = inverse
    for (int i = 0; i < 8; i++) begin
      automatic int acc = inv[i];
      for (int s = 4; s < 8; s++) begin
        automatic int n = next_temp++;
        g_xor(acc, inv[(i + s) % 8], n);
        acc = n;
      end
      if ((8'h63 & (8'(1) << i)) != 0) g_not(acc, OUT0 + i);
      else                      g_copy(acc, OUT0 + i);
    end
  endtask

  initial begin
    int cycles;
    int leaky [NVAR];
    foreach (pc_val[i]) pc_val[i] = '0;
    foreach (sh_reg[i]) sh_reg[i] = '0;
    foreach (sh_mem[i]) sh_mem[i] = '0;
    variant = V_VSC;
    measuring = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    for (int v = 0; v < NVAR; v++) begin
      variant = variant_e'(v);
      compile();
      $display("%s AddRoundKey+SubBytes program: %0d instructions, %0d data words",
               VNAME[v], prog.size(), next_temp);
      check("program fits the instruction memory", 32'(prog.size() < 65536), 1);
      check("slots reachable with a 13-bit offset", 32'(next_temp < 1024), 1);
      foreach (prog[i]) begin
        @(negedge clk); prog_we = 1; prog_addr = 16'(i); prog_wdata = prog[i];
      end
      @(negedge clk); prog_addr = 16'(prog.size()); prog_wdata = UNIMP;
      @(negedge clk); prog_we = 0;
      for (int a = 0; a < next_temp; a++) host_write(a, '0);
      host_write(MASKW, DIRECT_MASK);

      for (int run = 0; run < RUNS; run++) begin
        automatic logic [7:0] pt [16], key [16];
        automatic logic [15:0] plane;
        automatic logic [31:0] r;
        foreach (pt[j]) begin pt[j] = 8'($urandom); key[j] = 8'($urandom); end
        if (run == 1 && v == 0) foreach (pt[j]) begin pt[j] = 8'(j * 17); key[j] = 8'h00; end
        for (int k = 0; k < 8; k++) begin
          for (int j = 0; j < 16; j++) plane[j] = pt[j][k];
          host_write(RAW0 + k, {16'h0, plane});
          for (int j = 0; j < 16; j++) plane[j] = key[j][k];
          host_write(KEY0 + k, (variant == V_NOCOMP) ? bal(plane) & DIRECT_MASK : bal(plane));
        end
        run_no = run;
        idx = 0;
        measuring = 1;
        @(negedge clk) start = 1;
        @(negedge clk) start = 0;
        cycles = 0;
        while (!halted) begin @(negedge clk); cycles++; end
        measuring = 0;
        check("no illegal instruction", 32'(illegal), 0);
        check("one instruction per cycle", cycles, prog.size() + 1);
        check("every instruction traced", idx, prog.size());
        for (int k = 0; k < 8; k++) begin
          for (int j = 0; j < 16; j++) plane[j] = pt[j][k];
          host_read(PT0 + k, r);
          check("plaintext plane balanced by the program",
                r, (variant == V_NOCOMP) ? bal(plane) & DIRECT_MASK : bal(plane));
          host_read(OUT0 + k, r);
          if (variant != V_NOCOMP) check("output plane balanced", 32'(is_balanced(r)), 1);
          else                     check("no complement bits", r & ~DIRECT_MASK, 0);
          for (int j = 0; j < 16; j++) plane[j] = sbox(pt[j] ^ key[j])[k];
          check($sformatf("%s run %0d S-box plane %0d", VNAME[v], run, k),
                32'(direct_of(r)), 32'(plane));
        end
        $display("%s run %0d: %0d cycles for 16 bytes", VNAME[v], run, cycles);
      end

      // instructions whose switching differs between the measured runs
      leaky[v] = 0;
      for (int i = pro_len; i < prog.size() && i < MAXI; i++)
        for (int run = 2; run < RUNS; run++)
          if (hd[run][i] != hd[1][i]) begin leaky[v]++; break; end
      $display("%s: %0d of %0d instructions after the %0d-instruction prologue switch a data-dependent number of bits",
               VNAME[v], leaky[v], prog.size() - pro_len, pro_len);
    end

    check("full VSC build: switching independent of the data", leaky[V_VSC], 0);
    check("no pre-charge build: switching depends on the data", 32'(leaky[V_NOPRCH] > 0), 1);
    check("direct-only build: switching depends on the data",  32'(leaky[V_NOCOMP] > 0), 1);
    $display("pre-charges: logic=%0d load=%0d store=%0d; evaluations=%0d balanced loads=%0d stores=%0d",
             n_pc_logic, n_pc_load, n_pc_store, n_eval, n_bal_load, n_store);
    check("logic pre-charge happened", 32'(n_pc_logic > 0), 1);
    check("load pre-charge happened",  32'(n_pc_load > 0), 1);
    check("store pre-charge happened", 32'(n_pc_store > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
