// tb_vsc_top: end-to-end test of the balanced processor system at its
// default sizes. A host loads programs, writes balanced inputs (each 16-bit
// value interleaved with its complement), starts the core, waits for halt
// and reads the balanced results back. Programs run:
//   1. a regular (unbalanced) XOR built from NOT/AND/OR on 32-bit words;
//   2. the same XOR as a virtual secure circuit: each gate is a pre-charge
//      instruction (operands %r0) followed by the balanced instruction;
//   3. a bitsliced balanced AND of two arrays of 3-bit elements;
//   4. random balanced netlists of NOT, AND, OR, XOR (XOR expanded into
//      NOT, b_and and b_or) and moves, compiled the same way;
//   5. a service loop: the core polls a mailbox word, runs the balanced XOR
//      for each request the host posts, clears the mailbox and loops (with
//      conditional branches, delay slots and an annulled slot) until the
//      host posts the exit command.
// A monitor on the retire port checks that every pre-charge writes all
// zeros (all ones for NOT) and every balanced evaluation writes a balanced
// word: 16 ones and a Hamming distance of 16 from the pre-charged value.
// It counts each mechanism and fails one that never happened.
module tb_vsc_top;
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
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- program building ----------------
  logic [31:0] prog [$];

  // pre-charge + evaluation pairs
  task automatic v_not(int a, int d);      prog.push_back(a_not(0, d));      prog.push_back(a_not(a, d));      endtask
  task automatic v_and(int a, int b, int d); prog.push_back(a_band(0, 0, d)); prog.push_back(a_band(a, b, d)); endtask
  task automatic v_or (int a, int b, int d); prog.push_back(a_bor(0, 0, d));  prog.push_back(a_bor(a, b, d));  endtask
  task automatic v_mov(int a, int d);      prog.push_back(a_or(0, 0, d));    prog.push_back(a_or(a, 0, d));    endtask

  // ---------------- retire monitor ----------------
  int n_precharge, n_eval_band, n_eval_bor, n_eval_not, n_eval_mov;
  int n_regular, n_load, n_store, n_runs, n_balanced_bad;
  int n_branch, n_idle_cycles, n_requests;
  bit mon_on;          // balanced-program runs only
  logic [31:0] last_pc_val [32];

  always @(posedge clk) begin
    if (busy && !retire.valid) n_idle_cycles++;   // halting fetch or annulled slot
    if (retire.valid) begin
      automatic logic [31:0] ins = retire.instr;
      automatic bit arith = ins[31:30] == 2'b10;
      automatic bit zero_ops = ins[18:14] == 0 && ins[13] == 0 && ins[4:0] == 0;
      automatic logic [5:0] o3 = ins[24:19];
      if (ins[31:30] == 2'b00 && ins[24:22] == 3'b010) n_branch++;
      if (ins[31:30] == 2'b11) begin
        if (o3 == 6'h04 || o3 == 6'h05) n_store++; else n_load++;
      end
      if (!mon_on) begin
        if (arith) n_regular++;
      end else if (arith && (o3 == 6'h05 || o3 == 6'h06 || o3 == 6'h07 || o3 == 6'h02)) begin
        if (zero_ops) begin
          // pre-charge: all zeros, or all ones for NOT (XNOR with %r0)
          n_precharge++;
          checks++;
          if (retire.wdata !== ((o3 == 6'h07) ? 32'hFFFF_FFFF : 32'h0)) begin
            failures++; $display("FAIL pre-charge value %h at pc %h", retire.wdata, retire.pc);
          end
          last_pc_val[retire.rd] = retire.wdata;
        end else begin
          case (o3)
            6'h05: n_eval_band++;
            6'h06: n_eval_bor++;
            6'h07: n_eval_not++;
            default: n_eval_mov++;
          endcase
          checks++;
          if (!is_balanced(retire.wdata) || $countones(retire.wdata) != 16 ||
              $countones(retire.wdata ^ last_pc_val[retire.rd]) != 16) begin
            failures++; n_balanced_bad++;
            $display("FAIL unbalanced evaluation %h at pc %h", retire.wdata, retire.pc);
          end
        end
      end
    end
  end

  // ---------------- host operations ----------------
  task automatic load_program();
    foreach (prog[i]) begin
      @(negedge clk); prog_we = 1; prog_addr = 16'(i); prog_wdata = prog[i];
    end
    @(negedge clk); prog_we = 1; prog_addr = 16'(prog.size()); prog_wdata = UNIMP;
    @(negedge clk); prog_we = 0;
  endtask

  task automatic host_write(int addr, logic [31:0] v);
    @(negedge clk); host_we = 1; host_addr = 12'(addr); host_wdata = v;
    @(negedge clk); host_we = 0;
  endtask

  task automatic host_read(int addr, output logic [31:0] v);
    @(negedge clk); host_addr = 12'(addr); #1 v = host_rdata;
  endtask

  int run_cycles;
  task automatic run();
    int n = prog.size();
    run_cycles = 0;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    run_cycles = 0;   // cycles in RUN, counted after the start edge
    while (!halted) begin @(negedge clk); run_cycles++; end
    n_runs++;
    check("halted without illegal", 32'(illegal), 0);
    check("cycles = instructions + halt", run_cycles, n + 1);
  endtask

  // ---------------- tests ----------------
  task automatic test_fig6();
    logic [31:0] x, y, r;
    logic [15:0] u, v;
    // regular program: r1 = r1 XOR r2 from NOT, AND, OR
    x = $urandom; y = $urandom;
    prog.delete();
    prog.push_back(m_ld(0, 0, 1));
    prog.push_back(m_ld(0, 4, 2));
    prog.push_back(a_not(1, 6));
    prog.push_back(a_not(2, 7));
    prog.push_back(a_and(6, 2, 3));
    prog.push_back(a_and(7, 1, 4));
    prog.push_back(a_or (3, 4, 1));
    prog.push_back(m_st(1, 0, 8));
    mon_on = 0;
    host_write(0, x); host_write(1, y);
    load_program(); run();
    host_read(2, r);
    check("regular xor", r, x ^ y);
    // the same XOR as a virtual secure circuit
    u = 16'($urandom); v = 16'($urandom);
    prog.delete();
    prog.push_back(m_ld(0, 0, 1));
    prog.push_back(m_ld(0, 4, 2));
    v_not(1, 6); v_not(2, 7);
    v_and(6, 2, 3); v_and(7, 1, 4);
    v_or(3, 4, 1);
    prog.push_back(m_st(1, 0, 8));
    mon_on = 1;
    host_write(0, bal(u)); host_write(1, bal(v));
    load_program(); run();
    host_read(2, r);
    check("balanced xor", r, bal(u ^ v));
  endtask

  task automatic test_bitslice_and();
    // elements a_j, b_j of 3 bits, 16 instances; plane k holds bit k of every instance
    logic [2:0] a [16], b [16];
    logic [15:0] pa [3], pb [3], pc;
    logic [31:0] r;
    foreach (a[j]) begin a[j] = 3'($urandom); b[j] = 3'($urandom); end
    for (int k = 0; k < 3; k++)
      for (int j = 0; j < 16; j++) begin pa[k][j] = a[j][k]; pb[k][j] = b[j][k]; end
    prog.delete();
    for (int k = 0; k < 3; k++) begin
      prog.push_back(m_ld(0, 4*k, 1 + k));        // r1..r3: planes of A
      prog.push_back(m_ld(0, 12 + 4*k, 5 + k));   // r5..r7: planes of B
    end
    for (int k = 0; k < 3; k++) v_and(1 + k, 5 + k, 9 + k);
    for (int k = 0; k < 3; k++) prog.push_back(m_st(9 + k, 0, 32 + 4*k));
    mon_on = 1;
    for (int k = 0; k < 3; k++) begin host_write(k, bal(pa[k])); host_write(3 + k, bal(pb[k])); end
    load_program(); run();
    for (int k = 0; k < 3; k++) begin
      host_read(8 + k, r);
      check("bitslice plane balanced", 32'(is_balanced(r)), 1);
      for (int j = 0; j < 16; j++) begin
        pc[j] = a[j][k] & b[j][k];
      end
      check("bitslice plane", 32'(direct_of(r)), 32'(pc));
    end
  endtask

  // random netlist: inputs in r1..r4, gate outputs rotate through r5..r31,
  // operands from the inputs and the last four gate outputs
  task automatic test_random_netlist(int ngates);
    logic [15:0] inval [4];
    logic [15:0] gold [32];
    int          recent [$];
    int          next_reg = 5;
    logic [31:0] r;
    prog.delete();
    for (int i = 0; i < 4; i++) begin
      inval[i] = 16'($urandom); gold[1 + i] = inval[i];
      prog.push_back(m_ld(0, 4*i, 1 + i));
      recent.push_back(1 + i);
    end
    for (int g = 0; g < ngates; g++) begin
      int a = recent[$urandom % recent.size()];
      int b = recent[$urandom % recent.size()];
      int kind = $urandom % 5;
      int d;
      d = next_reg; next_reg = (next_reg == 31) ? 5 : next_reg + 1;
      case (kind)
        0: begin v_not(a, d); gold[d] = ~gold[a]; end
        1: begin v_and(a, b, d); gold[d] = gold[a] & gold[b]; end
        2: begin v_or(a, b, d);  gold[d] = gold[a] | gold[b]; end
        3: begin v_mov(a, d);    gold[d] = gold[a]; end
        default: begin
          // d = (~a & b) | (a & ~b), four temporaries
          int t1 = d, t2, t3, t4, o;
          t2 = next_reg; next_reg = (next_reg == 31) ? 5 : next_reg + 1;
          t3 = next_reg; next_reg = (next_reg == 31) ? 5 : next_reg + 1;
          t4 = next_reg; next_reg = (next_reg == 31) ? 5 : next_reg + 1;
          o  = next_reg; next_reg = (next_reg == 31) ? 5 : next_reg + 1;
          v_not(a, t1); v_not(b, t2);
          v_and(t1, b, t3); v_and(t2, a, t4);
          v_or(t3, t4, o);
          gold[o] = gold[a] ^ gold[b];
          d = o;
        end
      endcase
      recent.push_back(d);
      if (recent.size() > 8) recent.delete(4);   // keep inputs + last four outputs
    end
    for (int i = 0; i < 4; i++) prog.push_back(m_st(recent[4 + i], 0, 64 + 4*i));
    mon_on = 1;
    for (int i = 0; i < 4; i++) host_write(i, bal(inval[i]));
    load_program(); run();
    for (int i = 0; i < 4; i++) begin
      host_read(16 + i, r);
      check("netlist output", r, bal(gold[recent[4 + i]]));
    end
  endtask

  function automatic logic [31:0] bicc(int cnd, bit an, int disp);
    return {2'b00, an, 4'(cnd), 3'b010, 22'(disp)};
  endfunction

  task automatic test_service_loop();
    localparam int MBOX = 100;                 // mailbox word: 0 idle, 1 request, 2 exit
    localparam logic [31:0] NOP = b_sethi(0, 0);
    logic [31:0] r;
    int idle_before = n_idle_cycles;
    prog.delete();
    prog.push_back(m_ld(0, 4*MBOX, 10));               //  0 L: poll mailbox
    prog.push_back(f3i(2'b10, 6'h14, 0, 10, 1));       //  1 subcc r10, 1, %r0
    prog.push_back(bicc(4'h1, 0, 9 - 2));              //  2 be WORK
    prog.push_back(NOP);                               //  3 delay slot
    prog.push_back(f3i(2'b10, 6'h14, 0, 10, 2));       //  4 subcc r10, 2, %r0
    prog.push_back(bicc(4'h1, 0, 25 - 5));             //  5 be EXIT
    prog.push_back(NOP);                               //  6
    prog.push_back(bicc(4'h8, 0, -7));                 //  7 ba L
    prog.push_back(NOP);                               //  8
    prog.push_back(m_ld(0, 0, 1));                     //  9 WORK
    prog.push_back(m_ld(0, 4, 2));                     // 10
    v_not(1, 6); v_not(2, 7);                          // 11..14
    v_and(6, 2, 3); v_and(7, 1, 4);                    // 15..18
    v_or(3, 4, 1);                                     // 19..20
    prog.push_back(m_st(1, 0, 8));                     // 21 result
    prog.push_back(m_st(0, 0, 4*MBOX));                // 22 clear mailbox
    prog.push_back(bicc(4'h8, 1, -23));                // 23 ba,a L
    prog.push_back(m_st(0, 0, 8));                     // 24 annulled: would erase the result
    check("service loop layout", prog.size(), 25);     // 25 EXIT: UNIMP (added by load_program)
    mon_on = 1;
    host_write(MBOX, 0);
    load_program();
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    for (int q = 0; q < 4; q++) begin
      automatic logic [15:0] u = 16'($urandom), v = 16'($urandom);
      host_write(0, bal(u)); host_write(1, bal(v));
      host_write(MBOX, 1);
      n_requests++;
      do host_read(MBOX, r); while (r != 0);
      repeat (8) @(negedge clk);                       // past the annulled slot
      host_read(2, r);
      check("service loop result", r, bal(u ^ v));
      check("core still running", 32'(busy), 1);
    end
    host_write(MBOX, 2);
    while (!halted) @(negedge clk);
    n_runs++;
    check("service loop exit without illegal", 32'(illegal), 0);
    // idle cycles: one halting fetch, plus one annulled slot per request
    check("annulled delay slots", n_idle_cycles - idle_before - 1, 4);
  endtask

  initial begin
    foreach (last_pc_val[i]) last_pc_val[i] = '0;
    mon_on = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    test_fig6();
    test_bitslice_and();
    test_random_netlist(10);
    test_random_netlist(200);
    test_random_netlist(3000);
    test_service_loop();
    $display("pre-charges=%0d b_and=%0d b_or=%0d not=%0d mov=%0d regular=%0d loads=%0d stores=%0d runs=%0d branches=%0d requests=%0d",
             n_precharge, n_eval_band, n_eval_bor, n_eval_not, n_eval_mov, n_regular, n_load, n_store, n_runs,
             n_branch, n_requests);
    check("pre-charge happened",        32'(n_precharge > 0), 1);
    check("balanced AND happened",      32'(n_eval_band > 0), 1);
    check("balanced OR happened",       32'(n_eval_bor > 0), 1);
    check("balanced NOT happened",      32'(n_eval_not > 0), 1);
    check("shared move happened",       32'(n_eval_mov > 0), 1);
    check("regular instructions ran",   32'(n_regular > 0), 1);
    check("loads happened",             32'(n_load > 0), 1);
    check("stores happened",            32'(n_store > 0), 1);
    check("restart after halt happened", 32'(n_runs > 1), 1);
    check("branches happened",          32'(n_branch > 0), 1);
    check("service requests happened",  32'(n_requests > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
