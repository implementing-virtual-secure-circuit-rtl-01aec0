// vsc_asm_pkg: instruction encoders and balanced-word helpers for the
// testbenches of the balanced processor (SPARC V8 encodings).
package vsc_asm_pkg;

  function automatic logic [31:0] f3(input logic [1:0] op, input logic [5:0] op3,
                                     input int rd, input int rs1, input int rs2);
    return {op, 5'(rd), op3, 5'(rs1), 1'b0, 8'd0, 5'(rs2)};
  endfunction

  function automatic logic [31:0] f3i(input logic [1:0] op, input logic [5:0] op3,
                                      input int rd, input int rs1, input int simm);
    return {op, 5'(rd), op3, 5'(rs1), 1'b1, 13'(simm)};
  endfunction

  // register-register ALU ops: "mnemonic rs1, rs2, rd"
  function automatic logic [31:0] a_add (int rs1, int rs2, int rd); return f3(2'b10, 6'h00, rd, rs1, rs2); endfunction
  function automatic logic [31:0] a_and (int rs1, int rs2, int rd); return f3(2'b10, 6'h01, rd, rs1, rs2); endfunction
  function automatic logic [31:0] a_or  (int rs1, int rs2, int rd); return f3(2'b10, 6'h02, rd, rs1, rs2); endfunction
  function automatic logic [31:0] a_xor (int rs1, int rs2, int rd); return f3(2'b10, 6'h03, rd, rs1, rs2); endfunction
  function automatic logic [31:0] a_sub (int rs1, int rs2, int rd); return f3(2'b10, 6'h04, rd, rs1, rs2); endfunction
  function automatic logic [31:0] a_band(int rs1, int rs2, int rd); return f3(2'b10, 6'h05, rd, rs1, rs2); endfunction
  function automatic logic [31:0] a_bor (int rs1, int rs2, int rd); return f3(2'b10, 6'h06, rd, rs1, rs2); endfunction
  function automatic logic [31:0] a_xnor(int rs1, int rs2, int rd); return f3(2'b10, 6'h07, rd, rs1, rs2); endfunction
  function automatic logic [31:0] a_sll (int rs1, int rs2, int rd); return f3(2'b10, 6'h25, rd, rs1, rs2); endfunction
  function automatic logic [31:0] a_srl (int rs1, int rs2, int rd); return f3(2'b10, 6'h26, rd, rs1, rs2); endfunction
  function automatic logic [31:0] a_sra (int rs1, int rs2, int rd); return f3(2'b10, 6'h27, rd, rs1, rs2); endfunction
  // immediate forms
  function automatic logic [31:0] a_addi(int rs1, int imm, int rd); return f3i(2'b10, 6'h00, rd, rs1, imm); endfunction
  function automatic logic [31:0] a_orI (int rs1, int imm, int rd); return f3i(2'b10, 6'h02, rd, rs1, imm); endfunction
  function automatic logic [31:0] a_slli(int rs1, int imm, int rd); return f3i(2'b10, 6'h25, rd, rs1, imm); endfunction
  function automatic logic [31:0] a_srli(int rs1, int imm, int rd); return f3i(2'b10, 6'h26, rd, rs1, imm); endfunction
  // synthetic: not rs1, rd = xnor rs1, %r0, rd
  function automatic logic [31:0] a_not (int rs1, int rd); return a_xnor(rs1, 0, rd); endfunction
  // memory: [rs1 + imm]
  function automatic logic [31:0] m_ld  (int rs1, int imm, int rd); return f3i(2'b11, 6'h00, rd, rs1, imm); endfunction
  function automatic logic [31:0] m_ldr (int rs1, int rs2, int rd); return f3 (2'b11, 6'h00, rd, rs1, rs2); endfunction
  function automatic logic [31:0] m_ldub(int rs1, int imm, int rd); return f3i(2'b11, 6'h01, rd, rs1, imm); endfunction
  function automatic logic [31:0] m_st  (int rd, int rs1, int imm); return f3i(2'b11, 6'h04, rd, rs1, imm); endfunction
  function automatic logic [31:0] m_stb (int rd, int rs1, int imm); return f3i(2'b11, 6'h05, rd, rs1, imm); endfunction
  function automatic logic [31:0] m_str (int rd, int rs1, int rs2); return f3 (2'b11, 6'h04, rd, rs1, rs2); endfunction
  function automatic logic [31:0] b_sethi(int imm22, int rd); return {2'b00, 5'(rd), 3'b100, 22'(imm22)}; endfunction
  localparam logic [31:0] UNIMP = 32'h0000_0000;

  // A 16-bit value and its complement interleaved: bit 2i+1 = v[i], bit 2i = ~v[i]
  function automatic logic [31:0] bal(input logic [15:0] v);
    logic [31:0] w;
    for (int i = 0; i < 16; i++) begin
      w[2*i+1] = v[i];
      w[2*i]   = ~v[i];
    end
    return w;
  endfunction

  function automatic logic [15:0] direct_of(input logic [31:0] w);
    logic [15:0] v;
    for (int i = 0; i < 16; i++) v[i] = w[2*i+1];
    return v;
  endfunction

  function automatic logic [15:0] comp_of(input logic [31:0] w);
    logic [15:0] v;
    for (int i = 0; i < 16; i++) v[i] = w[2*i];
    return v;
  endfunction

  function automatic bit is_balanced(input logic [31:0] w);
    return comp_of(w) == ~direct_of(w);
  endfunction

endpackage
