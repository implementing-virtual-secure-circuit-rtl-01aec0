// tb_balanced_alu: drives every ALU operation with random and corner
// operands and compares result and condition codes with a reference
// written from the operation's definition (carry and overflow from 64-bit
// arithmetic); checks balanced AND/OR on interleaved direct/complement words.
module tb_balanced_alu;
  import vsc_pkg::*;
  import vsc_asm_pkg::*;

  alu_op_e     op;
  logic [31:0] a, b, y;
  icc_t        flags;
  int checks = 0, failures = 0;

  balanced_alu dut (.op(op), .a(a), .b(b), .y(y), .flags(flags));

  function automatic logic [31:0] ref_y(alu_op_e o, logic [31:0] x, logic [31:0] z);
    int unsigned s = z % 32;
    logic [31:0] r;
    case (o)
      ALU_ADD  : r = x + z;
      ALU_SUB  : r = x + ~z + 1;
      ALU_AND  : r = x & z;
      ALU_OR   : r = x | z;
      ALU_XOR  : r = x ^ z;
      ALU_XNOR : r = x ^ ~z;
      ALU_BAND : r = bal(direct_of(x) & direct_of(z)) ;
      ALU_BOR  : r = bal(direct_of(x) | direct_of(z));
      ALU_SLL  : begin r = x; repeat (s) r = {r[30:0], 1'b0}; end
      ALU_SRL  : begin r = x; repeat (s) r = {1'b0, r[31:1]}; end
      ALU_SRA  : begin r = x; repeat (s) r = {r[31], r[31:1]}; end
      ALU_PASSB: r = z;
      default  : r = '0;
    endcase
    return r;
  endfunction

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: op=%s a=%h b=%h got %h expected %h", what, op.name(), a, b, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic alu_op_e plain[10] = '{ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR,
                                     ALU_XNOR, ALU_SLL, ALU_SRL, ALU_SRA, ALU_PASSB};
    for (int n = 0; n < 200; n++) begin
      foreach (plain[k]) begin
        op = plain[k];
        a = (n == 0) ? 32'h8000_0001 : $urandom;
        b = (n == 0) ? 32'd31 : $urandom;
        #1 check("plain", y, ref_y(op, a, b));
        begin
          automatic longint unsigned ua = a, ub = b;
          automatic longint sa = $signed(a), sb = $signed(b);
          automatic logic [3:0] f;
          f[3] = y[31]; f[2] = (y == 0); f[1] = 0; f[0] = 0;
          if (op == ALU_ADD) begin
            f[0] = (ua + ub) >= 64'h1_0000_0000;
            f[1] = (sa + sb) > 64'sh7FFF_FFFF || (sa + sb) < -64'sh8000_0000;
          end else if (op == ALU_SUB) begin
            f[0] = ua < ub;
            f[1] = (sa - sb) > 64'sh7FFF_FFFF || (sa - sb) < -64'sh8000_0000;
          end
          check("flags nzvc", 32'(flags), 32'(f));
        end
      end
      // balanced operations on balanced operands
      a = bal(16'($urandom)); b = bal(16'($urandom));
      op = ALU_BAND; #1 check("b_and", y, ref_y(op, a, b));
      op = ALU_BOR;  #1 check("b_or",  y, ref_y(op, a, b));
      // NOT of a balanced word is balanced and inverts the direct half
      op = ALU_XNOR; b = '0; #1 check("not", y, bal(~direct_of(a)));
      // even shift keeps pairs together
      op = ALU_SLL; b = 32'd2; #1 check("sll pair", y, bal({direct_of(a)[14:0], 1'b0}) & ~32'h1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
