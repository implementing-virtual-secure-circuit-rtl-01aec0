// tb_balanced_logic_unit: checks every operation of the logic unit against
// a bit-by-bit reference, that balanced inputs give balanced outputs whose
// direct half is the plain AND/OR, and that all-zero inputs pre-charge to 0.
module tb_balanced_logic_unit;
  import vsc_pkg::*;
  import vsc_asm_pkg::*;

  logic_op_e   op;
  logic [31:0] a, b, y;
  int checks = 0, failures = 0;

  balanced_logic_unit dut (.op(op), .a(a), .b(b), .y(y));

  function automatic logic [31:0] ref_y(logic_op_e o, logic [31:0] x, logic [31:0] z);
    logic [31:0] r;
    for (int i = 0; i < 32; i++) begin
      bit direct = (i % 2) == 1;
      case (o)
        LOGIC_AND : r[i] = x[i] & z[i];
        LOGIC_OR  : r[i] = x[i] | z[i];
        LOGIC_XOR : r[i] = x[i] ^ z[i];
        LOGIC_XNOR: r[i] = ~(x[i] ^ z[i]);
        LOGIC_BAND: r[i] = direct ? (x[i] & z[i]) : (x[i] | z[i]);
        LOGIC_BOR : r[i] = direct ? (x[i] | z[i]) : (x[i] & z[i]);
        default   : r[i] = 1'b0;
      endcase
    end
    return r;
  endfunction

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
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
    automatic logic_op_e ops[6] = '{LOGIC_AND, LOGIC_OR, LOGIC_XOR, LOGIC_XNOR, LOGIC_BAND, LOGIC_BOR};
    // worked example: one byte of operands 1001_0110 and 1010_0110
    op = LOGIC_BAND; a = 32'h0000_0096; b = 32'h0000_00A6; #1;
    check("fig4c b_and byte", y[7:0], 8'h96);
    for (int n = 0; n < 300; n++) begin
      foreach (ops[k]) begin
        op = ops[k]; a = $urandom; b = $urandom; #1;
        check($sformatf("random op %0d", k), y, ref_y(op, a, b));
      end
      begin
        automatic logic [15:0] x = 16'($urandom);
        automatic logic [15:0] z = 16'($urandom);
        op = LOGIC_BAND; a = bal(x); b = bal(z); #1;
        check("b_and balanced", y, bal(x & z));
        op = LOGIC_BOR; #1;
        check("b_or balanced", y, bal(x | z));
      end
    end
    foreach (ops[k]) begin
      op = ops[k]; a = '0; b = '0; #1;
      check("pre-charge", y, (ops[k] == LOGIC_XNOR) ? 32'hFFFF_FFFF : 32'h0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
