// balanced_alu: the ALU of the balanced processor.
//
// It joins the balanced logic unit with an adder/subtractor and a barrel
// shifter. Only the logic unit differs from a regular processor's ALU: the
// published VSC approach adds balanced AND and balanced OR and leaves NOT, shifts and
// moves shared between regular and balanced code. Adds, subtracts and
// shifts serve the non-sensitive parts of a program (addresses, loop
// counts); shifting a balanced word by an even amount keeps each direct
// bit next to its complement. ALU_PASSB forwards operand b (used by
// SETHI). The shift amount is b[4:0], as in SPARC. The flags output gives
// the integer condition codes of the result as SPARC defines them: N and Z
// for every operation, carry/borrow and overflow for ADD and SUB, V = C = 0
// otherwise; the core latches them only for the cc-setting instructions.
//
// Purely combinational. Which arithmetic and shift operations exist is
// this design's choice.
module balanced_alu
  import vsc_pkg::*;
(
  input  alu_op_e          op,
  input  logic [XLEN-1:0]  a,
  input  logic [XLEN-1:0]  b,
  output logic [XLEN-1:0]  y,
  output icc_t             flags
);

  logic_op_e        lop;
  logic [XLEN-1:0]  logic_y;
  logic [4:0]       shamt;
  logic [XLEN:0]    sum;

  assign sum = {1'b0, a} + {1'b0, b};

  assign shamt = b[4:0];

  always_comb begin
    unique case (op)
      ALU_OR  : lop = LOGIC_OR;
      ALU_XOR : lop = LOGIC_XOR;
      ALU_XNOR: lop = LOGIC_XNOR;
      ALU_BAND: lop = LOGIC_BAND;
      ALU_BOR : lop = LOGIC_BOR;
      default : lop = LOGIC_AND;
    endcase
  end

  balanced_logic_unit u_logic (
    .op (lop),
    .a  (a),
    .b  (b),
    .y  (logic_y)
  );

  always_comb begin
    unique case (op)
      ALU_ADD  : y = sum[XLEN-1:0];
      ALU_SUB  : y = a - b;
      ALU_AND, ALU_OR, ALU_XOR, ALU_XNOR, ALU_BAND, ALU_BOR:
                 y = logic_y;
      ALU_SLL  : y = a << shamt;
      ALU_SRL  : y = a >> shamt;
      ALU_SRA  : y = XLEN'($signed(a) >>> shamt);
      ALU_PASSB: y = b;
      default  : y = '0;
    endcase
  end

  always_comb begin
    flags.n = y[XLEN-1];
    flags.z = (y == '0);
    unique case (op)
      ALU_ADD: begin
        flags.c = sum[XLEN];
        flags.v = (a[XLEN-1] == b[XLEN-1]) && (y[XLEN-1] != a[XLEN-1]);
      end
      ALU_SUB: begin
        flags.c = (a < b);
        flags.v = (a[XLEN-1] != b[XLEN-1]) && (y[XLEN-1] != a[XLEN-1]);
      end
      default: begin
        flags.c = 1'b0;
        flags.v = 1'b0;
      end
    endcase
  end

endmodule
