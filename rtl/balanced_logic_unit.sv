// balanced_logic_unit: the bitwise logic part of the balanced ALU.
//
// Besides the regular AND, OR, XOR and XNOR it computes the two balanced
// instructions. In a balanced word each direct bit has its complement in
// the neighbouring bit; MASK marks the direct bits. Since
// NOT(a AND b) = NOT a OR NOT b, a balanced AND must apply AND to the
// direct bits and OR to the complementary bits, so that a balanced input
// pair gives a balanced output pair:
//   b_and: y = (a & b) on direct bits, (a | b) on complementary bits
//   b_or : y = (a | b) on direct bits, (a & b) on complementary bits
// Inputs of all zeros give an output of all zeros for every operation,
// which is how software pre-charges a balanced gate before evaluating it.
// NOT (XNOR with zero) needs no balanced version: it is its own complement.
//
// Purely combinational. The per-bit AND/OR choice follows the published VSC approach;
// the mask as a parameter is this design's choice.
module balanced_logic_unit
  import vsc_pkg::*;
#(
  parameter int unsigned       WIDTH       = XLEN,
  parameter logic [WIDTH-1:0]  MASK  = DIRECT_MASK[WIDTH-1:0]
) (
  input  logic_op_e         op,
  input  logic [WIDTH-1:0]  a,
  input  logic [WIDTH-1:0]  b,
  output logic [WIDTH-1:0]  y
);

  logic [WIDTH-1:0] and_v, or_v;

  assign and_v = a & b;
  assign or_v  = a | b;

  always_comb begin
    unique case (op)
      LOGIC_AND : y = and_v;
      LOGIC_OR  : y = or_v;
      LOGIC_XOR : y = a ^ b;
      LOGIC_XNOR: y = ~(a ^ b);
      LOGIC_BAND: y = (and_v & MASK) | (or_v & ~MASK);
      LOGIC_BOR : y = (or_v & MASK) | (and_v & ~MASK);
      default   : y = '0;
    endcase
  end

endmodule
