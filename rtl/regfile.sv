// regfile: register file of the balanced processor.
//
// NREGS registers of XLEN bits, two combinational read ports and one write
// port that writes on the rising clock edge. Register 0 always reads zero
// and ignores writes: balanced programs use it as the all-zero operand
// that pre-charges a balanced gate. A write and a read of the same
// register in one cycle return the old value (the single-cycle core never
// needs bypassing). Reset clears every register.
//
// The zero register follows the published VSC programs; the flat (unwindowed)
// organisation and the reset are this design's choices.
module regfile
  import vsc_pkg::*;
#(
  parameter int unsigned N = NREGS,
  parameter int unsigned W = XLEN,
  localparam int unsigned A = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [A-1:0]  raddr1,
  output logic [W-1:0]  rdata1,
  input  logic [A-1:0]  raddr2,
  output logic [W-1:0]  rdata2,
  input  logic          we,
  input  logic [A-1:0]  waddr,
  input  logic [W-1:0]  wdata
);

  logic [W-1:0] regs [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(N); i++) regs[i] <= '0;
    end else if (we && waddr != '0) begin
      regs[waddr] <= wdata;
    end
  end

  assign rdata1 = (raddr1 == '0) ? '0 : regs[raddr1];
  assign rdata2 = (raddr2 == '0) ? '0 : regs[raddr2];

endmodule
