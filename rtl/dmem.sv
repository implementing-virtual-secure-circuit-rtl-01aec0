// dmem: data memory of the balanced processor.
//
// WORDS words of 32 bits with two ports. Port a belongs to the core: a
// combinational read and a byte-strobed write on the rising clock edge.
// Port h belongs to the host that places the balanced plaintext (direct
// and complementary copies side by side) and collects the balanced result:
// a combinational read and a whole-word write. When both ports write the
// same word in one cycle, the core's bytes win. The memory is not reset.
// The two ports and the 4 Ki-word (16 KiB) default are this design's
// choices.
module dmem
  import vsc_pkg::*;
#(
  parameter int unsigned WORDS = 4096,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic             clk,
  // core port
  input  logic [AW-1:0]    a_addr,
  input  logic             a_we,
  input  logic [3:0]       a_be,
  input  logic [XLEN-1:0]  a_wdata,
  output logic [XLEN-1:0]  a_rdata,
  // host port
  input  logic [AW-1:0]    h_addr,
  input  logic             h_we,
  input  logic [XLEN-1:0]  h_wdata,
  output logic [XLEN-1:0]  h_rdata
);

  logic [XLEN-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (h_we) mem[h_addr] <= h_wdata;
    if (a_we) begin
      for (int i = 0; i < 4; i++)
        if (a_be[i]) mem[a_addr][8*i +: 8] <= a_wdata[8*i +: 8];
    end
  end

  assign a_rdata = mem[a_addr];
  assign h_rdata = mem[h_addr];

endmodule
