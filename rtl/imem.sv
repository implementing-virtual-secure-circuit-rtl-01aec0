// imem: instruction memory of the balanced processor.
//
// WORDS words of 32 bits. The core reads one instruction per cycle through
// a combinational read port; a host writes the program through a load port
// on the rising clock edge before starting the core. The memory is not
// reset. The default of 64 Ki words (256 KiB) is this design's choice,
// large enough for an unrolled bitsliced AES in balanced form.
module imem
  import vsc_pkg::*;
#(
  parameter int unsigned WORDS = 65536,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic             clk,
  // load port
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [XLEN-1:0]  wdata,
  // fetch port
  input  logic [AW-1:0]    raddr,
  output logic [XLEN-1:0]  rdata
);

  logic [XLEN-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];

endmodule
