// vsc_top: the balanced processor system.
//
// A balanced core with its instruction memory and data memory. A host
// loads a program through the instruction load port, writes the balanced
// input (direct and complementary copies interleaved bit by bit in each
// word) through the data host port, pulses start, waits for halted and
// reads the balanced result back through the same host port. The retire
// port exposes every executed instruction and its register write.
//
// Structure as in the published VSC approach (a balanced processor between an
// instruction memory and a data memory holding direct and complementary
// data); the host ports stand in for the serial link and external memory
// of a full system and are this design's choice.
module vsc_top
  import vsc_pkg::*;
#(
  parameter int unsigned IMEM_WORDS = 65536,
  parameter int unsigned DMEM_WORDS = 4096,
  localparam int unsigned IAW = $clog2(IMEM_WORDS),
  localparam int unsigned DAW = $clog2(DMEM_WORDS)
) (
  input  logic             clk,
  input  logic             rst_n,
  // program load
  input  logic             prog_we,
  input  logic [IAW-1:0]   prog_addr,
  input  logic [XLEN-1:0]  prog_wdata,
  // host data port
  input  logic             host_we,
  input  logic [DAW-1:0]   host_addr,
  input  logic [XLEN-1:0]  host_wdata,
  output logic [XLEN-1:0]  host_rdata,
  // control
  input  logic             start,
  output logic             busy,
  output logic             halted,
  output logic             illegal,
  output retire_t          retire
);

  logic [IAW-1:0]  imem_addr;
  logic [XLEN-1:0] imem_rdata;
  logic [DAW-1:0]  dmem_addr;
  logic            dmem_we;
  logic [3:0]      dmem_be;
  logic [XLEN-1:0] dmem_wdata, dmem_rdata;

  balanced_core #(.IMEM_AW(IAW), .DMEM_AW(DAW)) u_core (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (start),
    .busy       (busy),
    .halted     (halted),
    .illegal    (illegal),
    .imem_addr  (imem_addr),
    .imem_rdata (imem_rdata),
    .dmem_addr  (dmem_addr),
    .dmem_we    (dmem_we),
    .dmem_be    (dmem_be),
    .dmem_wdata (dmem_wdata),
    .dmem_rdata (dmem_rdata),
    .retire     (retire)
  );

  imem #(.WORDS(IMEM_WORDS)) u_imem (
    .clk   (clk),
    .we    (prog_we),
    .waddr (prog_addr),
    .wdata (prog_wdata),
    .raddr (imem_addr),
    .rdata (imem_rdata)
  );

  dmem #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk     (clk),
    .a_addr  (dmem_addr),
    .a_we    (dmem_we),
    .a_be    (dmem_be),
    .a_wdata (dmem_wdata),
    .a_rdata (dmem_rdata),
    .h_addr  (host_addr),
    .h_we    (host_we),
    .h_wdata (host_wdata),
    .h_rdata (host_rdata)
  );

endmodule
