// mem_interface: memory-load and memory-store datapaths of the core.
//
// Connects the core's byte-addressed load/store requests to a word-wide
// data memory with byte write strobes. Words are big-endian as in SPARC:
// the byte at offset 0 of a word is bits [31:24].
//   store word : all four strobes, data as is (address bits [1:0] ignored)
//   store byte : one strobe, the byte replicated on all four lanes
//   load word  : the memory word
//   load byte  : the addressed byte, zero-extended (LDUB)
// Purely combinational: the memory is read in the same cycle.
//
// The load and store datapaths through this interface follow the published VSC approach;
// the word/byte sizes and the byte order are this design's choices.
module mem_interface
  import vsc_pkg::*;
#(
  parameter int unsigned AW = 12       // word-address width of the memory
) (
  // core side
  input  logic              req,       // load or store this cycle
  input  logic              is_store,
  input  mem_size_e         size,
  input  logic [XLEN-1:0]   addr,      // byte address
  input  logic [XLEN-1:0]   store_data,
  output logic [XLEN-1:0]   load_data,
  // memory side
  output logic [AW-1:0]     mem_addr,  // word address
  output logic              mem_we,
  output logic [3:0]        mem_be,
  output logic [XLEN-1:0]   mem_wdata,
  input  logic [XLEN-1:0]   mem_rdata
);

  logic [1:0] ofs;
  logic [7:0] lbyte;

  assign ofs      = addr[1:0];
  assign mem_addr = addr[AW+1:2];
  assign mem_we   = req && is_store;

  always_comb begin
    if (size == MEM_WORD) begin
      mem_be    = 4'b1111;
      mem_wdata = store_data;
    end else begin
      mem_be    = 4'b1000 >> ofs;
      mem_wdata = {4{store_data[7:0]}};
    end
  end

  always_comb begin
    unique case (ofs)
      2'd0: lbyte = mem_rdata[31:24];
      2'd1: lbyte = mem_rdata[23:16];
      2'd2: lbyte = mem_rdata[15:8];
      default: lbyte = mem_rdata[7:0];
    endcase
    load_data = (size == MEM_WORD) ? mem_rdata : {24'd0, lbyte};
  end

endmodule
