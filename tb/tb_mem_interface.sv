// tb_mem_interface: stores and loads words and bytes through the interface
// into a small word memory modelled here, checking big-endian byte lanes,
// write strobes, zero extension and that no write happens without a store.
module tb_mem_interface;
  import vsc_pkg::*;

  localparam int AW = 4;
  logic              req, is_store;
  mem_size_e         size;
  logic [31:0]       addr, store_data, load_data;
  logic [AW-1:0]     mem_addr;
  logic              mem_we;
  logic [3:0]        mem_be;
  logic [31:0]       mem_wdata, mem_rdata;
  logic [31:0]       mem [16];
  logic [7:0]        ref_bytes [64];   // byte-addressed reference
  int checks = 0, failures = 0;

  mem_interface #(.AW(AW)) dut (.*);

  assign mem_rdata = mem[mem_addr];

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: addr=%h got %h expected %h", what, addr, got, exp);
    end
  endtask

  // apply a write to the model memory the way a byte-strobed RAM would
  task automatic mem_write();
    if (mem_we)
      for (int i = 0; i < 4; i++)
        if (mem_be[i]) mem[mem_addr][8*i +: 8] = mem_wdata[8*i +: 8];
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (mem[i]) mem[i] = '0;
    foreach (ref_bytes[i]) ref_bytes[i] = '0;
    for (int n = 0; n < 2000; n++) begin
      req = 1; is_store = $urandom % 2;
      size = ($urandom % 2) ? MEM_BYTE : MEM_WORD;
      addr = ($urandom % 64);
      if (size == MEM_WORD) addr[1:0] = 2'b00;
      store_data = $urandom;
      #1;
      if (is_store) begin
        checks++;
        if (!mem_we) begin failures++; $display("FAIL no write strobe"); end
        mem_write();
        if (size == MEM_WORD)
          for (int i = 0; i < 4; i++) ref_bytes[addr + i] = store_data[31 - 8*i -: 8];
        else
          ref_bytes[addr] = store_data[7:0];
      end else begin
        checks++;
        if (mem_we) begin failures++; $display("FAIL write on load"); end
        if (size == MEM_WORD)
          check("ld", load_data, {ref_bytes[addr], ref_bytes[addr+1], ref_bytes[addr+2], ref_bytes[addr+3]});
        else
          check("ldub", load_data, {24'd0, ref_bytes[addr]});
      end
      #1;
    end
    req = 0; is_store = 1; #1;
    checks++;
    if (mem_we) begin failures++; $display("FAIL write without request"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
