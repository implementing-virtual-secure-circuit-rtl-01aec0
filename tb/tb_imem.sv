// tb_imem: loads random words through the load port and reads them back
// through the fetch port (small memory via parameter override).
module tb_imem;
  localparam int WORDS = 256;
  logic        clk = 0, we;
  logic [7:0]  waddr, raddr;
  logic [31:0] wdata, rdata;
  logic [31:0] shadow [WORDS];
  int checks = 0, failures = 0;

  imem #(.WORDS(WORDS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = 0; wdata = 0; raddr = 0;
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk); we = 1; waddr = 8'(i); wdata = $urandom; shadow[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 1000; n++) begin
      raddr = 8'($urandom); #1;
      checks++;
      if (rdata !== shadow[raddr]) begin
        failures++; $display("FAIL addr %0d got %h expected %h", raddr, rdata, shadow[raddr]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
