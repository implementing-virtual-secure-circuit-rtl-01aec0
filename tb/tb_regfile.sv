// tb_regfile: writes random values to random registers, reads them back on
// both ports against a shadow array, and checks that register 0 stays zero
// and that reset clears all registers.
module tb_regfile;
  logic        clk = 0, rst_n = 0;
  logic [4:0]  raddr1, raddr2, waddr;
  logic [31:0] rdata1, rdata2, wdata;
  logic        we;
  logic [31:0] shadow [32];
  int checks = 0, failures = 0;

  regfile dut (.*);

  always #5 clk = ~clk;

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = 0; wdata = 0; raddr1 = 0; raddr2 = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    foreach (shadow[i]) shadow[i] = '0;
    for (int i = 0; i < 32; i++) begin
      raddr1 = 5'(i); raddr2 = 5'(31 - i); #1;
      check("after reset p1", rdata1, 0);
      check("after reset p2", rdata2, 0);
    end
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      we = ($urandom % 4) != 0;
      waddr = 5'($urandom);
      wdata = $urandom;
      raddr1 = 5'($urandom);
      raddr2 = (n % 7 == 0) ? waddr : 5'($urandom);
      #1;
      check("read p1", rdata1, shadow[raddr1]);
      check("read p2 (old value on same-cycle write)", rdata2, shadow[raddr2]);
      @(posedge clk);
      if (we && waddr != 0) shadow[waddr] = wdata;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 32; i++) begin
      raddr1 = 5'(i); #1; check("final", rdata1, shadow[i]);
    end
    check("r0 zero", shadow[0], 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
