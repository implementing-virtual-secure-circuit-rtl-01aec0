// tb_dmem: random byte-strobed writes from the core port and word writes
// from the host port, checked on both read ports against a shadow copy;
// includes same-word collisions, where the core's bytes must win.
module tb_dmem;
  localparam int WORDS = 64;
  logic        clk = 0;
  logic [5:0]  a_addr, h_addr;
  logic        a_we, h_we;
  logic [3:0]  a_be;
  logic [31:0] a_wdata, a_rdata, h_wdata, h_rdata;
  logic [31:0] shadow [WORDS];
  int checks = 0, failures = 0;

  dmem #(.WORDS(WORDS)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a_we = 0; h_we = 0; a_addr = 0; h_addr = 0; a_be = 0; a_wdata = 0; h_wdata = 0;
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk); h_we = 1; h_addr = 6'(i); h_wdata = $urandom; shadow[i] = h_wdata;
    end
    @(negedge clk); h_we = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      a_addr = 6'($urandom); h_addr = (n % 5 == 0) ? a_addr : 6'($urandom);
      #1;
      check("core read", a_rdata, shadow[a_addr]);
      check("host read", h_rdata, shadow[h_addr]);
      a_we = $urandom % 2; a_be = 4'($urandom); a_wdata = $urandom;
      h_we = $urandom % 2; h_wdata = $urandom;
      @(posedge clk);
      if (h_we) shadow[h_addr] = h_wdata;
      if (a_we) for (int b = 0; b < 4; b++)
        if (a_be[b]) shadow[a_addr][8*b +: 8] = a_wdata[8*b +: 8];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
