// iram_tb: random program loads and fetches against a shadow copy; a fetch
// returns the word one clock after the address, and holds it while re is low.
module iram_tb;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we = 0, re = 0;
  logic [9:0] waddr = '0, raddr = '0;
  logic [31:0] wdata = '0, rdata;
  logic [31:0] shadow [1024];
  int checks = 0, failures = 0;

  iram dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [31:0] held;
    for (int a = 0; a < 1024; a++) begin
      @(negedge clk); we = 1; waddr = 10'(a); wdata = $urandom; shadow[a] = wdata;
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      re = 1; raddr = 10'($urandom);
      held = shadow[raddr];
      @(posedge clk); #1;
      checks++;
      if (rdata !== held) begin failures++; $display("FAIL fetch %0d", raddr); end
      @(negedge clk); re = 0; raddr = 10'($urandom);
      @(posedge clk); #1;
      checks++;
      if (rdata !== held) begin failures++; $display("FAIL hold"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
