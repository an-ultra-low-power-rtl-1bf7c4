// template_buffer_tb: writes 64-bit halves at random and checks that each
// 128-bit read returns both halves of the addressed row one clock later.
module template_buffer_tb;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we = 0, whalf = 0;
  logic [6:0] waddr = '0, raddr = '0;
  logic [63:0] wdata = '0;
  logic [127:0] rdata;
  logic [63:0] lo [96], hi [96];
  int checks = 0, failures = 0;

  template_buffer dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [127:0] e;
    for (int a = 0; a < 96; a++)
      for (int h = 0; h < 2; h++) begin
        @(negedge clk); we = 1; waddr = 7'(a); whalf = h[0]; wdata = {$urandom, $urandom};
        if (h == 0) lo[a] = wdata; else hi[a] = wdata;
      end
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      we = ($urandom % 2) == 1; waddr = 7'($urandom % 96); whalf = 1'($urandom);
      wdata = {$urandom, $urandom}; raddr = 7'($urandom % 96);
      e = {hi[raddr], lo[raddr]};
      if (we) begin if (whalf) hi[waddr] = wdata; else lo[waddr] = wdata; end
      @(posedge clk); #1;
      checks++;
      if (rdata !== e) begin failures++; $display("FAIL row %0d", raddr); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
