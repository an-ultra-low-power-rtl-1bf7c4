// sw_sram_tb: random writes and dual-port reads against a shadow copy of the
// memory; each read port must return the addressed word one clock later,
// including the old word on a same-clock read and write.
module sw_sram_tb;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we = 0;
  logic [11:0] waddr = '0, raddr0 = '0, raddr1 = '0;
  logic [7:0]  wdata = '0, rdata0, rdata1;
  logic [7:0]  shadow [4096];
  int checks = 0, failures = 0;

  sw_sram dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [7:0] e0, e1;
    // fill everything once
    for (int a = 0; a < 4096; a++) begin
      @(negedge clk); we = 1; waddr = 12'(a); wdata = 8'(a * 7 + (a >> 8)); shadow[a] = wdata;
    end
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      we = ($urandom % 2) == 1;
      waddr = 12'($urandom); wdata = 8'($urandom);
      raddr0 = (n % 5 == 0) ? waddr : 12'($urandom);
      raddr1 = 12'($urandom);
      e0 = shadow[raddr0]; e1 = shadow[raddr1];
      if (we) shadow[waddr] = wdata;
      @(posedge clk); #1;
      checks += 2;
      if (rdata0 !== e0) begin failures++; $display("FAIL port0 %h: %h exp %h", raddr0, rdata0, e0); end
      if (rdata1 !== e1) begin failures++; $display("FAIL port1 %h: %h exp %h", raddr1, rdata1, e1); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
