// adder_tree_tb: evaluations of random length (1..16 clocks), back to back or
// with gaps, with random 18-bit products from 32 PEs; each total must appear
// with result_valid two clocks after the evaluation's last clock.
module adder_tree_tb;
  import me_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  prod_t prod [32];
  logic in_active = 0, in_first = 0, in_last = 0;
  acc_t result;
  logic result_valid;
  int checks = 0, failures = 0;
  longint exp_q [$];
  longint unsigned cyc = 0, last_cyc [$];
  always @(posedge clk) cyc <= cyc + 1;

  adder_tree dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) if (rst_n && result_valid) begin
    longint e;
    longint unsigned lc;
    e = exp_q.pop_front();
    lc = last_cyc.pop_front();
    checks++;
    if (longint'(result) != e || cyc - lc != 2) begin
      failures++; $display("FAIL result %0d exp %0d latency %0d", result, e, cyc - lc);
    end
  end

  initial begin
    for (int k = 0; k < 32; k++) prod[k] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int ev = 0; ev < 300; ev++) begin
      int len;
      longint s;
      len = 1 + int'($urandom % 16);
      s = 0;
      for (int c = 0; c < len; c++) begin
        @(negedge clk);
        in_active = 1; in_first = (c == 0); in_last = (c == len - 1);
        for (int k = 0; k < 32; k++) begin
          prod[k] = (ev == 0) ? prod_t'(-131072) : prod_t'($urandom);
          s += longint'(prod[k]);
        end
        if (c == len - 1) begin exp_q.push_back(s); last_cyc.push_back(cyc); end
      end
      if ($urandom % 2) begin
        @(negedge clk); in_active = 0; in_first = 0; in_last = 0;
        for (int k = 0; k < 32; k++) prod[k] = prod_t'($urandom);
      end
    end
    @(negedge clk); in_active = 0; in_first = 0; in_last = 0;
    repeat (5) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL missing results"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
