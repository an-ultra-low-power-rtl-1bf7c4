// pe_tb: random operands in all three modes; the product must appear two
// clocks later and equal (T-S)^2 or (T-S)(S+1 - S-1), and 0 when not valid.
module pe_tb;
  import me_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0;
  pe_mode_e mode = M_MSE;
  pix_t t = '0, sc = '0, sm = '0, sp = '0;
  prod_t prod;
  logic out_valid;
  int checks = 0, failures = 0;
  int exp_q [$];
  int vld_q [$];

  pe dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      int e;
      @(negedge clk);
      in_valid = ($urandom % 4) != 0;
      mode = pe_mode_e'($urandom % 3);
      if (n < 4) begin t = 8'hFF; sc = 8'h00; sm = 8'hFF; sp = 8'h00; end
      else begin t = 8'($urandom); sc = 8'($urandom); sm = 8'($urandom); sp = 8'($urandom); end
      e = (mode == M_MSE) ? (int'(t) - int'(sc)) * (int'(t) - int'(sc))
                          : (int'(t) - int'(sc)) * (int'(sp) - int'(sm));
      exp_q.push_back(in_valid ? e : 0);
      vld_q.push_back(int'(in_valid));
      @(posedge clk); #1;
      if (exp_q.size() == 2) begin
        int ee, vv;
        ee = exp_q.pop_front();
        vv = vld_q.pop_front();
        checks++;
        if (int'(prod) != ee || int'(out_valid) != vv) begin
          failures++; $display("FAIL n=%0d prod %0d exp %0d", n, prod, ee);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
