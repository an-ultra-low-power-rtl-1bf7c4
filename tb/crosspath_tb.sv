// crosspath_tb: fills the bank ports with the pixels a row read at start
// column c would return (column x in bank x mod 8, port 0 the lower of its
// two columns) and checks that PE k receives the pixel of column c + k.
module crosspath_tb;
  import me_pkg::*;
  logic [2:0] rot;
  pix_t sw_pix [NBANK][2];
  pix_t pe_pix [NPE_HALF];
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  crosspath dut (.*);

  function automatic pix_t colpix(input int x, input int salt);
    return pix_t'(x * 13 + salt);
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int n = 0; n < 400; n++) begin
      int c, salt;
      c = int'($urandom % 2000);
      salt = int'($urandom % 256);
      rot = 3'(c % 8);
      // each column c..c+15 lands in bank x%8, port (x-c)/8
      for (int x = c; x < c + 16; x++) sw_pix[x % 8][(x - c) / 8] = colpix(x, salt);
      @(posedge clk); #1;
      for (int k = 0; k < 16; k++) begin
        checks++;
        if (pe_pix[k] !== colpix(c + k, salt)) begin
          failures++; $display("FAIL c=%0d k=%0d", c, k);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
