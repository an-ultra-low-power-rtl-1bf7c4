// simd_half_tb: one datapath half with its control word, bank data, template
// row and the opposite half's rows driven directly. Each read fetches 16
// pixels of a random row at a random start column (bank data laid out by the
// column interleave). The testbench checks the exported current and previous
// rows, and every PE product three clocks after the control word: MSE terms,
// x-derivative terms formed over a pair of reads (start column -1, then +1)
// and y-derivative terms with the centre from this or the previous read and
// neighbours from the opposite half. Reads of layers 2 and 3 must leave the
// PEs beyond the 8- or 4-pixel block width at zero.
module simd_half_tb;
  import me_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  ag_ctrl_t ctrl = '0;
  pix_t sw_rd [NBANK][2];
  logic [127:0] tb_row = '0;
  pix_t opp_cur [NPE_HALF], opp_prev [NPE_HALF];
  pix_t own_cur [NPE_HALF], own_prev [NPE_HALF];
  ag_ctrl_t ctrl_d;
  prod_t prod [NPE_HALF];
  int checks = 0, failures = 0;

  simd_half dut (.*);

  typedef struct {ag_ctrl_t c; int cs; int y; int t [16]; int s [16]; int oc [16]; int op [16];} rd_t;
  rd_t rd [$];

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic int expect_prod(input rd_t r, input rd_t p, input int k);
    int c, a, b;
    if (!r.c.pvalid || k >= (16 >> r.c.lyr)) return 0;
    case (r.c.mode)
      M_MSE: return (r.t[k] - r.s[k]) * (r.t[k] - r.s[k]);
      M_DX: begin
        // p started one column left of centre, r one column right
        c = (k == 0) ? p.s[1] : r.s[k-1];
        return (r.t[k] - c) * (r.s[k] - p.s[k]);
      end
      default: begin
        c = r.c.dy_cur ? r.s[k] : p.s[k];
        a = r.op[k]; b = r.oc[k];
        return (r.t[k] - c) * (b - a);
      end
    endcase
  endfunction

  initial begin
    int dxphase = 0;
    for (int b = 0; b < 8; b++) begin sw_rd[b][0] = '0; sw_rd[b][1] = '0; end
    for (int k = 0; k < 16; k++) begin opp_cur[k] = '0; opp_prev[k] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 1500; i++) begin
      rd_t r;
      @(negedge clk);
      // check products of read i-3 and the rows of read i-2 (data presented last clock)
      if (i >= 3) begin
        for (int k = 0; k < 16; k++) begin
          checks++;
          if (int'(prod[k]) != expect_prod(rd[i-3], rd[i-4 < 0 ? 0 : i-4], k)) begin
            failures++; $display("FAIL read %0d mode %0d k %0d prod %0d exp %0d", i-3, rd[i-3].c.mode, k, prod[k], expect_prod(rd[i-3], rd[i-4 < 0 ? 0 : i-4], k));
          end
        end
      end
      // new control word for read i
      if (dxphase == 1) begin
        r.c = rd[i-1].c; r.c.pvalid = 1; r.y = rd[i-1].y; r.cs = rd[i-1].cs + 2; dxphase = 0;
      end else begin
        r.c = '0;
        r.c.mode = pe_mode_e'($urandom % 3);
        r.y = int'($urandom % 500);
        r.cs = int'($urandom % 1000);
        r.c.pvalid = (r.c.mode != M_DX) && (($urandom % 8) != 0);
        r.c.dy_cur = 1'($urandom);
        r.c.lyr = 2'($urandom % 3);
        if (r.c.mode == M_DX) dxphase = 1;
      end
      r.c.active = 1;
      r.c.rot = 3'(r.cs % 8);
      for (int k = 0; k < 16; k++) begin
        r.s[k]  = rpix(r.cs + k, r.y);
        r.t[k]  = cpix(k, r.y);
        r.oc[k] = int'($urandom % 256);
        r.op[k] = int'($urandom % 256);
      end
      rd.push_back(r);
      ctrl = r.c;
      // bank data, template row and opposite rows of read i-1
      if (i >= 1) begin
        for (int k = 0; k < 16; k++) begin
          sw_rd[(rd[i-1].cs + k) % 8][k / 8] = pix_t'(rd[i-1].s[k]);
          tb_row[8*k +: 8] = 8'(rd[i-1].t[k]);
          opp_cur[k]  = pix_t'(rd[i-1].oc[k]);
          opp_prev[k] = pix_t'(rd[i-1].op[k]);
        end
      end
      #1;
      if (i >= 2) begin
        for (int k = 0; k < 16; k++) begin
          checks++;
          if (int'(own_cur[k]) != rd[i-1].s[k] || int'(own_prev[k]) != rd[i-2].s[k]) begin
            failures++; $display("FAIL rows read %0d k %0d", i-1, k);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
