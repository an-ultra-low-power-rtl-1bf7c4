// addr_gen_tb: both address generators (even and odd half) run random
// evaluations back to back. For every read clock the testbench works out,
// from the window geometry alone, which window row and start column the half
// must read, and checks that each of the 16 PE columns finds its pixel at the
// right bank, port and word, plus the template row, the control word and the
// number of clocks (MSE 8, DX 16, DY 9 in layer 1; half or a quarter of the
// rows in layers 2 and 3).
module addr_gen_tb;
  import me_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0;
  logic [1:0] ready;
  pe_mode_e mode = M_MSE;
  logic [1:0] lyr = '0;
  mv_t vec = '0;
  logic [11:0] mbx = '0;
  logic [2:0] slot = '0;
  sw_addr_t sw_raddr [2][NBANK][2];
  logic [TB_AW-1:0] tb_raddr [2];
  ag_ctrl_t ctrl [2];
  int checks = 0, failures = 0;

  for (genvar h = 0; h < 2; h++) begin : g
    addr_gen #(.HALF(1'(h))) dut (.clk, .rst_n, .start, .ready(ready[h]), .mode, .lyr, .vec, .mbx, .slot,
                                  .sw_raddr(sw_raddr[h]), .tb_raddr(tb_raddr[h]), .ctrl(ctrl[h]));
  end

  typedef struct {int wr; int cs; int j; bit pv; bit cur; bit first; bit last; pe_mode_e m; int slot; int l;} rd_t;
  rd_t exp_q [2][$];

  function automatic int exp_addr(input int col, input int wr);
    return ((col / 8) % 36) * 72 + wr / 2;
  endfunction

  task automatic plan(input pe_mode_e m, input int vx, input int vy, input int x, input int sl,
                      input int l);
    int nb = 16 >> l, r0 = (64 >> l) + vy, bc = x + (128 >> l) + vx;
    for (int h = 0; h < 2; h++) begin
      rd_t list [$];
      rd_t r;
      r.m = m; r.slot = sl; r.cur = 0; r.l = l;
      if (m == M_DY) begin
        for (int t = 0; t <= nb / 2; t++) begin
          int q = r0 - 1 + 2 * t;
          r.cur = ((q % 2) == h);
          r.wr = r.cur ? q : q + 1;
          r.cs = bc;
          r.pv = (t > 0);
          r.j  = (t == 0) ? 0 : (r.cur ? q - r0 : q - 1 - r0);
          list.push_back(r);
        end
      end else begin
        for (int j = 0; j < nb; j++) if (((r0 + j) % 2) == h) begin
          r.wr = r0 + j; r.j = j;
          if (m == M_DX) begin
            r.cs = bc - 1; r.pv = 0; list.push_back(r);
            r.cs = bc + 1; r.pv = 1; list.push_back(r);
          end else begin
            r.cs = bc; r.pv = 1; list.push_back(r);
          end
        end
      end
      foreach (list[i]) begin
        list[i].first = (i == 0);
        list[i].last  = (i == list.size() - 1);
        exp_q[h].push_back(list[i]);
      end
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // checker
  int nact = 0;
  always @(negedge clk) if (rst_n) begin
    for (int h = 0; h < 2; h++) if (ctrl[h].active) begin
      rd_t r;
      bit ok;
      ok = 1;
      if (exp_q[h].size() == 0) begin failures++; $display("FAIL unexpected read"); end
      else begin
        r = exp_q[h].pop_front();
        for (int k = 0; k < 16; k++) begin
          int col;
          col = r.cs + k;
          if (int'(sw_raddr[h][col % 8][k / 8]) != exp_addr(col, r.wr)) ok = 0;
        end
        if (ctrl[h].rot != 3'(r.cs % 8)) ok = 0;
        if (r.pv && int'(tb_raddr[h]) != r.slot * 16 + r.j) ok = 0;
        if (ctrl[h].pvalid != r.pv || ctrl[h].first != r.first || ctrl[h].last != r.last) ok = 0;
        if (ctrl[h].mode != r.m || int'(ctrl[h].lyr) != r.l) ok = 0;
        if (r.m == M_DY && ctrl[h].dy_cur != r.cur) ok = 0;
        checks++;
        if (!ok) begin failures++; $display("FAIL half %0d mode %0d row %0d cs %0d j %0d tb %0d pv %0d/%0d f %0d/%0d l %0d/%0d rot %0d a0 %0d exp %0d", h, r.m, r.wr, r.cs, r.j, tb_raddr[h], ctrl[h].pvalid, r.pv, ctrl[h].first, r.first, ctrl[h].last, r.last, ctrl[h].rot, sw_raddr[h][r.cs%8][0], exp_addr(r.cs, r.wr)); end
      end
    end
    if (ctrl[0].active) nact++;
  end

  initial begin
    int total = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      pe_mode_e m;
      int vx, vy, x, sl, l, rx, ry;
      m  = pe_mode_e'($urandom % 3);
      l  = (n < 150) ? 0 : int'($urandom % 3);
      rx = 128 >> l; ry = 64 >> l;
      vx = (n % 50 == 0) ? -rx + 1 : (n % 50 == 1) ? rx - 2 : int'($urandom % (2 * rx - 2)) - rx + 1;
      vy = (n % 50 == 0) ? -ry + 1 : (n % 50 == 1) ? ry - 2 : int'($urandom % (2 * ry - 2)) - ry + 1;
      x  = (16 >> l) * int'($urandom % 120);
      sl = int'($urandom % 6);
      @(negedge clk);
      start = 1; mode = m; lyr = 2'(l); vec.x = 10'(vx); vec.y = 10'(vy); mbx = 12'(x); slot = 3'(sl);
      plan(m, vx, vy, x, sl, l);
      total += (m == M_MSE) ? (8 >> l) : (m == M_DX) ? (16 >> l) : (8 >> l) + 1;
      #1;
      while (!ready[0]) @(negedge clk);
      @(posedge clk);
      checks++;
      if (ready[1] != ready[0]) begin failures++; $display("FAIL ready mismatch"); end
      // gaps between evaluations now and then
      if ((n % 7) == 3) begin @(negedge clk); start = 0; repeat (3) @(posedge clk); end
    end
    @(negedge clk); start = 0;
    repeat (20) @(posedge clk);
    checks++;
    if (nact != total) begin failures++; $display("FAIL active clocks %0d exp %0d", nact, total); end
    checks++;
    if (exp_q[0].size() != 0 || exp_q[1].size() != 0) begin failures++; $display("FAIL reads missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
