// sequencer_tb: the sequencer against a stand-in datapath that accepts
// evaluations when ready (ready drops at random), and returns, in order and
// after a random delay, MSE values from a bowl-shaped error surface and
// derivative values from simple formulas of the vector. Checks: register
// read-back, loader start, vectors and modes sent to the datapath (with
// clamping), the minimum of the initial vectors, derivatives, and 1-D searches
// in all eight directions ending on an MSE increase, the range edge and the
// step limit, against a software model of the same rules. The same runs are
// repeated in image layers 2 and 3, where the usable range shrinks by 2 and 4
// and the layer goes out to the address generators and the loader.
module sequencer_tb;
  import me_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic lb_sel = 0, lb_we = 0;
  logic [5:0] lb_addr = '0;
  logic [31:0] lb_wdata = '0, lb_rdata;
  logic done;
  logic ag_start, ag_ready = 1;
  pe_mode_e ag_mode;
  mv_t ag_vec;
  logic [11:0] ag_mbx;
  logic [2:0] ag_slot;
  logic [1:0] ag_lyr, ld_lyr;
  acc_t result = '0;
  logic result_valid = 0;
  logic ld_start, ld_kind, ld_busy = 0, ld_full = 0;
  logic [11:0] ld_fx;
  logic signed [12:0] ld_fy;
  logic [BC_W-1:0] ld_bc;
  logic [2:0] ld_slot;
  int checks = 0, failures = 0;

  sequencer dut (.*);

  int ax = 17, ay = -9;   // bowl centre
  function automatic longint bowl(input int x, input int y);
    return 1000 + 3 * (x - ax) * (x - ax) + 5 * (y - ay) * (y - ay);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // stand-in datapath
  typedef struct {pe_mode_e m; int x; int y;} op_t;
  op_t ops [$];
  longint res_q [$];
  int due_q [$];
  int cyc = 0, last_due = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    result_valid <= 0;
    if (rst_n && ag_start && ag_ready) begin
      op_t o;
      int d;
      o.m = ag_mode; o.x = int'(ag_vec.x); o.y = int'(ag_vec.y);
      ops.push_back(o);
      d = cyc + 3 + int'($urandom % 10);
      if (d <= last_due) d = last_due + 1;
      last_due = d;
      due_q.push_back(d);
      res_q.push_back(o.m == M_MSE ? bowl(o.x, o.y) : (o.m == M_DX ? 7 * o.x - 11 : -3 * o.y + 5));
    end
    if (due_q.size() > 0 && due_q[0] <= cyc) begin
      void'(due_q.pop_front());
      result <= acc_t'(res_q.pop_front());
      result_valid <= 1;
    end
    ag_ready <= ($urandom % 4) != 0;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic wr(input logic [5:0] a, input logic [31:0] d);
    @(negedge clk); lb_sel = 1; lb_we = 1; lb_addr = a; lb_wdata = d;
    @(negedge clk); lb_sel = 0; lb_we = 0;
  endtask
  task automatic rd(input logic [5:0] a, output logic [31:0] d);
    @(negedge clk); lb_sel = 1; lb_we = 0; lb_addr = a; #1 d = lb_rdata;
    @(negedge clk); lb_sel = 0;
  endtask
  function automatic logic [31:0] pk(input int x, input int y); return {16'(y), 16'(x)}; endfunction
  function automatic int ux(input logic [31:0] w); return int'($signed(w[9:0])); endfunction
  function automatic int uy(input logic [31:0] w); return int'($signed(w[25:16])); endfunction
  int xlo = -127, xhi = 126, ylo = -63, yhi = 62;   // usable range of the layer
  function automatic int clx(input int v); return v < xlo ? xlo : (v > xhi ? xhi : v); endfunction
  function automatic int cly(input int v); return v < ylo ? ylo : (v > yhi ? yhi : v); endfunction

  task automatic cmd(input seq_cmd_e c);
    wr(R_CMD, 32'(c));
    while (!done) @(posedge clk);
    @(negedge clk);
  endtask

  int dx8 [8] = '{1, 1, 0, -1, -1, -1, 0, 1};
  int dy8 [8] = '{0, 1, 1, 1, 0, -1, -1, -1};

  initial begin
    logic [31:0] r;
    int ivs [4][2] = '{'{0, 0}, '{20, -8}, '{200, -100}, '{14, -12}};
    repeat (2) @(posedge clk);
    rst_n = 1;
    // register read back
    wr(R_MBX, 32'd1234); rd(R_MBX, r); check(r == 32'd1234, "MBX");
    wr(R_SLOT, 32'd5); rd(R_SLOT, r); check(r == 32'd5, "SLOT");
    wr(R_LAYER, 32'd3); rd(R_LAYER, r); check(r == 32'd3, "LAYER");
    wr(R_TBSIZE, 32'd16); rd(R_TBSIZE, r); check(r == 32'd16, "TBSIZE");
    wr(R_SWSIZE, 32'd272); rd(R_SWSIZE, r); check(r == 32'd272, "SWSIZE");
    check(ag_lyr == 2'd2 && ld_lyr == 2'd2, "layer 3 to datapath and loader");
    wr(R_LAYER, 32'd1); check(ag_lyr == 2'd0 && ld_lyr == 2'd0, "layer 1");
    check(ag_mbx == 12'd1234 && ag_slot == 3'd5, "AG parameters");
    // loader start
    wr(R_LDFX, 32'd640); wr(R_LDFY, 32'h1FFC0); wr(R_LDBC, 32'd768); wr(R_LDSLOT, 32'd6);
    fork
      wr(R_LDCMD, 32'd1);
      begin @(posedge ld_start); #1 check(ld_kind == 1 && ld_fx == 12'd640 && ld_fy == -13'sd64 && ld_bc == 13'd768 && ld_slot == 3'd6 && ag_slot == 3'd5, "loader command"); end
    join
    ld_busy = 1; rd(R_STATUS, r); check(r[2:1] == 2'b01, "loader busy in status");
    ld_full = 1; rd(R_STATUS, r); check(r[2:1] == 2'b11, "loader full in status");
    fork
      wr(R_LDCMD, 32'd0);
      begin repeat (3) @(posedge clk); check(!ld_start, "loader command ignored while full"); end
    join
    ld_busy = 0; ld_full = 0;
    // initial vector evaluation, with a clamped candidate
    for (int k = 0; k < 4; k++) wr(6'(R_IV0 + 6'(k)), pk(ivs[k][0], ivs[k][1]));
    for (int k = 0; k < 4; k++) begin rd(6'(R_IV0 + 6'(k)), r); check(ux(r) == ivs[k][0] && uy(r) == ivs[k][1], "IV read back"); end
    ops.delete();
    cmd(CMD_INIT);
    check(ops.size() == 4, "INIT issues 4 evaluations");
    begin
      int bx, by; longint be;
      bx = 0; by = 0; be = bowl(0, 0);
      for (int k = 0; k < 4; k++) begin
        check(ops[k].m == M_MSE && ops[k].x == clx(ivs[k][0]) && ops[k].y == cly(ivs[k][1]), $sformatf("INIT op %0d", k));
        if (bowl(clx(ivs[k][0]), cly(ivs[k][1])) < be) begin be = bowl(clx(ivs[k][0]), cly(ivs[k][1])); bx = clx(ivs[k][0]); by = cly(ivs[k][1]); end
      end
      rd(R_BVEC, r); check(ux(r) == bx && uy(r) == by, "INIT best vector");
      rd(R_BMSE, r); check(longint'(r) == be, "INIT best MSE");
    end
    // search vector and differential coefficients
    wr(R_SVEC, pk(-30, 70)); ops.delete(); cmd(CMD_VEC);
    check(ops.size() == 1 && ops[0].x == -30 && ops[0].y == 62, "VEC op clamped");
    rd(R_BMSE, r); check(longint'(r) == bowl(-30, 62), "VEC MSE");
    wr(R_SVEC, pk(9, -4)); ops.delete(); cmd(CMD_DIFF);
    check(ops.size() == 2 && ops[0].m == M_DX && ops[1].m == M_DY && ops[1].x == 9 && ops[1].y == -4, "DIFF ops");
    rd(R_DEX, r); check($signed(r) == 7 * 9 - 11, "DEX");
    rd(R_DEY, r); check($signed(r) == -3 * -4 + 5, "DEY");
    // line searches, in layer 1, 2 and 3
    for (int n = 0; n < 72; n++) begin
      int sx, sy, dir, step, ncyc, bx, by, k;
      longint be;
      if (n == 40 || n == 56) begin
        int l;
        l = n == 40 ? 1 : 2;
        wr(R_LAYER, 32'(l + 1));
        xlo = -(128 >> l) + 1; xhi = (128 >> l) - 2; ylo = -(64 >> l) + 1; yhi = (64 >> l) - 2;
        wr(R_SVEC, pk(-200, 100)); ops.delete(); cmd(CMD_VEC);
        check(ag_lyr == 2'(l) && ops.size() == 1 && ops[0].x == xlo && ops[0].y == yhi,
              $sformatf("layer %0d VEC clamp (%0d,%0d)", l + 1, ops[0].x, ops[0].y));
      end
      dir = n % 8; step = 1 + int'($urandom % 4); ncyc = (n % 5 == 4) ? 2 : 40;
      sx = (n % 3 == 0) ? xhi - 6 : int'($urandom % 200) % (xhi - xlo) + xlo;
      sy = (n % 3 == 0) ? ylo + 3 : int'($urandom % 100) % (yhi - ylo) + ylo;
      wr(R_BVEC, pk(sx, sy)); wr(R_BMSE, 32'(bowl(sx, sy)));
      wr(R_DIR, 32'(dir)); wr(R_STEP, 32'(step)); wr(R_NCYC, 32'(ncyc));
      ops.delete();
      cmd(CMD_LINE);
      bx = sx; by = sy; be = bowl(sx, sy); k = 0;
      forever begin
        int nx, ny;
        nx = bx + dx8[dir] * step; ny = by + dy8[dir] * step;
        if (k >= ncyc || nx < xlo || nx > xhi || ny < ylo || ny > yhi) break;
        k++;
        if (bowl(nx, ny) < be) begin be = bowl(nx, ny); bx = nx; by = ny; end else break;
      end
      rd(R_BVEC, r); check(ux(r) == bx && uy(r) == by, $sformatf("LINE %0d vector (%0d,%0d) exp (%0d,%0d)", n, ux(r), uy(r), bx, by));
      rd(R_BMSE, r); check(longint'(r) == be, "LINE MSE");
      rd(R_NEVAL, r); check(int'(r) == k && ops.size() == k, $sformatf("LINE %0d evaluations %0d exp %0d", n, r, k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
