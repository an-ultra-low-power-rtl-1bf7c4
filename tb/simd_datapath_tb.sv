// simd_datapath_tb: the SIMD datapath driven by its two address generators.
// The search window of one macroblock and its template are written through
// the cache write ports from the reference image; then random MSE, x- and
// y-derivative evaluations run back to back and every result is compared
// with Eq. (1)-(3) evaluated directly on the image. Back-to-back MSE results
// must come exactly 8 clocks apart, and the first result 5 clocks after the
// last read. The same is then repeated with the window and template of image
// layers 2 and 3 (8x8 and 4x4 blocks, MSE every 4 and 2 clocks).
module simd_datapath_tb;
  import me_pkg::*;
  import tb_ref_pkg::*;
  localparam int X = 512, Y = 256;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0;
  logic [1:0] ready;
  pe_mode_e mode = M_MSE;
  mv_t vec = '0;
  logic [1:0] lyr = '0;
  logic [11:0] mbx = 12'(X);
  sw_addr_t sw_raddr [2][NBANK][2];
  logic [TB_AW-1:0] tb_raddr [2];
  ag_ctrl_t ctrl [2];
  logic sw_we = 0, sw_half = 0, tb_we = 0, tb_whalf = 0;
  sw_addr_t sw_waddr = '0;
  logic [63:0] sw_wdata = '0, tb_wdata = '0;
  logic [TB_AW-1:0] tb_waddr = '0;
  acc_t result;
  logic result_valid;
  int checks = 0, failures = 0;

  for (genvar h = 0; h < 2; h++) begin : g
    addr_gen #(.HALF(1'(h))) u_ag (.clk, .rst_n, .start, .ready(ready[h]), .mode, .lyr, .vec,
                                   .mbx, .slot(3'd2), .sw_raddr(sw_raddr[h]),
                                   .tb_raddr(tb_raddr[h]), .ctrl(ctrl[h]));
  end
  simd_datapath dut (.*);

  longint exp_q [$];
  pe_mode_e mode_q [$];
  longint unsigned cyc = 0, last_res = 0, last_rd = 0;
  int n_mse_pair = 0, nres = 0;
  pe_mode_e prev_mode = M_DX;
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) if (ctrl[0].active && ctrl[0].last) last_rd <= cyc;

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) if (rst_n && result_valid) begin
    longint e;
    pe_mode_e m;
    e = exp_q.pop_front();
    m = mode_q.pop_front();
    checks++;
    if (longint'(result) != e) begin failures++; $display("FAIL mode %0d result %0d exp %0d", m, result, e); end
    if (m == M_MSE && prev_mode == M_MSE && nres >= 2) begin
      checks++; n_mse_pair++;
      if (cyc - last_res != longint'(8 >> lyr)) begin failures++; $display("FAIL MSE spacing %0d", cyc - last_res); end
    end
    prev_mode = m;
    last_res = cyc;
    nres++;
  end

  // search window and template of layer l for the block at layer coordinates
  // (X >> l, Y >> l): buffer column = layer column + (128 >> l), window row =
  // layer row - (Y >> l) + (64 >> l)
  task automatic load(input int l);
    int xl, yl;
    xl = X >> l; yl = Y >> l;
    for (int wr = 0; wr < (144 >> l); wr++)
      for (int w = 0; w < (272 >> l) / 8 + 1; w++) begin
        int bc;
        bc = xl + 8 * w;
        @(negedge clk);
        sw_we = 1; sw_half = 1'(wr % 2);
        sw_waddr = sw_addr_t'(((bc / 8) % 36) * 72 + wr / 2);
        sw_wdata = bus_word(0, (bc - (128 >> l)) / 8, yl - (64 >> l) + wr, l);
      end
    // template in slot 2: two words per row in layer 1, one in layers 2, 3
    for (int j = 0; j < (16 >> l); j++)
      for (int w = 0; w < (l == 0 ? 2 : 1); w++) begin
        @(negedge clk);
        sw_we = 0; tb_we = 1; tb_waddr = 7'(32 + j); tb_whalf = 1'(w);
        tb_wdata = bus_word(1, xl / 8 + w, yl + j, l);
      end
    @(negedge clk); tb_we = 0; sw_we = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    load(0);
    // a first MSE alone, to measure latency
    start = 1; mode = M_MSE; vec.x = 10'(MVX); vec.y = 10'(MVY);
    exp_q.push_back(ref_mse(X, Y, MVX, MVY)); mode_q.push_back(M_MSE);
    @(negedge clk); start = 0;
    wait (result_valid);
    checks++;
    if (cyc - last_rd != 5) begin failures++; $display("FAIL latency %0d", cyc - last_rd); end
    @(negedge clk);
    for (int l = 0; l < 3; l++) begin
      int rx, ry;
      rx = 128 >> l; ry = 64 >> l;
      if (l > 0) begin
        start = 0;
        repeat (20) @(posedge clk);
        load(l);
        lyr = 2'(l); mbx = 12'(X >> l); nres = 0;
      end
      for (int n = 0; n < 200; n++) begin
        int vx, vy;
        pe_mode_e m;
        vx = (n == 0) ? -rx + 1 : (n == 1) ? rx - 2 : int'($urandom % (2 * rx - 2)) - rx + 1;
        vy = (n == 0) ? -ry + 1 : (n == 1) ? ry - 2 : int'($urandom % (2 * ry - 2)) - ry + 1;
        m = (n % 4 == 3) ? pe_mode_e'(1 + $urandom % 2) : M_MSE;
        start = 1; mode = m; vec.x = 10'(vx); vec.y = 10'(vy);
        exp_q.push_back(m == M_MSE ? ref_mse(X >> l, Y >> l, vx, vy, l)
                                   : ref_diff(X >> l, Y >> l, vx, vy, m == M_DX ? 0 : 1, l));
        mode_q.push_back(m);
        #1;
        while (!ready[0]) @(negedge clk);
        @(negedge clk);
      end
    end
    start = 0;
    repeat (30) @(posedge clk);
    checks++;
    if (exp_q.size() != 0 || n_mse_pair == 0) begin failures++; $display("FAIL results missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
