// me_top_tb: end-to-end test of the motion estimation processor at its
// default sizes. The testbench plays the embedded controller: it loads the
// full 272x144 search window of the first macroblock over the MemoryBus from
// a frame memory model, then runs the gradient descent search on a row of
// macroblocks: initial vector evaluation, differential coefficients, a line
// search in the quantised steepest-descent direction, repeated until the
// direction no longer changes, and a final search vector evaluation. While
// one macroblock is searched, the next search window stripe and template are
// loaded. Every result register is compared with golden values computed from
// the equations in tb_ref_pkg; the 8-clock evaluation rate is checked, and
// each mechanism (back-to-back evaluations, concurrent loading, bus stalls,
// both ways a line search ends, layer switches, a loader command queued
// behind a running one) is counted and must occur.
// Last, one macroblock is searched hierarchically: in layer 3 (4x4 block,
// 1/16 of the pixels), then layer 2 (8x8) starting from twice the layer-3
// vector, then layer 1 starting from twice the layer-2 vector, each with its
// own window and template loaded in layer coordinates.
module me_top_tb;
  import me_pkg::*;
  import tb_ref_pkg::*;

  localparam int NMB  = 4;      // macroblocks searched
  localparam int X0   = 256;    // first macroblock column
  localparam int Y0   = 128;    // macroblock row

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        lb_sel = 0, lb_we = 0;
  logic [5:0]  lb_addr = '0;
  logic [31:0] lb_wdata = '0, lb_rdata;
  logic        seq_done;
  logic        iram_we = 0, iram_re = 0;
  logic [9:0]  iram_waddr = '0, iram_raddr = '0;
  logic [31:0] iram_wdata = '0, iram_rdata;
  logic        mb_req_valid, mb_req_ready, mb_req_frame, mb_rsp_valid;
  logic [1:0]  mb_req_layer;
  logic [8:0]  mb_req_x;
  logic signed [12:0] mb_req_y;
  logic [63:0] mb_rsp_data;
  int          n_stall;

  me_top dut (.*);

  frame_mem_model #(.LAT(4), .STALL(1'b1)) u_mem (
    .clk, .req_valid(mb_req_valid), .req_ready(mb_req_ready), .req_frame(mb_req_frame),
    .req_layer(mb_req_layer),
    .req_x(mb_req_x), .req_y(mb_req_y), .rsp_valid(mb_rsp_valid), .rsp_data(mb_rsp_data),
    .n_stall
  );

  int checks = 0, failures = 0;
  longint unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- local bus access (shared by two threads) ----------------
  semaphore bus = new(1);

  task automatic lb_write(input logic [5:0] a, input logic [31:0] d);
    bus.get(1);
    @(negedge clk);
    lb_sel = 1; lb_we = 1; lb_addr = a; lb_wdata = d;
    @(negedge clk);
    lb_sel = 0; lb_we = 0;
    bus.put(1);
  endtask

  task automatic lb_read(input logic [5:0] a, output logic [31:0] d);
    bus.get(1);
    @(negedge clk);
    lb_sel = 1; lb_we = 0; lb_addr = a;
    #1 d = lb_rdata;
    @(negedge clk);
    lb_sel = 0;
    bus.put(1);
  endtask

  function automatic logic [31:0] pk(input int x, input int y);
    return {16'(y), 16'(x)};
  endfunction
  function automatic int ux(input logic [31:0] w); return int'($signed(w[9:0]));  endfunction
  function automatic int uy(input logic [31:0] w); return int'($signed(w[25:16])); endfunction

  // ---------------- mechanism monitors ----------------
  int n_b2b = 0, n_conc = 0, n_sw_wr = 0, n_tb_wr = 0;
  int seq_busy_clk = 0, dp_busy_clk = 0, n_eval = 0;
  int n_queued = 0, n_layer = 0, n_init = 0, n_vec = 0, n_diff = 0, n_line = 0, n_stop_mse = 0, n_stop_range = 0, n_dir_same = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.ag_start && dut.ag_ready[0] && dut.ctrl[0].active) n_b2b++;
    if (dut.sw_we && dut.ctrl[0].active) n_conc++;
    if (dut.sw_we) n_sw_wr++;
    if (dut.tb_we) n_tb_wr++;
    if (dut.u_ld.start && dut.ld_busy && !dut.ld_full) n_queued++;
    if (dut.u_seq.state != 0) seq_busy_clk++;
    if (dut.ctrl[0].active) dp_busy_clk++;
    if (dut.ag_start && dut.ag_ready[0]) n_eval++;
  end

  // ---------------- controller tasks ----------------
  task automatic wait_loader();
    logic [31:0] s;
    do lb_read(R_STATUS, s); while (s[1]);
  endtask

  // hands a command to the loader once its queue has room
  task automatic loader_cmd(input int kind);
    logic [31:0] s;
    do lb_read(R_STATUS, s); while (s[2]);
    lb_write(R_LDCMD, 32'(kind));
  endtask

  // a stripe of the window in layer l+1: buffer column = column + (128 >> l)
  task automatic load_stripe(input int fx, input int fy, input int l = 0, input bit wt = 1);
    lb_write(R_LDFX, 32'(fx));
    lb_write(R_LDFY, 32'(fy));
    lb_write(R_LDBC, 32'(fx + (128 >> l)));
    loader_cmd(0);
    if (wt) wait_loader();
  endtask

  task automatic load_tb(input int mx, input int my, input int slot);
    lb_write(R_LDSLOT, 32'(slot));
    lb_write(R_LDFX, 32'(mx));
    lb_write(R_LDFY, 32'(my));
    loader_cmd(1);
    wait_loader();
  endtask

  // runs a command; returns clocks from the command write to done
  task automatic run_cmd(input seq_cmd_e c, output int clocks);
    longint unsigned t0;
    bus.get(1);
    @(negedge clk);
    lb_sel = 1; lb_we = 1; lb_addr = R_CMD; lb_wdata = 32'(c);
    t0 = cyc;
    @(negedge clk);
    lb_sel = 0; lb_we = 0;
    bus.put(1);
    while (!seq_done) @(posedge clk);
    clocks = int'(cyc - t0);
    @(negedge clk);
  endtask

  // usable vector range in layer l+1
  function automatic int xlo(input int l); return -(128 >> l) + 1; endfunction
  function automatic int xhi(input int l); return (128 >> l) - 2;  endfunction
  function automatic int ylo(input int l); return -(64 >> l) + 1;  endfunction
  function automatic int yhi(input int l); return (64 >> l) - 2;   endfunction
  function automatic int clx(input int v, input int l = 0);
    return v < xlo(l) ? xlo(l) : (v > xhi(l) ? xhi(l) : v);
  endfunction
  function automatic int cly(input int v, input int l = 0);
    return v < ylo(l) ? ylo(l) : (v > yhi(l) ? yhi(l) : v);
  endfunction

  function automatic int quant_dir(input longint gx, input longint gy);
    longint ax = gx < 0 ? -gx : gx, ay = gy < 0 ? -gy : gy;
    if (ay * 5 < ax * 2) return gx > 0 ? 0 : 4;
    if (ax * 5 < ay * 2) return gy > 0 ? 2 : 6;
    if (gx > 0) return gy > 0 ? 1 : 7;
    return gy > 0 ? 3 : 5;
  endfunction

  int dirx [8] = '{1, 1, 0, -1, -1, -1, 0, 1};
  int diry [8] = '{0, 1, 1, 1, 0, -1, -1, -1};

  // active datapath clocks during one command
  int act_cnt, act_first, act_last;
  bit act_on = 0;
  always @(posedge clk) if (act_on && dut.ctrl[0].active) begin
    if (act_cnt == 0) act_first = int'(cyc);
    act_last = int'(cyc);
    act_cnt++;
  end

  // ---------------- one macroblock ----------------
  // (mx, my) and all vectors are in coordinates of layer l+1
  task automatic search_mb(input int mx, input int my, input int slot, input int iv[4][2],
                           input int step, output int fvx, output int fvy, input int l = 0);
    logic [31:0] r;
    int clocks, bx, by, dir, pdir;
    longint be, e, gx, gy;
    int ivx [4], ivy [4];
    int sb0, db0, ne0;
    sb0 = seq_busy_clk; db0 = dp_busy_clk; ne0 = n_eval;
    lb_write(R_MBX, 32'(mx));
    lb_write(R_SLOT, 32'(slot));
    lb_write(R_STEP, 32'(step));
    lb_write(R_NCYC, 32'd40);
    for (int k = 0; k < 4; k++) begin
      ivx[k] = clx(iv[k][0], l); ivy[k] = cly(iv[k][1], l);
      lb_write(6'(R_IV0 + 6'(k)), pk(iv[k][0], iv[k][1]));
    end
    // Step 1: start vector
    act_cnt = 0; act_on = 1;
    run_cmd(CMD_INIT, clocks);
    act_on = 0;
    n_init++;
    check(act_cnt == 4 * (8 >> l) && act_last - act_first == 4 * (8 >> l) - 1,
          $sformatf("INIT: 4 MSE in %0d clocks (%0d active, span %0d)", 4 * (8 >> l), act_cnt, act_last - act_first + 1));
    check(clocks <= 4 * (8 >> l) + 10, $sformatf("INIT latency %0d clocks", clocks));
    bx = ivx[0]; by = ivy[0]; be = ref_mse(mx, my, bx, by, l);
    for (int k = 1; k < 4; k++) begin
      e = ref_mse(mx, my, ivx[k], ivy[k], l);
      if (e < be) begin be = e; bx = ivx[k]; by = ivy[k]; end
    end
    lb_read(R_BVEC, r);
    check(ux(r) == bx && uy(r) == by, $sformatf("INIT vector (%0d,%0d) exp (%0d,%0d)", ux(r), uy(r), bx, by));
    lb_read(R_BMSE, r);
    check(longint'(r) == be, $sformatf("INIT MSE %0d exp %0d", r, be));
    pdir = -1;
    for (int it = 0; it < 8; it++) begin
      // Step 2 / 4: direction from the differential coefficients
      lb_write(R_SVEC, pk(bx, by));
      act_cnt = 0; act_on = 1;
      run_cmd(CMD_DIFF, clocks);
      act_on = 0;
      n_diff++;
      check(act_cnt == (16 >> l) + (8 >> l) + 1, $sformatf("DIFF active clocks %0d", act_cnt));
      gx = ref_diff(mx, my, bx, by, 0, l);
      gy = ref_diff(mx, my, bx, by, 1, l);
      lb_read(R_DEX, r);
      check($signed(r) == 32'(gx), $sformatf("DEX %0d exp %0d at (%0d,%0d)", $signed(r), gx, bx, by));
      lb_read(R_DEY, r);
      check($signed(r) == 32'(gy), $sformatf("DEY %0d exp %0d at (%0d,%0d)", $signed(r), gy, bx, by));
      if (gx == 0 && gy == 0) break;
      dir = quant_dir(gx, gy);
      if (dir == pdir) begin n_dir_same++; break; end
      pdir = dir;
      // Step 3: 1-dimensional search
      lb_write(R_DIR, 32'(dir));
      run_cmd(CMD_LINE, clocks);
      n_line++;
      begin
        int k = 0, nx, ny;
        longint ne;
        forever begin
          nx = bx + dirx[dir] * step; ny = by + diry[dir] * step;
          if (k >= 40 || nx < xlo(l) || nx > xhi(l) || ny < ylo(l) || ny > yhi(l)) begin n_stop_range++; break; end
          ne = ref_mse(mx, my, nx, ny, l);
          k++;
          if (ne < be) begin be = ne; bx = nx; by = ny; end
          else begin n_stop_mse++; break; end
        end
        lb_read(R_NEVAL, r);
        check(int'(r) == k, $sformatf("LINE evaluations %0d exp %0d", r, k));
      end
      lb_read(R_BVEC, r);
      check(ux(r) == bx && uy(r) == by, $sformatf("LINE vector (%0d,%0d) exp (%0d,%0d)", ux(r), uy(r), bx, by));
      lb_read(R_BMSE, r);
      check(longint'(r) == be, $sformatf("LINE MSE %0d exp %0d", r, be));
    end
    // final solution, evaluated once more as a search vector
    lb_write(R_SVEC, pk(bx, by));
    run_cmd(CMD_VEC, clocks);
    n_vec++;
    lb_read(R_BMSE, r);
    check(longint'(r) == ref_mse(mx, my, bx, by, l), "VEC MSE");
    fvx = bx; fvy = by;
    $display("MB at x=%0d layer %0d: %0d evaluations, sequencer busy %0d clocks, datapath reading %0d clocks",
             mx, l + 1, n_eval - ne0, seq_busy_clk - sb0, dp_busy_clk - db0);
  endtask

  // ---------------- main ----------------
  initial begin
    int mvx [NMB], mvy [NMB];
    logic [31:0] r;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // instruction RAM: write a few words and fetch them back
    for (int k = 0; k < 8; k++) begin
      @(negedge clk); iram_we = 1; iram_waddr = 10'(k * 37); iram_wdata = 32'hC0DE_0000 + 32'(k);
    end
    @(negedge clk); iram_we = 0;
    for (int k = 0; k < 8; k++) begin
      @(negedge clk); iram_re = 1; iram_raddr = 10'(k * 37);
      @(negedge clk); iram_re = 0;
      check(iram_rdata == 32'hC0DE_0000 + 32'(k), "IRAM fetch");
    end
    // stored-only registers read back
    lb_write(R_LAYER, 32'd1); lb_write(R_TBSIZE, 32'd16); lb_write(R_SWSIZE, 32'd272);
    lb_read(R_SWSIZE, r); check(r == 32'd272, "SWSIZE register");
    // full search window of the first macroblock: 17 stripes of 16 columns
    for (int s = 0; s < 17; s++) load_stripe(X0 - 128 + 16 * s, Y0 - 64);
    load_tb(X0, Y0, 0);
    for (int m = 0; m < NMB; m++) begin
      int iv [4][2];
      int mx, fx, fy;
      mx = X0 + 16 * m;
      iv[0] = '{0, 0};
      iv[1] = (m > 0) ? '{mvx[m-1], mvy[m-1]} : '{2, -1};
      iv[2] = '{-4, 3};                      // upper MB vector (none searched here)
      iv[3] = (m == 2) ? '{-140, 70} : '{6, -2};   // out-of-range candidate is clamped
      fork
        // next macroblock's stripe and template, concurrently with the search
        begin
          if (m < NMB - 1) begin
            // the template command queues behind the stripe
            load_stripe(mx + 16 + 144, Y0 - 64, 0, 0);
            load_tb(mx + 16, Y0, (m + 1) % 2);
          end
        end
        begin
          search_mb(mx, Y0, m % 2, iv, (m == 1) ? 2 : 1, fx, fy);
        end
      join
      mvx[m] = fx; mvy[m] = fy;
      $display("MB %0d at x=%0d: vector (%0d,%0d), true motion (%0d,%0d)", m, mx, fx, fy, MVX, MVY);
    end
    // a line search that ends at the edge of the search range
    begin
      logic [31:0] rr;
      int clocks;
      lb_write(R_MBX, 32'(X0 + 16 * (NMB - 1)));
      lb_write(R_SLOT, 32'((NMB - 1) % 2));
      lb_write(R_BVEC, pk(120, 0));
      lb_write(R_BMSE, 32'h7FFF_FFFF);
      lb_write(R_DIR, 32'd0);
      lb_write(R_STEP, 32'd3);
      run_cmd(CMD_LINE, clocks);
      lb_read(R_BVEC, rr);
      check(ux(rr) == 126 && uy(rr) == 0, $sformatf("edge LINE stops at (%0d,%0d)", ux(rr), uy(rr)));
      n_stop_range++;
    end
    // hierarchical search of the last macroblock: layer 3, 2, then 1
    begin
      int hx, hy, mx;
      mx = X0 + 16 * (NMB - 1);
      hx = 0; hy = 0;
      for (int l = 2; l >= 0; l--) begin
        int xl, yl, c0, iv [4][2];
        xl = mx >> l; yl = Y0 >> l;
        lb_write(R_LAYER, 32'(l + 1));
        n_layer++;
        // window columns xl-(128>>l) .. xl+(128>>l)+N-1, in stripes from a
        // multiple of 8
        c0 = (xl - (128 >> l)) & ~7;
        for (int c = c0; c < xl + (128 >> l) + (16 >> l); c += 16)
          load_stripe(c, yl - (64 >> l), l);
        load_tb(xl, yl, 2);
        iv[0] = '{2 * hx, 2 * hy};
        iv[1] = '{0, 0};
        iv[2] = '{mvx[NMB - 1] >>> l, mvy[NMB - 1] >>> l};
        iv[3] = '{-1, 1};
        search_mb(xl, yl, 2, iv, 1, hx, hy, l);
        $display("hierarchical search, layer %0d: vector (%0d,%0d)", l + 1, hx, hy);
      end
      check(hx == mvx[NMB - 1] && hy == mvy[NMB - 1],
            $sformatf("hierarchical result (%0d,%0d) equals the direct search (%0d,%0d)", hx, hy, mvx[NMB - 1], mvy[NMB - 1]));
    end
    $display("mechanisms: queued_loads=%0d layers=%0d init=%0d diff=%0d line=%0d vec=%0d stop_mse=%0d stop_range=%0d dir_same=%0d b2b=%0d concurrent_writes=%0d sw_writes=%0d tb_writes=%0d bus_stalls=%0d",
             n_queued, n_layer, n_init, n_diff, n_line, n_vec, n_stop_mse, n_stop_range, n_dir_same, n_b2b, n_conc, n_sw_wr, n_tb_wr, n_stall);
    check(n_queued > 0, "loader command queued behind a running one");
    check(n_layer == 3, "layer 3, 2 and 1 searches happened");
    check(n_init > 0, "initial vector evaluation happened");
    check(n_diff > 0, "differential coefficients happened");
    check(n_line > 0, "1-D search happened");
    check(n_vec > 0, "search vector evaluation happened");
    check(n_stop_mse > 0, "line search stopped on MSE increase");
    check(n_stop_range > 0, "line search stopped at range edge");
    check(n_dir_same > 0, "GDS ended on unchanged direction");
    check(n_b2b > 0, "back-to-back evaluations happened");
    check(n_conc > 0, "SW writes concurrent with search happened");
    check(n_tb_wr > 0, "template loads happened");
    check(n_stall > 0, "MemoryBus stalls happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
