// me_period_tb: the macroblock period of 1080p30 video. At 81 MHz one
// macroblock has 81e6 / (8160 x 30) = 330 clocks. In that time the next
// macroblock's search window stripe (288 bus words) and template (32 words)
// must be loaded while the current macroblock is searched. The testbench
// plays the controller on a frame memory that never stalls (latency 4); it
// fills the first window, then for a row of macroblocks queues the stripe and
// template loads (the template command waits in the loader's queue) and, at
// the same time, runs the gradient descent search
// (initial vectors, derivatives, line searches until the direction repeats,
// final evaluation). It checks that each load pair, from the clock the
// stripe command reaches the loader, ends within 330 clocks,
// that the search with its register traffic (two clocks per local bus
// access) ends within 330 clocks, and that the final MSE matches the
// reference arithmetic.
module me_period_tb;
  import me_pkg::*;
  import tb_ref_pkg::*;

  localparam int NMB    = 6;
  localparam int X0     = 512;
  localparam int Y0     = 256;
  localparam int PERIOD = 330;

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

  frame_mem_model #(.LAT(4), .STALL(1'b0)) u_mem (
    .clk, .req_valid(mb_req_valid), .req_ready(mb_req_ready), .req_frame(mb_req_frame),
    .req_layer(mb_req_layer), .req_x(mb_req_x), .req_y(mb_req_y),
    .rsp_valid(mb_rsp_valid), .rsp_data(mb_rsp_data), .n_stall
  );

  int checks = 0, failures = 0;
  longint unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

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
  function automatic logic [31:0] pk(input int x, input int y); return {16'(y), 16'(x)}; endfunction
  function automatic int ux(input logic [31:0] w); return int'($signed(w[9:0]));  endfunction
  function automatic int uy(input logic [31:0] w); return int'($signed(w[25:16])); endfunction

  task automatic loader_cmd(input int kind);
    logic [31:0] s;
    do lb_read(R_STATUS, s); while (s[2]);
    lb_write(R_LDCMD, 32'(kind));
  endtask
  task automatic wait_loader();
    logic [31:0] s;
    do lb_read(R_STATUS, s); while (s[1]);
  endtask
  task automatic stripe(input int fx, input int fy);
    lb_write(R_LDFX, 32'(fx)); lb_write(R_LDFY, 32'(fy)); lb_write(R_LDBC, 32'(fx + 128));
    loader_cmd(0);
  endtask
  task automatic templ(input int mx, input int my, input int slot);
    lb_write(R_LDSLOT, 32'(slot)); lb_write(R_LDFX, 32'(mx)); lb_write(R_LDFY, 32'(my));
    loader_cmd(1);
  endtask

  task automatic run_cmd(input seq_cmd_e c);
    lb_write(R_CMD, 32'(c));
    while (!seq_done) @(posedge clk);
  endtask

  function automatic int quant_dir(input int gx, input int gy);
    int ax, ay;
    ax = gx < 0 ? -gx : gx; ay = gy < 0 ? -gy : gy;
    if (ay * 5 < ax * 2) return gx > 0 ? 0 : 4;
    if (ax * 5 < ay * 2) return gy > 0 ? 2 : 6;
    if (gx > 0) return gy > 0 ? 1 : 7;
    return gy > 0 ? 3 : 5;
  endfunction

  // gradient descent search of the macroblock at (mx, my)
  task automatic search(input int mx, input int my, input int slot, input int pvx, input int pvy,
                        output int clocks);
    longint unsigned t0;
    logic [31:0] r;
    int dir, pdir, bx, by;
    t0 = cyc;
    lb_write(R_MBX, 32'(mx));
    lb_write(R_SLOT, 32'(slot));
    lb_write(R_IV0 + 6'd0, pk(0, 0));
    lb_write(R_IV0 + 6'd1, pk(pvx, pvy));
    lb_write(R_IV0 + 6'd2, pk(2, -1));
    lb_write(R_IV0 + 6'd3, pk(pvx + 1, pvy));
    run_cmd(CMD_INIT);
    pdir = -1;
    for (int it = 0; it < 6; it++) begin
      lb_read(R_BVEC, r);
      lb_write(R_SVEC, r);
      run_cmd(CMD_DIFF);
      begin
        logic [31:0] gx, gy;
        lb_read(R_DEX, gx);
        lb_read(R_DEY, gy);
        if (gx == 0 && gy == 0) break;
        dir = quant_dir(int'($signed(gx)), int'($signed(gy)));
      end
      if (dir == pdir) break;
      pdir = dir;
      lb_write(R_DIR, 32'(dir));
      run_cmd(CMD_LINE);
    end
    lb_read(R_BVEC, r);
    bx = ux(r); by = uy(r);
    lb_write(R_SVEC, r);
    run_cmd(CMD_VEC);
    clocks = int'(cyc - t0);
    lb_read(R_BMSE, r);
    check(longint'(r) == ref_mse(mx, my, bx, by),
          $sformatf("final MSE %0d at (%0d,%0d) exp %0d", r, bx, by, ref_mse(mx, my, bx, by)));
  endtask

  initial begin
    int pvx, pvy, worst_ld, worst_s;
    logic [31:0] r;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    lb_write(R_STEP, 32'd1);
    lb_write(R_NCYC, 32'd16);
    for (int s = 0; s < 17; s++) begin stripe(X0 - 128 + 16 * s, Y0 - 64); wait_loader(); end
    templ(X0, Y0, 0); wait_loader();
    pvx = 0; pvy = 0; worst_ld = 0; worst_s = 0;
    for (int m = 0; m < NMB; m++) begin
      int mx, ld_clk, s_clk;
      mx = X0 + 16 * m;
      fork
        begin
          // timed from the clock the stripe command reaches the loader to
          // the end of its last write; the controller does not poll
          longint unsigned t0;
          fork
            begin @(posedge clk iff dut.ld_start); t0 = cyc; end
          join_none
          stripe(mx + 16 + 144, Y0 - 64);
          templ(mx + 16, Y0, (m + 1) % 2);
          @(negedge clk iff !dut.ld_busy);
          ld_clk = int'(cyc - t0);
        end
        search(mx, Y0, m % 2, pvx, pvy, s_clk);
      join
      lb_read(R_BVEC, r);
      pvx = ux(r); pvy = uy(r);
      $display("MB %0d: vector (%0d,%0d); loads %0d clocks, search %0d clocks (budget %0d)",
               m, pvx, pvy, ld_clk, s_clk, PERIOD);
      check(ld_clk <= PERIOD, $sformatf("stripe + template load in %0d clocks", ld_clk));
      check(s_clk <= PERIOD, $sformatf("search in %0d clocks", s_clk));
      if (ld_clk > worst_ld) worst_ld = ld_clk;
      if (s_clk > worst_s) worst_s = s_clk;
    end
    $display("worst load %0d clocks, worst search %0d clocks, of %0d per macroblock", worst_ld, worst_s, PERIOD);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
