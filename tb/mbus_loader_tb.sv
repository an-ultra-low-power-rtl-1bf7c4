// mbus_loader_tb: the loader against the frame memory model (random
// backpressure, 4-clock latency). For window stripes and template
// macroblocks at random places and in all three image layers it checks every
// cache write (half, word address, 8 pixels, template slot and half) against
// the pixels the frame holds at that place, and the number of bus words: 288
// per stripe and 32 per macroblock in layer 1, 144/72 and 8/4 in layers 2/3.
// The first commands are given one at a time; the rest back to back, so that
// two are queued, and a command given while the queue is full must be
// ignored.
module mbus_loader_tb;
  import me_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, kind = 0, busy, full;
  logic [11:0] fx = '0;
  logic signed [12:0] fy = '0;
  logic [BC_W-1:0] bc = '0;
  logic [2:0] slot = '0;
  logic [1:0] lyr = '0, req_layer;
  logic req_valid, req_ready, req_frame, rsp_valid;
  logic [8:0] req_x;
  logic signed [12:0] req_y;
  logic [63:0] rsp_data;
  logic sw_we, sw_half, tb_we, tb_whalf;
  sw_addr_t sw_waddr;
  logic [63:0] sw_wdata, tb_wdata;
  logic [TB_AW-1:0] tb_waddr;
  int n_stall;
  int checks = 0, failures = 0;

  mbus_loader dut (.*);
  frame_mem_model #(.LAT(4), .STALL(1'b1)) u_mem (.clk, .req_valid, .req_ready, .req_frame, .req_layer,
    .req_x, .req_y, .rsp_valid, .rsp_data, .n_stall);

  initial begin
    repeat (40000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  typedef struct {bit kind; int fx, fy, bc, slot, l;} cmd_t;
  cmd_t cmds [$];
  int nw = 0, n_full = 0;
  function automatic int n_words(input cmd_t c);
    return c.kind ? (c.l == 0 ? 32 : 16 >> c.l) : 288 >> c.l;
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (sw_we || tb_we) begin
      int r, w;
      cmd_t c;
      checks++;
      if (cmds.size() == 0) begin
        failures++; $display("FAIL write without a command");
      end else begin
        c = cmds[0];
        r = nw / 2; w = nw % 2;
        if (c.kind == 1 && c.l > 0) begin r = nw; w = 0; end
        if (c.kind == 0) begin
          if (!sw_we || tb_we || sw_half != 1'(r % 2) ||
              int'(sw_waddr) != (((c.bc + 8 * w) / 8) % 36) * 72 + r / 2 ||
              sw_wdata != bus_word(0, c.fx / 8 + w, c.fy + r, c.l)) begin
            failures++; $display("FAIL SW word %0d", nw);
          end
        end else begin
          if (!tb_we || sw_we || int'(tb_waddr) != c.slot * 16 + r || tb_whalf != 1'(w) ||
              tb_wdata != (bus_word(1, c.fx / 8 + w, c.fy + r, c.l) >> (8 * (c.fx % 8)))) begin
            failures++; $display("FAIL TB word %0d", nw);
          end
        end
        nw++;
        if (nw == n_words(c)) begin void'(cmds.pop_front()); nw = 0; end
      end
    end
  end

  task automatic issue(input cmd_t c);
    @(negedge clk);
    while (full) @(negedge clk);
    start = 1; kind = c.kind; fx = 12'(c.fx); fy = 13'(c.fy); bc = BC_W'(c.bc);
    slot = 3'(c.slot); lyr = 2'(c.l);
    cmds.push_back(c);
    @(negedge clk); start = 0;
    checks++;
    if (!busy) begin failures++; $display("FAIL not busy"); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 48; n++) begin
      cmd_t c;
      c.kind = (n % 3 == 2);
      c.fx = 16 * int'($urandom % 120);
      c.fy = int'($urandom % 1000) - 64;
      c.bc = c.fx + 128;
      c.l = (n / 8) % 3;
      if (c.kind && c.l == 2) c.fx += 4 * (n % 2);   // layer-3 block inside a word
      c.slot = int'($urandom % 6);
      issue(c);
      if (n < 24) begin
        // one at a time: the count of words is checked per command
        while (busy) @(negedge clk);
        checks++;
        if (cmds.size() != 0) begin failures++; $display("FAIL command %0d incomplete", n); end
      end else if (full) begin
        // a command given while two are held is ignored
        n_full++;
        start = 1; kind = 0; fx = 12'd8; bc = '0; lyr = '0;
        @(negedge clk); start = 0;
      end
    end
    while (busy) @(negedge clk);
    repeat (10) @(negedge clk);
    checks++;
    if (cmds.size() != 0 || nw != 0) begin failures++; $display("FAIL %0d commands left", cmds.size()); end
    checks++;
    if (n_stall == 0 || n_full == 0) begin failures++; $display("FAIL no stall or no full queue seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
