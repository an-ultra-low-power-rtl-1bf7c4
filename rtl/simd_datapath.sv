// simd_datapath: the SIMD datapath of the motion estimation processor.
//
// Two halves, each with a template buffer (TB0, TB1), eight SW banks
// (SW00..SW07, SW10..SW17), a crosspath and 16 PEs, followed by one adder
// tree and accumulator over all 32 PEs. The halves hold the even and the odd
// rows of the 272x144 search window, so together they process two macroblock
// rows (32 pixels) per clock and evaluate one search vector in 8 clocks. Both
// TBs hold the same template rows. The MemoryBus loader writes SW banks and
// TBs through their write ports while the address generators read them.
//
// Write interface: sw_we with sw_half selects the half, the 64-bit word's
// pixel b goes to bank b at sw_waddr; tb_we writes both TBs. Read side: the
// two AGs drive addresses and ctrl; result/result_valid follow five clocks
// after the clock of the last read of an evaluation (memory 1, PE 2, adder
// tree 1, accumulator 1). The block structure follows the document; the row split
// between halves and the write interface are this design's choice.
module simd_datapath
  import me_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  // address generators
  input  sw_addr_t         sw_raddr [2][NBANK][2],
  input  logic [TB_AW-1:0] tb_raddr [2],
  input  ag_ctrl_t         ctrl [2],
  // MemoryBus write side
  input  logic             sw_we,
  input  logic             sw_half,
  input  sw_addr_t         sw_waddr,
  input  logic [63:0]      sw_wdata,
  input  logic             tb_we,
  input  logic [TB_AW-1:0] tb_waddr,
  input  logic             tb_whalf,
  input  logic [63:0]      tb_wdata,
  // result to the sequencer
  output acc_t             result,
  output logic             result_valid
);

  pix_t         sw_rd   [2][NBANK][2];
  logic [127:0] tb_row  [2];
  pix_t         cur_row [2][NPE_HALF];
  pix_t         prv_row [2][NPE_HALF];
  ag_ctrl_t     ctrl_d  [2];
  prod_t        prod    [2][NPE_HALF];

  for (genvar h = 0; h < 2; h++) begin : g_half
    for (genvar b = 0; b < NBANK; b++) begin : g_sw
      sw_sram u_sw (
        .clk,
        .we    (sw_we && (sw_half == 1'(h))),
        .waddr (sw_waddr),
        .wdata (sw_wdata[8*b +: 8]),
        .raddr0(sw_raddr[h][b][0]), .rdata0(sw_rd[h][b][0]),
        .raddr1(sw_raddr[h][b][1]), .rdata1(sw_rd[h][b][1])
      );
    end
    template_buffer u_tb (
      .clk, .we(tb_we), .waddr(tb_waddr), .whalf(tb_whalf), .wdata(tb_wdata),
      .raddr(tb_raddr[h]), .rdata(tb_row[h])
    );
    simd_half u_half (
      .clk, .rst_n, .ctrl(ctrl[h]), .sw_rd(sw_rd[h]), .tb_row(tb_row[h]),
      .opp_cur(cur_row[1-h]), .opp_prev(prv_row[1-h]),
      .own_cur(cur_row[h]), .own_prev(prv_row[h]),
      .ctrl_d(ctrl_d[h]), .prod(prod[h])
    );
  end

  // tags follow the PE pipeline (two stages)
  logic [2:0] tag_q [2];   // {active, first, last}
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tag_q[0] <= '0;
      tag_q[1] <= '0;
    end else begin
      tag_q[0] <= {ctrl_d[0].active, ctrl_d[0].first, ctrl_d[0].last};
      tag_q[1] <= tag_q[0];
    end
  end

  prod_t all_prod [2*NPE_HALF];
  always_comb begin
    for (int k = 0; k < NPE_HALF; k++) begin
      all_prod[k]            = prod[0][k];
      all_prod[NPE_HALF + k] = prod[1][k];
    end
  end

  adder_tree #(.N(2*NPE_HALF)) u_tree (
    .clk, .rst_n, .prod(all_prod),
    .in_active(tag_q[1][2]), .in_first(tag_q[1][1]), .in_last(tag_q[1][0]),
    .result, .result_valid
  );

  // both AGs run in lock step
  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
                               ctrl[0].active == ctrl[1].active);

endmodule
