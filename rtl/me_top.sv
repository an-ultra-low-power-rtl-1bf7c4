// me_top: motion estimation processor for 1920x1080 video using the gradient
// descent search.
//
// The embedded controller (outside this module; its local bus and the fetch
// port of its instruction RAM are ports here) writes commands into the
// sequencer. The sequencer starts both address generators in lock step; they
// read the template buffers and SW banks of the SIMD datapath, whose 32 PEs
// and adder tree return one MSE every 8 clocks, or an x / y differential
// coefficient, to the sequencer. The MemoryBus loader, started through a
// sequencer register, fetches 64-bit words from the external frame memory
// and fills the next search window stripe and template macroblock while the
// search runs. The layer register of the sequencer switches the whole
// datapath between the three layers of the hierarchical search (16x16, 8x8
// and 4x4 blocks); the frame memory is expected to hold the subsampled
// layers. The block structure follows the document; the bus protocols
// are this design's choice (see the individual modules).
module me_top
  import me_pkg::*;
#(
  parameter int unsigned IRAM_WORDS = 1024
) (
  input  logic             clk,
  input  logic             rst_n,
  // local bus from the embedded controller
  input  logic             lb_sel,
  input  logic             lb_we,
  input  logic [5:0]       lb_addr,
  input  logic [31:0]      lb_wdata,
  output logic [31:0]      lb_rdata,
  output logic             seq_done,
  // instruction RAM ports of the embedded controller
  input  logic             iram_we,
  input  logic [$clog2(IRAM_WORDS)-1:0] iram_waddr,
  input  logic [31:0]      iram_wdata,
  input  logic             iram_re,
  input  logic [$clog2(IRAM_WORDS)-1:0] iram_raddr,
  output logic [31:0]      iram_rdata,
  // MemoryBus to the frame memory
  output logic             mb_req_valid,
  input  logic             mb_req_ready,
  output logic             mb_req_frame,
  output logic [1:0]       mb_req_layer,
  output logic [8:0]       mb_req_x,
  output logic signed [12:0] mb_req_y,
  input  logic             mb_rsp_valid,
  input  logic [63:0]      mb_rsp_data
);

  // sequencer <-> address generators
  logic        ag_start;
  logic [1:0]  ag_ready;
  pe_mode_e    ag_mode;
  logic [1:0]  ag_lyr, ld_lyr;
  mv_t         ag_vec;
  logic [11:0] ag_mbx;
  logic [2:0]  ag_slot;

  sw_addr_t         sw_raddr [2][NBANK][2];
  logic [TB_AW-1:0] tb_raddr [2];
  ag_ctrl_t         ctrl [2];

  acc_t        result;
  logic        result_valid;

  // loader
  logic              ld_start, ld_kind, ld_busy, ld_full;
  logic [11:0]       ld_fx;
  logic signed [12:0] ld_fy;
  logic [BC_W-1:0]   ld_bc;
  logic [2:0]        ld_slot;
  logic              sw_we, sw_half, tb_we, tb_whalf;
  sw_addr_t          sw_waddr;
  logic [63:0]       sw_wdata, tb_wdata;
  logic [TB_AW-1:0]  tb_waddr;

  sequencer u_seq (
    .clk, .rst_n,
    .lb_sel, .lb_we, .lb_addr, .lb_wdata, .lb_rdata, .done(seq_done),
    .ag_start, .ag_ready(&ag_ready), .ag_mode, .ag_lyr, .ag_vec, .ag_mbx, .ag_slot,
    .result, .result_valid,
    .ld_start, .ld_kind, .ld_fx, .ld_fy, .ld_bc, .ld_slot, .ld_lyr, .ld_busy, .ld_full
  );

  for (genvar h = 0; h < 2; h++) begin : g_ag
    addr_gen #(.HALF(1'(h))) u_ag (
      .clk, .rst_n, .start(ag_start), .ready(ag_ready[h]),
      .mode(ag_mode), .lyr(ag_lyr), .vec(ag_vec), .mbx(ag_mbx), .slot(ag_slot),
      .sw_raddr(sw_raddr[h]), .tb_raddr(tb_raddr[h]), .ctrl(ctrl[h])
    );
  end

  simd_datapath u_dp (
    .clk, .rst_n, .sw_raddr, .tb_raddr, .ctrl,
    .sw_we, .sw_half, .sw_waddr, .sw_wdata,
    .tb_we, .tb_waddr, .tb_whalf, .tb_wdata,
    .result, .result_valid
  );

  mbus_loader u_ld (
    .clk, .rst_n,
    .start(ld_start), .kind(ld_kind), .fx(ld_fx), .fy(ld_fy), .bc(ld_bc), .slot(ld_slot),
    .lyr(ld_lyr),
    .busy(ld_busy), .full(ld_full),
    .req_valid(mb_req_valid), .req_ready(mb_req_ready), .req_frame(mb_req_frame),
    .req_layer(mb_req_layer),
    .req_x(mb_req_x), .req_y(mb_req_y), .rsp_valid(mb_rsp_valid), .rsp_data(mb_rsp_data),
    .sw_we, .sw_half, .sw_waddr, .sw_wdata,
    .tb_we, .tb_waddr, .tb_whalf, .tb_wdata
  );

  iram #(.WORDS(IRAM_WORDS)) u_iram (
    .clk, .we(iram_we), .waddr(iram_waddr), .wdata(iram_wdata),
    .re(iram_re), .raddr(iram_raddr), .rdata(iram_rdata)
  );

endmodule
