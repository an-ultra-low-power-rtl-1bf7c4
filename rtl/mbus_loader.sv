// mbus_loader: MemoryBus interface, the loader of the image data caches.
//
// One command loads, from image layer lyr+1 of a frame,
//   kind 0: a search window stripe, 16 columns x H rows of the reference
//           frame, H = 144 >> lyr (column fx, rows fy..fy+H-1), into the SW
//           banks, stripe column 0 at buffer column bc; window row r goes to
//           the half r mod 2, row r/2 of the bank, or
//   kind 1: a template block, N x N pixels with N = 16 >> lyr, of the current
//           frame at (fx, fy), into TB slot `slot` of both template buffers
//           (in layers 2 and 3 one bus word per row, shifted right by
//           fx mod 8 pixels so that the block starts at pixel 0; a layer-3
//           block may start in the middle of a word).
// It issues one read request per 64-bit word (8 pixels), row by row, left word
// first, with a valid/ready handshake, and the frame memory returns the words
// in request order with rsp_valid after any latency. Because the order is
// fixed, the destination of a response follows from a count of responses.
// Writes go to the caches in the clock the response arrives, concurrently
// with searching. Two commands can be held: the requests of the second start
// right after the last request of the first, so a stripe and a template load
// back to back without a gap for the memory latency. start is ignored while
// full is high. In layer 1 a stripe is 288 bus words, a macroblock 32. The
// 64-bit bus and the stripe shape follow the document; handshake, command
// encoding and holding the subsampled layers in the frame memory are this
// design's choice. fx and bc must be multiples of 8, except fx of a layer 2/3
// template, which must be a multiple of N.
module mbus_loader
  import me_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  // command
  input  logic             start,
  input  logic             kind,      // 0: SW stripe, 1: TB macroblock
  input  logic [11:0]      fx,
  input  logic signed [12:0] fy,
  input  logic [BC_W-1:0]  bc,
  input  logic [2:0]       slot,
  input  logic [1:0]       lyr,       // image layer - 1
  output logic             busy,      // a command is queued or running
  output logic             full,      // two commands held: start is ignored
  // MemoryBus read request / response
  output logic             req_valid,
  input  logic             req_ready,
  output logic             req_frame, // 0: reference (previous) frame, 1: current frame
  output logic [1:0]       req_layer, // image layer - 1
  output logic [8:0]       req_x,     // 8-pixel word column
  output logic signed [12:0] req_y,   // frame row
  input  logic             rsp_valid,
  input  logic [63:0]      rsp_data,
  // cache write ports
  output logic             sw_we,
  output logic             sw_half,
  output sw_addr_t         sw_waddr,
  output logic [63:0]      sw_wdata,
  output logic             tb_we,
  output logic [TB_AW-1:0] tb_waddr,
  output logic             tb_whalf,
  output logic [63:0]      tb_wdata
);


  // one queued load command
  typedef struct packed {
    logic              kind;
    logic [11:0]       fx;
    logic signed [12:0] fy;
    logic [BC_W-1:0]   bc;
    logic [2:0]        slot;
    logic [1:0]        lyr;
  } ld_cmd_t;

  function automatic logic two_words(input ld_cmd_t c);   // two bus words per row
    return !c.kind || (c.lyr == 2'd0);
  endfunction
  function automatic logic [8:0] n_words(input ld_cmd_t c);
    return c.kind ? ((c.lyr == 2'd0) ? 9'd32 : 9'(16 >> c.lyr)) : 9'((2 * WIN_H) >> c.lyr);
  endfunction

  ld_cmd_t    q [2];
  logic       rs_i;          // entry whose responses are expected
  logic [1:0] cnt;           // commands not yet completed
  logic [1:0] nreqd;         // of those, commands with all requests issued
  logic [8:0] nreq, nrsp;
  logic       rq_i, wr_i;
  ld_cmd_t    rq, rs;
  logic       req_last, rsp_last, accept;

  assign rq_i     = rs_i ^ nreqd[0];
  assign wr_i     = rs_i ^ cnt[0];
  assign rq       = q[rq_i];
  assign rs       = q[rs_i];
  assign accept   = start && (cnt != 2'd2);
  assign req_last = req_valid && req_ready && (nreq == n_words(rq) - 9'd1);
  assign rsp_last = rsp_valid && (nrsp == n_words(rs) - 9'd1);
  assign busy     = (cnt != 2'd0);
  assign full     = (cnt == 2'd2);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q[0] <= '0; q[1] <= '0;
      rs_i <= 1'b0; cnt <= '0; nreqd <= '0; nreq <= '0; nrsp <= '0;
    end else begin
      if (accept) q[wr_i] <= '{kind: kind, fx: fx, fy: fy, bc: bc, slot: slot, lyr: lyr};
      cnt   <= cnt + 2'(accept) - 2'(rsp_last);
      nreqd <= nreqd + 2'(req_last) - 2'(rsp_last);
      if (req_valid && req_ready) nreq <= req_last ? 9'd0 : nreq + 9'd1;
      if (rsp_valid) nrsp <= rsp_last ? 9'd0 : nrsp + 9'd1;
      if (rsp_last) rs_i <= !rs_i;
    end
  end

  // request side: with two words per row, word n is row n/2, word n%2
  assign req_valid = (cnt > nreqd);
  assign req_frame = rq.kind;
  assign req_layer = rq.lyr;
  assign req_x     = 9'(rq.fx >> 3) + 9'(two_words(rq) & nreq[0]);
  assign req_y     = rq.fy + (two_words(rq) ? 13'(nreq[8:1]) : 13'(nreq));

  // response side
  logic [7:0] rrow;
  logic       rword;
  assign rrow  = two_words(rs) ? nrsp[8:1] : nrsp[7:0];
  assign rword = two_words(rs) & nrsp[0];

  always_comb begin
    sw_we    = rsp_valid && !rs.kind;
    sw_half  = rrow[0];
    sw_waddr = sw_addr(rs.bc + BC_W'({rword, 3'b000}), rrow);
    sw_wdata = rsp_data;
    tb_we    = rsp_valid && rs.kind;
    tb_waddr = {rs.slot, rrow[3:0]};
    tb_whalf = rword;
    tb_wdata = two_words(rs) ? rsp_data : rsp_data >> {rs.fx[2:0], 3'b000};
  end

  a_no_early_rsp: assert property (@(posedge clk) disable iff (!rst_n)
                                   rsp_valid |-> (nreqd != 2'd0) || (nrsp < nreq));

endmodule
