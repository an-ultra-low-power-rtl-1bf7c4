// simd_half: one half of the SIMD datapath: crosspath, neighbour delay
// buffers and 16 PEs.
//
// The SW bank data and the template row arrive one clock after the address
// generator drove ctrl; ctrl is delayed here by one clock to line up. The
// crosspath gives the pixel row S[0..15]; the row of the previous read is kept
// in a register (the delay buffer). The operands of PE k are:
//   M_MSE  centre S[k].
//   M_DX   the first read of a row starts one column left, the second one
//          column right: left = prev[k], right = S[k], centre = S[k-1]
//          (prev[1] for k = 0); products only on the second read.
//   M_DY   centre S[k] or prev[k] (ctrl.dy_cur); upper and lower neighbours
//          are the opposite half's previous and current rows, since the other
//          window row parity is stored there.
// In layers 2 and 3 the block is 8 or 4 pixels wide and only PEs 0..7 or
// 0..3 are enabled. The current and previous rows are exported for the
// opposite half. Products
// leave the PEs three clocks after the address. The use of the opposite half
// for vertical neighbours follows the document's PE figure; the read schedule
// is this design's choice.
module simd_half
  import me_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  ag_ctrl_t ctrl,                  // from the AG, aligned with addresses
  input  pix_t     sw_rd [NBANK][2],      // bank read data
  input  logic [127:0] tb_row,            // template row read data
  input  pix_t     opp_cur  [NPE_HALF],   // opposite half, current row
  input  pix_t     opp_prev [NPE_HALF],   // opposite half, previous row
  output pix_t     own_cur  [NPE_HALF],
  output pix_t     own_prev [NPE_HALF],
  output ag_ctrl_t ctrl_d,                // ctrl aligned with read data
  output prod_t    prod [NPE_HALF]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctrl_d <= '0;
      for (int k = 0; k < NPE_HALF; k++) own_prev[k] <= '0;
    end else begin
      ctrl_d <= ctrl;
      for (int k = 0; k < NPE_HALF; k++) own_prev[k] <= own_cur[k];
    end
  end

  crosspath u_xp (.rot(ctrl_d.rot), .sw_pix(sw_rd), .pe_pix(own_cur));

  for (genvar k = 0; k < NPE_HALF; k++) begin : g_pe
    pix_t sc, sm, sp, tp;
    always_comb begin
      tp = tb_row[8*k +: 8];
      sc = own_cur[k];
      sm = own_cur[k];
      sp = own_cur[k];
      case (ctrl_d.mode)
        M_DX: begin
          sm = own_prev[k];
          sp = own_cur[k];
          sc = (k == 0) ? own_prev[1] : own_cur[(k == 0) ? 0 : k-1];
        end
        M_DY: begin
          sc = ctrl_d.dy_cur ? own_cur[k] : own_prev[k];
          sm = opp_prev[k];
          sp = opp_cur[k];
        end
        default: ;
      endcase
    end
    logic unused_valid;
    // only the first 16 >> lyr columns belong to the block
    logic col_en;
    assign col_en = (k < (16 >> ctrl_d.lyr));
    pe u_pe (.clk, .rst_n, .in_valid(ctrl_d.pvalid && col_en), .mode(ctrl_d.mode),
             .t(tp), .sc, .sm, .sp, .prod(prod[k]), .out_valid(unused_valid));
  end

endmodule
