// addr_gen: address generator (AG) of one datapath half.
//
// On start it takes a search vector (Vx, Vy), the evaluation mode, the image
// layer, the column of the macroblock in that layer and the template buffer
// slot, and then, one clock per read, drives the 16 SW read addresses
// (8 banks x 2 ports) and the template row address of its half together with
// the control word for the PEs. With block size N = 16 >> lyr and ranges
// RX = 128 >> lyr, RY = 64 >> lyr, window row r = RY + Vy + j holds block row
// j; rows of parity HALF are stored in this half. Buffer column
// bc = layer column + RX + Vx + i.
//
//   M_MSE  N/2 reads : the N/2 block rows whose window row has parity HALF.
//   M_DX   N reads   : each of those rows twice, starting at column -1 and
//                      then at +1; the product is formed on the second read.
//   M_DY   N/2+1     : window rows r0-1+2t (t = 0..N/2) are read in pairs by
//                      the two halves; the centre is this read (dy_cur) or
//                      the previous one, neighbours come from the opposite
//                      half.
//
// For layer 1 that is 8, 16 and 9 reads. ready is high when idle or in the
// last read of an evaluation, so evaluations follow back to back (an MSE
// every 8 clocks). Addresses and control are valid in the clock they are
// driven; memories answer one clock later. The eight-clock MSE evaluation
// and the layer sizes follow the document; the DX and DY schedules and the
// address map are this design's choice. Vectors must lie one pixel inside
// the search range, H -RX+1..RX-2, V -RY+1..RY-2 (the sequencer clamps them).
module addr_gen
  import me_pkg::*;
#(
  parameter bit HALF = 1'b0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  output logic             ready,
  input  pe_mode_e         mode,
  input  logic [1:0]       lyr,     // image layer - 1 (0..2)
  input  mv_t              vec,
  input  logic [11:0]      mbx,     // column of the macroblock in its layer
  input  logic [2:0]       slot,    // template buffer slot
  output sw_addr_t         sw_raddr [NBANK][2],
  output logic [TB_AW-1:0] tb_raddr,
  output ag_ctrl_t         ctrl
);

  logic            busy;
  logic [3:0]      t;
  pe_mode_e        mode_q;
  logic [7:0]      r0;      // window row of MB row 0
  logic [BC_W-1:0] bc0;     // buffer column of MB column 0
  logic [2:0]      slot_q;
  logic [1:0]      lyr_q;

  // index of the last read: N-1 (DX), N/2 (DY), N/2-1 (MSE)
  function automatic logic [3:0] last_t(input pe_mode_e m, input logic [1:0] l);
    case (m)
      M_DX:    return 4'((16 >> l) - 1);
      M_DY:    return 4'(8 >> l);
      default: return 4'((8 >> l) - 1);
    endcase
  endfunction

  assign ready = !busy || (t == last_t(mode_q, lyr_q));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; t <= '0; mode_q <= M_MSE; r0 <= '0; bc0 <= '0; slot_q <= '0; lyr_q <= '0;
    end else if (start && ready) begin
      busy   <= 1'b1;
      t      <= '0;
      mode_q <= mode;
      r0     <= 8'((RANGE_Y >> lyr) + 32'(vec.y));
      bc0    <= BC_W'(32'(mbx) + (RANGE_X >> lyr) + 32'(vec.x));
      slot_q <= slot;
      lyr_q  <= lyr;
    end else if (busy) begin
      if (t == last_t(mode_q, lyr_q)) busy <= 1'b0;
      else t <= t + 4'd1;
    end
  end

  // row, start column and template row of the current read
  logic [7:0]      wr;
  logic [BC_W-1:0] cs;
  logic [3:0]      j;
  logic            e, cur, pval;
  logic [7:0]      q;

  always_comb begin
    e    = HALF ^ r0[0];                  // first own-parity MB row
    q    = r0 - 8'd1 + {3'd0, t, 1'b0};   // M_DY pair base row
    cur  = (HALF == q[0]);
    wr   = r0 + {7'd0, e} + {3'd0, t, 1'b0};
    cs   = bc0;
    j    = {t[2:0], e};
    pval = 1'b1;
    case (mode_q)
      M_DX: begin
        wr   = r0 + {7'd0, e} + {4'd0, t[3:1], 1'b0};
        cs   = t[0] ? bc0 + BC_W'(1) : bc0 - BC_W'(1);
        j    = {t[3:1], e};
        pval = t[0];
      end
      M_DY: begin
        wr   = cur ? q : q + 8'd1;
        j    = (t == 4'd0) ? 4'd0 : (cur ? 4'({t, 1'b0} - 5'd1) : 4'({t, 1'b0} - 5'd2));
        pval = (t != 4'd0);
      end
      default: ;
    endcase
  end

  always_comb begin
    for (int b = 0; b < NBANK; b++) begin
      for (int p = 0; p < 2; p++) begin
        logic [BC_W-1:0] col;
        col = cs + BC_W'(3'(3'(b) - cs[2:0])) + BC_W'(8 * p);
        sw_raddr[b][p] = sw_addr(col, wr);
      end
    end
    tb_raddr    = {slot_q, j};
    ctrl.active = busy;
    ctrl.mode   = mode_q;
    ctrl.pvalid = busy && pval;
    ctrl.first  = busy && (t == 4'd0);
    ctrl.last   = busy && (t == last_t(mode_q, lyr_q));
    ctrl.dy_cur = cur;
    ctrl.rot    = cs[2:0];
    ctrl.lyr    = lyr_q;
  end

endmodule
