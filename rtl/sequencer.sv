// sequencer: SEQ, the command sequencer between the embedded controller and
// the SIMD datapath.
//
// The controller writes commands and parameters into SEQ registers over the
// local bus (lb_*, 32-bit words, register map in me_pkg; reads are
// combinational). Writing R_CMD starts a command; R_STATUS bit 0 is high while
// it runs, bit 1 while the MemoryBus loader is busy, bit 2 while its command
// queue is full; done pulses at the end.
//   CMD_INIT  MSE of the four initial vectors R_IV0..R_IV0+3, issued back to
//             back; the smallest (first on a tie) goes to R_BVEC / R_BMSE.
//   CMD_VEC   MSE of the search vector R_SVEC; vector and MSE to R_BVEC/R_BMSE.
//   CMD_DIFF  x and y differential coefficients at R_SVEC to R_DEX / R_DEY.
//   CMD_LINE  1-dimensional search from R_BVEC (MSE R_BMSE) in direction R_DIR
//             with step width R_STEP: the vector is moved one step at a time
//             and evaluated, as long as the MSE decreases, the next vector stays
//             inside the search range and fewer than R_NCYC steps were taken;
//             R_BVEC / R_BMSE then hold the temporary solution.
// R_DIR codes 0..7 are the directions +x, +x+y, +y, -x+y, -x, -x-y, -y, +x-y
// (a step of R_STEP in each moving coordinate). R_NEVAL counts the
// evaluations of the last command. R_LAYER (1..3, reset 1) selects the image
// layer of the hierarchical search: block 16 >> (layer-1) pixels, search
// range H +-(128 >> (layer-1)), V +-(64 >> (layer-1)); it goes to the address
// generators and the loader. Vectors given to the datapath are limited to one
// pixel inside that range (H -127..+126, V -63..+62 in layer 1). Writing
// R_LDCMD hands a command to the loader (bit 0: kind) with R_LDFX, R_LDFY,
// R_LDBC and R_LDSLOT; the loader holds two, and a write while STATUS bit 2
// is high, or in the clock right after another R_LDCMD write, is ignored.
// The loader has its own template slot register, so a template can be
// loaded into one slot while the search reads another (R_SLOT). The four
// commands, the listed parameters and stopping the line search without the
// controller follow the document; the register map, encodings and the
// clamping are this design's choice. R_TBSIZE and R_SWSIZE
// are kept for the controller only (the sizes follow from the layer).
module sequencer
  import me_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  // local bus
  input  logic             lb_sel,
  input  logic             lb_we,
  input  logic [5:0]       lb_addr,
  input  logic [31:0]      lb_wdata,
  output logic [31:0]      lb_rdata,
  output logic             done,
  // address generators
  output logic             ag_start,
  input  logic             ag_ready,
  output pe_mode_e         ag_mode,
  output logic [1:0]       ag_lyr,
  output mv_t              ag_vec,
  output logic [11:0]      ag_mbx,
  output logic [2:0]       ag_slot,
  // datapath result
  input  acc_t             result,
  input  logic             result_valid,
  // MemoryBus loader
  output logic             ld_start,
  output logic             ld_kind,
  output logic [11:0]      ld_fx,
  output logic signed [12:0] ld_fy,
  output logic [BC_W-1:0]  ld_bc,
  output logic [2:0]       ld_slot,
  output logic [1:0]       ld_lyr,
  input  logic             ld_busy,
  input  logic             ld_full
);


  typedef enum logic [1:0] {S_IDLE, S_RUN, S_NEXT} state_e;

  // registers
  logic [11:0] mbx_q;
  logic [2:0]  slot_q, dir_q, ldslot_q;
  mv_t         iv_q [4];
  mv_t         svec_q, bvec_q, cand_q;
  logic [7:0]  step_q, ncyc_q, nstep_q;
  logic [3:0]  layer_q;
  logic [15:0] tbsize_q, swsize_q;
  acc_t        bmse_q, dex_q, dey_q;
  logic [15:0] neval_q;
  logic [11:0] ldfx_q;
  logic signed [12:0] ldfy_q;
  logic [BC_W-1:0] ldbc_q;

  state_e      state;
  seq_cmd_e    cmd_q;
  logic [2:0]  nops, nissued, nres;

  // image layer - 1, and the usable vector range of that layer
  logic [1:0] lyr;
  logic signed [11:0] vx_min, vx_max, vy_min, vy_max;
  always_comb begin
    lyr    = (layer_q == 4'd0) ? 2'd0 : (layer_q > 4'd3) ? 2'd2 : 2'(layer_q - 4'd1);
    vx_max = 12'((RANGE_X >> lyr) - 2);
    vx_min = 12'(-(RANGE_X >> lyr) + 1);
    vy_max = 12'((RANGE_Y >> lyr) - 2);
    vy_min = 12'(-(RANGE_Y >> lyr) + 1);
  end

  function automatic mv_t clampv(input mv_t v);
    mv_t r = v;
    if (12'(v.x) < vx_min) r.x = 10'(vx_min);
    if (12'(v.x) > vx_max) r.x = 10'(vx_max);
    if (12'(v.y) < vy_min) r.y = 10'(vy_min);
    if (12'(v.y) > vy_max) r.y = 10'(vy_max);
    return r;
  endfunction

  function automatic logic inrange(input logic signed [11:0] x, input logic signed [11:0] y);
    return x >= vx_min && x <= vx_max && y >= vy_min && y <= vy_max;
  endfunction

  // step vector of the search direction
  logic signed [11:0] sx, sy, nx, ny;
  always_comb begin
    logic signed [1:0] ux, uy;
    case (dir_q)
      3'd0: begin ux =  2'sd1; uy =  2'sd0; end
      3'd1: begin ux =  2'sd1; uy =  2'sd1; end
      3'd2: begin ux =  2'sd0; uy =  2'sd1; end
      3'd3: begin ux = -2'sd1; uy =  2'sd1; end
      3'd4: begin ux = -2'sd1; uy =  2'sd0; end
      3'd5: begin ux = -2'sd1; uy = -2'sd1; end
      3'd6: begin ux =  2'sd0; uy = -2'sd1; end
      default: begin ux = 2'sd1; uy = -2'sd1; end
    endcase
    sx = 12'(ux) * $signed({4'd0, step_q});
    sy = 12'(uy) * $signed({4'd0, step_q});
    nx = 12'(bvec_q.x) + sx;
    ny = 12'(bvec_q.y) + sy;
  end

  // operation i of the running command
  function automatic mv_t op_vec(input logic [2:0] i);
    case (cmd_q)
      CMD_INIT: return clampv(iv_q[i[1:0]]);
      CMD_LINE: return cand_q;
      default:  return clampv(svec_q);
    endcase
  endfunction

  assign ag_start = (state == S_RUN) && (nissued < nops);
  assign ag_mode  = (cmd_q == CMD_DIFF) ? ((nissued == 3'd0) ? M_DX : M_DY) : M_MSE;
  assign ag_vec   = op_vec(nissued);
  assign ag_mbx   = mbx_q;
  assign ag_lyr   = lyr;
  assign ag_slot  = slot_q;

  logic wr;
  assign wr = lb_sel && lb_we;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mbx_q <= '0; slot_q <= '0; dir_q <= '0; step_q <= 8'd1; ncyc_q <= 8'd255;
      for (int i = 0; i < 4; i++) iv_q[i] <= '0;
      svec_q <= '0; bvec_q <= '0; cand_q <= '0; nstep_q <= '0;
      layer_q <= 4'd1; tbsize_q <= '0; swsize_q <= '0;
      bmse_q <= '0; dex_q <= '0; dey_q <= '0; neval_q <= '0;
      ldfx_q <= '0; ldfy_q <= '0; ldbc_q <= '0; ldslot_q <= '0;
      state <= S_IDLE; cmd_q <= CMD_NONE; nops <= '0; nissued <= '0; nres <= '0;
      done <= 1'b0; ld_start <= 1'b0; ld_kind <= 1'b0;
    end else begin
      done     <= 1'b0;
      ld_start <= 1'b0;
      // register writes
      if (wr) begin
        case (lb_addr)
          R_MBX:    mbx_q    <= lb_wdata[11:0];
          R_SLOT:   slot_q   <= lb_wdata[2:0];
          R_SVEC:   svec_q   <= mv_unpack(lb_wdata);
          R_DIR:    dir_q    <= lb_wdata[2:0];
          R_STEP:   step_q   <= lb_wdata[7:0];
          R_NCYC:   ncyc_q   <= lb_wdata[7:0];
          R_LAYER:  layer_q  <= lb_wdata[3:0];
          R_TBSIZE: tbsize_q <= lb_wdata[15:0];
          R_SWSIZE: swsize_q <= lb_wdata[15:0];
          R_LDFX:   ldfx_q   <= lb_wdata[11:0];
          R_LDFY:   ldfy_q   <= lb_wdata[12:0];
          R_LDBC:   ldbc_q   <= lb_wdata[BC_W-1:0];
          R_LDSLOT: ldslot_q <= lb_wdata[2:0];
          R_LDCMD:  if (!ld_full && !ld_start) begin ld_start <= 1'b1; ld_kind <= lb_wdata[0]; end
          default: ;
        endcase
        if (lb_addr[5:2] == R_IV0[5:2]) iv_q[lb_addr[1:0]] <= mv_unpack(lb_wdata);
        if (state == S_IDLE) begin
          if (lb_addr == R_BVEC) bvec_q <= mv_unpack(lb_wdata);
          if (lb_addr == R_BMSE) bmse_q <= lb_wdata;
        end
      end

      case (state)
        S_IDLE: if (wr && lb_addr == R_CMD) begin
          cmd_q   <= seq_cmd_e'(lb_wdata[2:0]);
          nissued <= '0;
          nres    <= '0;
          neval_q <= '0;
          nstep_q <= '0;
          state   <= S_RUN;
          case (seq_cmd_e'(lb_wdata[2:0]))
            CMD_INIT: nops <= 3'd4;
            CMD_VEC:  nops <= 3'd1;
            CMD_DIFF: nops <= 3'd2;
            CMD_LINE: begin nops <= 3'd1; state <= S_NEXT; end
            default:  begin state <= S_IDLE; done <= 1'b1; end
          endcase
        end
        S_NEXT: begin
          // next vector of the line search, or stop
          if (nstep_q < ncyc_q && inrange(nx, ny)) begin
            cand_q  <= '{y: ny[9:0], x: nx[9:0]};
            nissued <= '0;
            nres    <= '0;
            state   <= S_RUN;
          end else begin
            state <= S_IDLE;
            done  <= 1'b1;
          end
        end
        S_RUN: begin
          if (ag_start && ag_ready) begin
            nissued <= nissued + 3'd1;
            neval_q <= neval_q + 16'd1;
          end
          if (result_valid) begin
            nres <= nres + 3'd1;
            case (cmd_q)
              CMD_INIT: if (nres == 3'd0 || result < bmse_q) begin
                bvec_q <= op_vec(nres);
                bmse_q <= result;
              end
              CMD_VEC: begin
                bvec_q <= op_vec(nres);
                bmse_q <= result;
              end
              CMD_DIFF: if (nres == 3'd0) dex_q <= result; else dey_q <= result;
              default: ;  // CMD_LINE below
            endcase
            if (nres == nops - 3'd1) begin
              if (cmd_q == CMD_LINE) begin
                nstep_q <= nstep_q + 8'd1;
                if (result < bmse_q) begin
                  bvec_q <= cand_q;
                  bmse_q <= result;
                  state  <= S_NEXT;
                end else begin
                  state <= S_IDLE;
                  done  <= 1'b1;
                end
              end else begin
                state <= S_IDLE;
                done  <= 1'b1;
              end
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign ld_fx   = ldfx_q;
  assign ld_fy   = ldfy_q;
  assign ld_bc   = ldbc_q;
  assign ld_slot = ldslot_q;
  assign ld_lyr  = lyr;

  // register read
  always_comb begin
    lb_rdata = '0;
    case (lb_addr)
      R_STATUS: lb_rdata = {29'd0, ld_full, ld_busy, state != S_IDLE};
      R_MBX:    lb_rdata = 32'(mbx_q);
      R_SLOT:   lb_rdata = 32'(slot_q);
      R_SVEC:   lb_rdata = mv_pack(svec_q);
      R_DIR:    lb_rdata = 32'(dir_q);
      R_STEP:   lb_rdata = 32'(step_q);
      R_NCYC:   lb_rdata = 32'(ncyc_q);
      R_LAYER:  lb_rdata = 32'(layer_q);
      R_TBSIZE: lb_rdata = 32'(tbsize_q);
      R_SWSIZE: lb_rdata = 32'(swsize_q);
      R_BVEC:   lb_rdata = mv_pack(bvec_q);
      R_BMSE:   lb_rdata = bmse_q;
      R_DEX:    lb_rdata = dex_q;
      R_DEY:    lb_rdata = dey_q;
      R_NEVAL:  lb_rdata = 32'(neval_q);
      R_LDFX:   lb_rdata = 32'(ldfx_q);
      R_LDFY:   lb_rdata = 32'(ldfy_q);
      R_LDBC:   lb_rdata = 32'(ldbc_q);
      R_LDSLOT: lb_rdata = 32'(ldslot_q);
      default:  if (lb_addr[5:2] == R_IV0[5:2]) lb_rdata = mv_pack(iv_q[lb_addr[1:0]]);
    endcase
    if (!lb_sel) lb_rdata = '0;
  end

  a_no_result_when_idle: assert property (@(posedge clk) disable iff (!rst_n)
                                          result_valid |-> state == S_RUN);

endmodule
