// crosspath: pixel sorting network between the 8 SW banks of one datapath half
// and its 16 PEs.
//
// Window column x is stored in bank x mod 8. To read the 16 pixels of columns
// c..c+15 of one row, port 0 of each bank reads the column of that bank in
// c..c+7 and port 1 the one in c+8..c+15. The crosspath then puts them back in
// template order: PE column k takes port k/8 of bank (c+k) mod 8, where rot is
// c mod 8. It is purely combinational. The document builds it from 1:16
// demultiplexers (each bank port steered to one PE); the equivalent
// per-PE multiplexer form is written here. The column interleave is this
// design's choice.
module crosspath
  import me_pkg::*;
(
  input  logic [2:0] rot,
  input  pix_t       sw_pix [NBANK][2],   // [bank][port]
  output pix_t       pe_pix [NPE_HALF]
);

  always_comb begin
    for (int k = 0; k < NPE_HALF; k++) begin
      pe_pix[k] = sw_pix[3'(rot + 3'(k))][k / NBANK];
    end
  end

endmodule
