// pe: processing element of the SIMD datapath, one pixel per clock.
//
// Two subtractors feed a register stage, a multiplier feeds a second register
// stage, as in the document's PE. For the mean square error (mode M_MSE) both
// subtractors form T - S and the product is (T - S)^2. For a differential
// coefficient (M_DX, M_DY) the first forms T - S of the centre pixel and the
// second the difference of the two neighbours, S+1 - S-1 (right minus left, or
// lower minus upper), and the product is (T - S)(S+1 - S-1); this sign follows
// the document's equations. Which pixels arrive as centre and neighbours is
// decided outside, in simd_half. Differences are 9 bits signed, the product
// 18 bits signed. Latency is two clocks; prod is 0 when the operands were
// not valid, so an adder tree may sum every PE unconditionally.
module pe
  import me_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     in_valid,
  input  pe_mode_e mode,
  input  pix_t     t,      // template pixel
  input  pix_t     sc,     // centre search window pixel
  input  pix_t     sm,     // left / upper neighbour
  input  pix_t     sp,     // right / lower neighbour
  output prod_t    prod,
  output logic     out_valid
);

  logic signed [8:0] d1_q, d2_q;
  logic              v1_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d1_q      <= '0;
      d2_q      <= '0;
      v1_q      <= 1'b0;
      prod      <= '0;
      out_valid <= 1'b0;
    end else begin
      // stage 1: subtractors
      d1_q <= $signed({1'b0, t}) - $signed({1'b0, sc});
      d2_q <= (mode == M_MSE) ? $signed({1'b0, t}) - $signed({1'b0, sc})
                              : $signed({1'b0, sp}) - $signed({1'b0, sm});
      v1_q <= in_valid;
      // stage 2: multiplier
      prod      <= v1_q ? prod_t'(d1_q * d2_q) : '0;
      out_valid <= v1_q;
    end
  end

endmodule
