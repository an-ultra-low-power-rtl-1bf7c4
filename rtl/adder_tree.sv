// adder_tree: sums the products of all PEs and accumulates them over one
// evaluation (one search vector, or one differential coefficient).
//
// The N products of a clock are added by a binary tree of adders and
// registered. A first/last tag travels with each clock's products: on "first"
// the accumulator restarts from that clock's sum, on "last" the finished total
// appears on result with result_valid for one clock, one clock after the
// registered sum. Evaluations may follow one another back to back. Latency from
// products to result is two clocks. The tree and accumulator follow the
// document; widths and tag framing are this design's choice.
module adder_tree
  import me_pkg::*;
#(
  parameter int unsigned N = 32
) (
  input  logic  clk,
  input  logic  rst_n,
  input  prod_t prod [N],
  input  logic  in_active,   // this clock belongs to an evaluation
  input  logic  in_first,
  input  logic  in_last,
  output acc_t  result,
  output logic  result_valid
);

  localparam int unsigned LV = $clog2(N);

  // level l holds N >> l partial sums (zero padded for non powers of two)
  acc_t lvl [LV+1][1 << LV];

  always_comb begin
    for (int i = 0; i < (1 << LV); i++) lvl[0][i] = (i < N) ? acc_t'(prod[i]) : '0;
    for (int l = 1; l <= LV; l++) begin
      for (int i = 0; i < (1 << LV); i++) begin
        lvl[l][i] = (i < ((1 << LV) >> l)) ? lvl[l-1][2*i] + lvl[l-1][2*i+1] : '0;
      end
    end
  end

  acc_t sum_q, acc_q;
  logic act_q, first_q, last_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sum_q <= '0; act_q <= 1'b0; first_q <= 1'b0; last_q <= 1'b0;
      acc_q <= '0; result <= '0; result_valid <= 1'b0;
    end else begin
      sum_q   <= lvl[LV][0];
      act_q   <= in_active;
      first_q <= in_first;
      last_q  <= in_last;
      result_valid <= 1'b0;
      if (act_q) begin
        if (last_q) begin
          result       <= first_q ? sum_q : acc_q + sum_q;
          result_valid <= 1'b1;
        end
        acc_q <= first_q ? sum_q : acc_q + sum_q;
      end
    end
  end

endmodule
