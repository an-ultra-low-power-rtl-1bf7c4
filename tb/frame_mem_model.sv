// frame_mem_model: behavioural model of the external frame memory on the
// MemoryBus (not synthesizable). Accepts a read request when req_ready is
// high (ready drops at random when STALL is set), and returns the 64-bit word
// LAT clocks later, in request order. Pixel values, of any of the three
// image layers, come from tb_ref_pkg.
module frame_mem_model
  import tb_ref_pkg::*;
#(
  parameter int LAT   = 3,
  parameter bit STALL = 1'b1
) (
  input  logic              clk,
  input  logic              req_valid,
  output logic              req_ready,
  input  logic              req_frame,
  input  logic [1:0]        req_layer,
  input  logic [8:0]        req_x,
  input  logic signed [12:0] req_y,
  output logic              rsp_valid,
  output logic [63:0]       rsp_data,
  output int                n_stall
);

  logic [63:0] pipe_d [LAT];
  logic        pipe_v [LAT];

  initial begin
    req_ready = 1'b1;
    n_stall   = 0;
    for (int i = 0; i < LAT; i++) begin pipe_v[i] = 1'b0; pipe_d[i] = '0; end
  end

  always @(posedge clk) begin
    for (int i = LAT - 1; i > 0; i--) begin
      pipe_v[i] <= pipe_v[i-1];
      pipe_d[i] <= pipe_d[i-1];
    end
    pipe_v[0] <= req_valid && req_ready;
    pipe_d[0] <= bus_word(req_frame, int'(req_x), int'(req_y), int'(req_layer));
    if (req_valid && !req_ready) n_stall <= n_stall + 1;
    req_ready <= STALL ? (($urandom % 8) != 0) : 1'b1;
  end

  assign rsp_valid = pipe_v[LAT-1];
  assign rsp_data  = pipe_d[LAT-1];

endmodule
