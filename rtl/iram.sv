// iram: instruction RAM of the embedded RISC controller.
//
// WORDS x 32-bit single-clock RAM with a fetch (read) port for the processor
// and a write port through which the program is loaded. Reads return the word
// one clock after the address. The document names this RAM only; its size,
// width and ports are this design's choice.
module iram #(
  parameter int unsigned WORDS = 1024,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [31:0]   wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [31:0]   rdata
);

  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

endmodule
