// template_buffer: template buffer (TB), the cache of current-frame
// macroblock pixels.
//
// WORDS words of 128 bits; one word is one 16-pixel row of a macroblock
// (pixel i of the row in bits [8i+7:8i]), so a word address is slot*16 + row.
// The write port takes one 64-bit MemoryBus word (8 pixels) and a half select,
// so a row is written in two cycles; the read port returns a whole row one
// clock after the address, concurrently with writing. The 128-bit read width
// and the 12 Kbit size follow the document; the 64-bit write port with half
// select and the slot layout are this design's choice.
module template_buffer #(
  parameter int unsigned WORDS = 96,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic          whalf,   // 0: pixels 0..7, 1: pixels 8..15
  input  logic [63:0]   wdata,
  input  logic [AW-1:0] raddr,
  output logic [127:0]  rdata
);

  logic [63:0] mem_lo [WORDS];
  logic [63:0] mem_hi [WORDS];

  always_ff @(posedge clk) begin
    if (we && !whalf) mem_lo[waddr] <= wdata;
    if (we &&  whalf) mem_hi[waddr] <= wdata;
    rdata <= {mem_hi[raddr], mem_lo[raddr]};
  end

endmodule
