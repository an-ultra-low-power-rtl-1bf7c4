// sw_sram: one search window (SW) bank, a 3-port SRAM with two read ports and
// one write port (2R1W), 4K words of 8 bits (one pixel per word).
//
// As in the macro it stands for, the array is divided into NBLK blocks of ROWS
// words. A block-select line (BS0..BS7) enables only the addressed block, so a
// row select line drives the 8 cells of one pixel only; here the top address
// bits select the block and the low bits the row within it. The logic function
// is that of a plain 2R1W memory: writes take effect at the clock edge, each
// read port returns the addressed word one clock after the address (a read of
// the word written in the same cycle returns the old value). The sizes follow
// the document; the address split and the read latency are this design's
// choice. Circuit techniques of the real macro (symmetric cell, divided
// wordline power saving) have no logic function and are not modelled.
module sw_sram #(
  parameter int unsigned DEPTH = 4096,
  parameter int unsigned WIDTH = 8,
  parameter int unsigned NBLK  = 8,
  parameter int unsigned ROWS  = DEPTH / NBLK,
  localparam int unsigned AW   = $clog2(DEPTH),
  localparam int unsigned BW   = $clog2(NBLK),
  localparam int unsigned RW   = $clog2(ROWS)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr0,
  output logic [WIDTH-1:0] rdata0,
  input  logic [AW-1:0]    raddr1,
  output logic [WIDTH-1:0] rdata1
);

  // blocks x rows of pixel words
  logic [WIDTH-1:0] mem [NBLK][ROWS];

  initial begin
    assert (NBLK * ROWS == DEPTH) else $error("sw_sram: NBLK*ROWS must equal DEPTH");
  end

  // block select (one-hot BS lines) and row select derived from the address
  logic [BW-1:0] wblk;
  logic [RW-1:0] wrow;
  assign wblk = waddr[AW-1 -: BW];
  assign wrow = waddr[RW-1:0];

  always_ff @(posedge clk) begin
    if (we) mem[wblk][wrow] <= wdata;
    rdata0 <= mem[raddr0[AW-1 -: BW]][raddr0[RW-1:0]];
    rdata1 <= mem[raddr1[AW-1 -: BW]][raddr1[RW-1:0]];
  end

endmodule
