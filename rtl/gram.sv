// gram: graphic memory, one full frame of image words.
//
// The AP writes the image into this memory; every frame reads it back line
// by line, so a self-refresh frame needs nothing from the AP. It is a simple
// dual-port RAM: one write port and one read port, both on clk. The read is
// synchronous: rdata holds the word at raddr one clock after re is high, and
// keeps its value otherwise. A write and a read of the same address in the
// same cycle return the old word.
//
// Published: the frame is stored in graphic memory inside the DDI and read
// back in self-refresh frames. Own choices: word organisation (DEPTH words
// of WORD_W bits, line after line, left to right), port structure, latency.
// Default size: 3200 lines x 720 words x 48 bits (1440 x 3200 x 24 bit).
module gram
  import ddi_pkg::*;
#(
  parameter int unsigned WORD_W = PIX_W_DEF * PPW_DEF,
  parameter int unsigned DEPTH  = VSIZE_DEF * (HSIZE_DEF / PPW_DEF),
  localparam int unsigned AW    = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              we,
  input  logic [AW-1:0]     waddr,
  input  logic [WORD_W-1:0] wdata,
  input  logic              re,
  input  logic [AW-1:0]     raddr,
  output logic [WORD_W-1:0] rdata
);

  logic [WORD_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (re) rdata <= mem[raddr];
  end

endmodule
