// input_global_buffer: on-chip store of the input feature map.
//
// The default 256 KB size is the published one. Each 32-bit word holds the J = 3 eight-bit channels of one pixel in its low 24 bits, channel j in bits [8j+7:8j]; the word width is this design's choice.
// A simple dual-port RAM of DEPTH = BYTES / (WORD_W/8) words: one write
// port on the DMA side, one read port on the core side. It is written as an
// array so that an FPGA flow maps it to block RAM.
//
// Interface:  we/waddr/wdata write a word on the clock edge.
//             rden/raddr read a word; rdata is valid in the next cycle and
//             holds its value until the next read.
// Timing:     one-cycle read latency; a read of the word being written in
//             the same cycle returns the old contents.
module input_global_buffer #(
  parameter int unsigned BYTES  = 262144,
  parameter int unsigned WORD_W = 32,
  parameter int unsigned DEPTH  = BYTES / (WORD_W / 8),
  parameter int unsigned AW     = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              we,
  input  logic [AW-1:0]     waddr,
  input  logic [WORD_W-1:0] wdata,
  input  logic              rden,
  input  logic [AW-1:0]     raddr,
  output logic [WORD_W-1:0] rdata
);

  logic [WORD_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we && (32'(waddr) < DEPTH)) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (rden) rdata <= (32'(raddr) < DEPTH) ? mem[raddr] : '0;
  end

endmodule
