// weight_global_buffer: on-chip store of the kernel weights.
//
// The default 32 KB size is the published one. A word is the 96-bit weight vector of one KCPE (K = 4 kernels by J = 3 channels, kernel k channel j in byte k*J+j), the width of the core's published weight input; 32 KB holds 2730 such words.
// A simple dual-port RAM of DEPTH = BYTES / (WORD_W/8) words: one write
// port on the DMA side, one read port on the core side. It is written as an
// array so that an FPGA flow maps it to block RAM.
//
// Interface:  we/waddr/wdata write a word on the clock edge.
//             rden/raddr read a word; rdata is valid in the next cycle and
//             holds its value until the next read.
// Timing:     one-cycle read latency; a read of the word being written in
//             the same cycle returns the old contents.
module weight_global_buffer #(
  parameter int unsigned BYTES  = 32768,
  parameter int unsigned WORD_W = 96,
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
