// output_global_buffer: on-chip store of the output feature maps.
//
// The default 512 KB size is the published one. Each 32-bit word holds the
// outputs of one pixel for K = 4 kernels, 8 bits each, kernel k in bits
// [8k+7:8k]. The psum accumulator reads a word, adds to it and writes it
// back, so the RAM has a read port and a separate write port (a simple
// dual-port block RAM); the DMA reads results through the same read port
// while the core is idle (the multiplexer is in the top level).
//
// Interface:  wren/wadd/idat write; rden/radd read.
// Timing:     odat and ovld follow rden by one cycle; odat holds its value
//             until the next read. A read of the word written in the same
//             cycle returns the old contents.
module output_global_buffer #(
  parameter int unsigned BYTES  = 524288,
  parameter int unsigned WORD_W = 32,
  parameter int unsigned DEPTH  = BYTES / (WORD_W / 8),
  parameter int unsigned AW     = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              wren,
  input  logic [AW-1:0]     wadd,
  input  logic [WORD_W-1:0] idat,
  input  logic              rden,
  input  logic [AW-1:0]     radd,
  output logic [WORD_W-1:0] odat,
  output logic              ovld
);

  logic [WORD_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wren && (32'(wadd) < DEPTH)) mem[wadd] <= idat;
  end

  always_ff @(posedge clk) begin
    if (rden) odat <= (32'(radd) < DEPTH) ? mem[radd] : '0;
  end

  always_ff @(posedge clk) begin
    if (rst) ovld <= 1'b0;
    else     ovld <= rden;
  end

endmodule
