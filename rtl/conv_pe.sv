// conv_pe: one Processing Element of a KCPE.
//
// The PE keeps one weight locally (weight-stationary dataflow). Every cycle
// it multiplies the multicast input activation by that weight and registers
// the product; the registered product is added to the partial sum arriving
// from the PE above it in the same kernel column, and the result goes on to
// the PE below. The multiply-then-add-to-the-column structure follows the
// published PE drawing; registering the product (one pipeline stage) is this
// design's choice.
//
// Interface:  w_load/w_in load the stationary weight on the next edge.
//             a_in is the activation, psum_in the column partial sum.
// Timing:     psum_out = psum_in + (a_in * w) of the previous cycle.
//             Operands are unsigned; the sum wraps at PSUM_W bits.
module conv_pe #(
  parameter int unsigned DATA_W = conv_pkg::DATA_W,
  parameter int unsigned PSUM_W = conv_pkg::PSUM_W
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              w_load,
  input  logic [DATA_W-1:0] w_in,
  input  logic [DATA_W-1:0] a_in,
  input  logic [PSUM_W-1:0] psum_in,
  output logic [PSUM_W-1:0] psum_out
);

  logic [DATA_W-1:0]   w_q;
  logic [2*DATA_W-1:0] prod_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      w_q    <= '0;
      prod_q <= '0;
    end else begin
      if (w_load) w_q <= w_in;
      prod_q <= a_in * w_q;
    end
  end

  always_comb psum_out = psum_in + PSUM_W'(prod_q);

endmodule
