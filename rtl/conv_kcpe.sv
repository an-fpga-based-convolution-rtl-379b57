// conv_kcpe: Kernel-Channel Processing Engine.
//
// A K x J matrix of PEs. Row j receives channel j of one input pixel and
// multicasts it to all K kernel columns; column k holds the weights
// W[k][0..J-1] of one kernel position and chains its PEs' adders, so the
// bottom of column k is the dot product of the pixel's J channels with
// kernel k. The K column sums are registered at the engine's output.
//
// Packing (matches the published waveform): channel j of i_data is
// bits [8j+7:8j]; weight (kernel k, channel j) of i_weight is byte k*J+j.
//
// Interface:  i_weight_load loads all K*J weights at once.
// Timing:     o_psum[k] is valid two cycles after i_data (product register
//             in the PE, then the column-sum register here).
module conv_kcpe #(
  parameter int unsigned K      = conv_pkg::K,
  parameter int unsigned J      = conv_pkg::J,
  parameter int unsigned DATA_W = conv_pkg::DATA_W,
  parameter int unsigned PSUM_W = conv_pkg::PSUM_W
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    i_weight_load,
  input  logic [K*J*DATA_W-1:0]   i_weight,
  input  logic [J*DATA_W-1:0]     i_data,
  output logic [PSUM_W-1:0]       o_psum [K]
);

  for (genvar k = 0; k < K; k++) begin : g_col
    for (genvar j = 0; j < J; j++) begin : g_row
      logic [PSUM_W-1:0] psum_up, psum_dn;
      if (j == 0) begin : g_top
        assign psum_up = '0;
      end else begin : g_mid
        assign psum_up = g_row[j-1].psum_dn;
      end
      conv_pe #(.DATA_W(DATA_W), .PSUM_W(PSUM_W)) u_pe (
        .clk      (clk),
        .rst      (rst),
        .w_load   (i_weight_load),
        .w_in     (i_weight[(k*J+j)*DATA_W +: DATA_W]),
        .a_in     (i_data[j*DATA_W +: DATA_W]),
        .psum_in  (psum_up),
        .psum_out (psum_dn)
      );
    end
    always_ff @(posedge clk) begin
      if (rst) o_psum[k] <= '0;
      else     o_psum[k] <= g_row[J-1].psum_dn;
    end
  end

endmodule
