// line_kcpe_conv2d_engine: a line of E KCPEs computing one kernel row.
//
// Input pixels (J channels each) arrive one per cycle, in raster order along
// an input row, and shift into an E-pixel window. KCPE e sees window pixel e
// and holds the weights of kernel column s = e of the current kernel row, so
// after the window is full the E KCPE outputs, added per kernel, are the
// contribution of one kernel row to one output pixel for K kernels at once.
// Weights stay in the PEs for a whole pass over the input (weight-stationary).
// The line of KCPEs, the per-kernel adders after them and the 4-cycle
// latency follow the published description; the window, the per-KCPE weight
// select and the sideband tag are this design's own.
//
// Interface:  i_weight_vld/i_weight_sel load the K*J weight vector into KCPE
//             i_weight_sel. i_data_vld/i_data/i_tag bring one pixel and the
//             tag of the output whose window ends at that pixel.
// Timing:     o_psum_vld/o_psum/o_tag follow i_data_vld by N_DELAY = 4 cycles:
//             window register, PE product, KCPE column sum, kernel sum.
//             Weights must not change while pixels are in flight.
module line_kcpe_conv2d_engine
#(
  parameter int unsigned E      = conv_pkg::E,
  parameter int unsigned K      = conv_pkg::K,
  parameter int unsigned J      = conv_pkg::J,
  parameter int unsigned DATA_W = conv_pkg::DATA_W,
  parameter int unsigned PSUM_W = conv_pkg::PSUM_W
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  i_weight_vld,
  input  logic [$clog2(E)-1:0]  i_weight_sel,
  input  logic [K*J*DATA_W-1:0] i_weight,
  input  logic                  i_data_vld,
  input  logic [J*DATA_W-1:0]   i_data,
  input  conv_pkg::psum_tag_t             i_tag,
  output logic                  o_psum_vld,
  output logic [PSUM_W-1:0]     o_psum [K],
  output conv_pkg::psum_tag_t             o_tag
);

  localparam int unsigned LAT = conv_pkg::N_DELAY;  // window, product, column sum, kernel sum

  // Sliding window: win[E-1] is the newest pixel, win[0] the oldest.
  logic [J*DATA_W-1:0] win [E];
  always_ff @(posedge clk) begin
    if (rst) begin
      for (int e = 0; e < E; e++) win[e] <= '0;
    end else if (i_data_vld) begin
      for (int e = 0; e < E-1; e++) win[e] <= win[e+1];
      win[E-1] <= i_data;
    end
  end

  logic [PSUM_W-1:0] kpsum [E][K];
  for (genvar e = 0; e < E; e++) begin : g_kcpe
    conv_kcpe #(.K(K), .J(J), .DATA_W(DATA_W), .PSUM_W(PSUM_W)) u_kcpe (
      .clk           (clk),
      .rst           (rst),
      .i_weight_load (i_weight_vld && (i_weight_sel == e)),
      .i_weight      (i_weight),
      .i_data        (win[e]),
      .o_psum        (kpsum[e])
    );
  end

  // Per-kernel sum over the E KCPEs.
  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < K; k++) o_psum[k] <= '0;
    end else begin
      for (int k = 0; k < K; k++) begin
        logic [PSUM_W-1:0] acc;
        acc = '0;
        for (int e = 0; e < E; e++) acc = acc + kpsum[e][k];
        o_psum[k] <= acc;
      end
    end
  end

  // Valid and tag travel alongside the data.
  logic      vld_q [LAT];
  conv_pkg::psum_tag_t tag_q [LAT];
  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < LAT; i++) begin
        vld_q[i] <= 1'b0;
        tag_q[i] <= '0;
      end
    end else begin
      vld_q[0] <= i_data_vld;
      tag_q[0] <= i_tag;
      for (int i = 1; i < LAT; i++) begin
        vld_q[i] <= vld_q[i-1];
        tag_q[i] <= tag_q[i-1];
      end
    end
  end

  assign o_psum_vld = vld_q[LAT-1];
  assign o_tag      = tag_q[LAT-1];

endmodule
