// conv_ip_core: the convolution IP core.
//
// The controller walks the weight-stationary loop nest and issues reads to
// the input and weight global buffers; the line engine of E KCPEs turns each
// input pixel into K per-kernel partial sums of one kernel row; the psum
// accumulate router adds those into the output global buffer. One pixel
// enters per cycle while streaming, so a run takes about
// (M/K)*(C/J)*R*P*W cycles plus E + 6 cycles per pass, which for S = E is
// the published performance model H*W*C*M*R*S/(E*K*J) with P in place of H.
// The split into controller, engine and accumulator follows the published
// block diagram and schematic; buffer ports are this design's own.
//
// Interface:  conf/start from the register file; ib_*/wb_* read the input
//             and weight buffers (one-cycle latency); memctrl0_* is the
//             output buffer port. o_done pulses at the end of a run.
module conv_ip_core
#(
  parameter int unsigned E        = conv_pkg::E,
  parameter int unsigned K        = conv_pkg::K,
  parameter int unsigned J        = conv_pkg::J,
  parameter int unsigned DATA_W   = conv_pkg::DATA_W,
  parameter int unsigned PSUM_W   = conv_pkg::PSUM_W,
  parameter int unsigned OUT_W    = conv_pkg::OUT_W,
  parameter int unsigned IN_W     = 32,
  parameter int unsigned OB_DEPTH = 131072
) (
  input  logic                  clk,
  input  logic                  rst,
  input  conv_pkg::conv_conf_t            conf,
  input  logic                  start,
  output logic                  ib_rden,
  output logic [conv_pkg::ADDR_W-1:0]     ib_raddr,
  input  logic [IN_W-1:0]       ib_rdata,
  output logic                  wb_rden,
  output logic [conv_pkg::ADDR_W-1:0]     wb_raddr,
  input  logic [K*J*DATA_W-1:0] wb_rdata,
  output logic [conv_pkg::ADDR_W-1:0]     memctrl0_radd,
  output logic                  memctrl0_rden,
  input  logic [K*OUT_W-1:0]    memctrl0_odat,
  input  logic                  memctrl0_ovld,
  output logic [conv_pkg::ADDR_W-1:0]     memctrl0_wadd,
  output logic [K*OUT_W-1:0]    memctrl0_idat,
  output logic                  memctrl0_wren,
  output logic                  o_busy,
  output logic                  o_done,
  output logic                  o_overflow,
  output logic                  o_conf_err
);

  logic                 eng_weight_vld, eng_data_vld, psum_vld, accum_busy, ctrl_busy;
  logic [$clog2(E)-1:0] eng_weight_sel;
  conv_pkg::psum_tag_t            eng_tag, psum_tag;
  logic [PSUM_W-1:0]    psum [K];

  conv_controller #(.E(E), .K(K), .J(J)) u_ctrl (
    .clk            (clk),
    .rst            (rst),
    .conf           (conf),
    .start          (start),
    .wb_rden        (wb_rden),
    .wb_raddr       (wb_raddr),
    .ib_rden        (ib_rden),
    .ib_raddr       (ib_raddr),
    .eng_weight_vld (eng_weight_vld),
    .eng_weight_sel (eng_weight_sel),
    .eng_data_vld   (eng_data_vld),
    .eng_tag        (eng_tag),
    .o_busy         (ctrl_busy),
    .o_done         (o_done),
    .o_conf_err     (o_conf_err)
  );

  line_kcpe_conv2d_engine #(.E(E), .K(K), .J(J), .DATA_W(DATA_W), .PSUM_W(PSUM_W)) u_engine (
    .clk          (clk),
    .rst          (rst),
    .i_weight_vld (eng_weight_vld),
    .i_weight_sel (eng_weight_sel),
    .i_weight     (wb_rdata),
    .i_data_vld   (eng_data_vld),
    .i_data       (ib_rdata[J*DATA_W-1:0]),
    .i_tag        (eng_tag),
    .o_psum_vld   (psum_vld),
    .o_psum       (psum),
    .o_tag        (psum_tag)
  );

  psum_accum_ctrl #(.K(K), .PSUM_W(PSUM_W), .OUT_W(OUT_W), .DEPTH(OB_DEPTH)) u_accum (
    .clk           (clk),
    .rst           (rst),
    .psum_vld      (psum_vld),
    .psum          (psum),
    .tag           (psum_tag),
    .memctrl0_radd (memctrl0_radd),
    .memctrl0_rden (memctrl0_rden),
    .memctrl0_odat (memctrl0_odat),
    .memctrl0_ovld (memctrl0_ovld),
    .memctrl0_wadd (memctrl0_wadd),
    .memctrl0_idat (memctrl0_idat),
    .memctrl0_wren (memctrl0_wren),
    .o_overflow    (o_overflow),
    .o_busy        (accum_busy)
  );

  assign o_busy = ctrl_busy || accum_busy;

endmodule
