// conv_accel_top: the accelerator's configurable-fabric subsystem.
//
// Register file, input/weight/output global buffers and the convolution IP
// core, connected as in the published system diagram. The host processor,
// the DMA engine and the off-chip DDR are outside: the processor's register
// accesses arrive on reg_*, the DMA writes the input and weight buffers on
// ib_*/wb_* and reads results from the output buffer on ob_* (the read port
// is handed to the DMA while the core is idle). Buffer sizes default to the
// published 256 KB / 32 KB / 512 KB. The core reset is the system reset
// ORed with the soft-reset bit of CTRL, as in the published schematic.
//
// Use: load the buffers, write the shape registers, write CTRL = 1, wait
// for irq_done (or poll STATUS), read the outputs. When the outputs of a
// layer exceed the output buffer, the host splits the kernels into several
// runs and drains the buffer between them; STATUS bit 2 flags a run whose
// outputs did not fit.
// Timing: ob_rdata is valid the cycle after ob_rd; reg_rdata likewise.
module conv_accel_top
  import conv_pkg::*;
#(
  parameter int unsigned IB_BYTES = 262144,
  parameter int unsigned WB_BYTES = 32768,
  parameter int unsigned OB_BYTES = 524288,
  localparam int unsigned WB_W    = K * J * DATA_W,
  localparam int unsigned IB_DEPTH = IB_BYTES / 4,
  localparam int unsigned WB_DEPTH = WB_BYTES / (WB_W / 8),
  localparam int unsigned OB_DEPTH = OB_BYTES / 4,
  localparam int unsigned IB_AW   = $clog2(IB_DEPTH),
  localparam int unsigned WB_AW   = $clog2(WB_DEPTH),
  localparam int unsigned OB_AW   = $clog2(OB_DEPTH)
) (
  input  logic             clk,
  input  logic             rst,
  // processor register port
  input  logic             reg_wr,
  input  logic             reg_rd,
  input  logic [7:0]       reg_addr,
  input  logic [31:0]      reg_wdata,
  output logic [31:0]      reg_rdata,
  // DMA side of the buffers
  input  logic             ib_we,
  input  logic [IB_AW-1:0] ib_waddr,
  input  logic [31:0]      ib_wdata,
  input  logic             wb_we,
  input  logic [WB_AW-1:0] wb_waddr,
  input  logic [WB_W-1:0]  wb_wdata,
  input  logic             ob_rd,
  input  logic [OB_AW-1:0] ob_raddr,
  output logic [31:0]      ob_rdata,
  // run-complete pulse to the processor
  output logic             irq_done
);

  conv_conf_t        conf;
  logic              start, soft_rst, core_rst, busy, done, overflow, conf_err;
  logic              ib_rden, wb_rden, core_ob_rden, ob_wren, ob_ovld;
  logic [ADDR_W-1:0] ib_raddr, wb_raddr, core_ob_radd, ob_wadd;
  logic [31:0]       ib_rdata, ob_idat, ob_odat;
  logic [WB_W-1:0]   wb_rdata;

  assign core_rst = rst | soft_rst;

  conv_regfile u_regfile (
    .clk       (clk),
    .rst       (rst),
    .reg_wr    (reg_wr),
    .reg_rd    (reg_rd),
    .reg_addr  (reg_addr),
    .reg_wdata (reg_wdata),
    .reg_rdata (reg_rdata),
    .conf      (conf),
    .start     (start),
    .soft_rst  (soft_rst),
    .busy      (busy),
    .done      (done),
    .overflow  (overflow),
    .conf_err  (conf_err)
  );

  input_global_buffer #(.BYTES(IB_BYTES), .WORD_W(32)) u_ibuf (
    .clk   (clk),
    .we    (ib_we),
    .waddr (ib_waddr),
    .wdata (ib_wdata),
    .rden  (ib_rden),
    .raddr (ib_raddr[IB_AW-1:0]),
    .rdata (ib_rdata)
  );

  weight_global_buffer #(.BYTES(WB_BYTES), .WORD_W(WB_W)) u_wbuf (
    .clk   (clk),
    .we    (wb_we),
    .waddr (wb_waddr),
    .wdata (wb_wdata),
    .rden  (wb_rden),
    .raddr (wb_raddr[WB_AW-1:0]),
    .rdata (wb_rdata)
  );

  // The output buffer's read port belongs to the core while it is busy.
  logic             ob_rden;
  logic [OB_AW-1:0] ob_radd;
  assign ob_rden = busy ? core_ob_rden : ob_rd;
  assign ob_radd = busy ? core_ob_radd[OB_AW-1:0] : ob_raddr;

  output_global_buffer #(.BYTES(OB_BYTES), .WORD_W(32)) u_obuf (
    .clk  (clk),
    .rst  (rst),
    .wren (ob_wren),
    .wadd (ob_wadd[OB_AW-1:0]),
    .idat (ob_idat),
    .rden (ob_rden),
    .radd (ob_radd),
    .odat (ob_odat),
    .ovld (ob_ovld)
  );
  assign ob_rdata = ob_odat;

  conv_ip_core #(.IN_W(32), .OB_DEPTH(OB_DEPTH)) u_core (
    .clk           (clk),
    .rst           (core_rst),
    .conf          (conf),
    .start         (start),
    .ib_rden       (ib_rden),
    .ib_raddr      (ib_raddr),
    .ib_rdata      (ib_rdata),
    .wb_rden       (wb_rden),
    .wb_raddr      (wb_raddr),
    .wb_rdata      (wb_rdata),
    .memctrl0_radd (core_ob_radd),
    .memctrl0_rden (core_ob_rden),
    .memctrl0_odat (ob_odat),
    .memctrl0_ovld (ob_ovld),
    .memctrl0_wadd (ob_wadd),
    .memctrl0_idat (ob_idat),
    .memctrl0_wren (ob_wren),
    .o_busy        (busy),
    .o_done        (done),
    .o_overflow    (overflow),
    .o_conf_err    (conf_err)
  );

  assign irq_done = done;

endmodule
