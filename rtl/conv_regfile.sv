// conv_regfile: configuration and status registers of the accelerator.
//
// The host processor writes the shapes of the input map, the kernels and
// the output, plus two precomputed products (H*W and P*Q) that let the core
// step its buffer addresses with adders only. Writing CTRL bit 0 starts a
// run (a one-cycle start pulse); CTRL bit 1 is a level soft reset that the
// top ORs with the system reset, as in the published core schematic. STATUS
// reads busy, a sticky done (cleared by the next start), a sticky output
// buffer overflow and a configuration error. Which registers exist follows
// the configuration inputs of the published core (ctrl, input shape, input
// count, kernel shape, kernel size, output size, weight interval); the
// offsets and field packing are this design's own (see conv_pkg).
//
// Interface:  reg_wr/reg_addr/reg_wdata write on the clock edge; reg_rdata
//             is registered and valid the cycle after reg_rd.
// Timing:     start is high for the one cycle after the CTRL write.
module conv_regfile
  import conv_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        reg_wr,
  input  logic        reg_rd,
  input  logic [7:0]  reg_addr,
  input  logic [31:0] reg_wdata,
  output logic [31:0] reg_rdata,
  output conv_conf_t  conf,
  output logic        start,
  output logic        soft_rst,
  input  logic        busy,
  input  logic        done,
  input  logic        overflow,
  input  logic        conf_err
);

  logic [31:0] inputshape_q, inputrstcnt_q, kernelshape_q, kernelsize_q;
  logic [31:0] outputsize_q, weightinterval_q;
  logic        done_q, ovf_q, err_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      inputshape_q     <= '0;
      inputrstcnt_q    <= '0;
      kernelshape_q    <= '0;
      kernelsize_q     <= '0;
      outputsize_q     <= '0;
      weightinterval_q <= '0;
      start            <= 1'b0;
      soft_rst         <= 1'b0;
      done_q           <= 1'b0;
      ovf_q            <= 1'b0;
      err_q            <= 1'b0;
      reg_rdata        <= '0;
    end else begin
      start <= 1'b0;
      if (reg_wr) begin
        unique case (reg_addr)
          REG_CTRL: begin
            start    <= reg_wdata[CTRL_START_BIT] && !busy;
            soft_rst <= reg_wdata[CTRL_SRST_BIT];
          end
          REG_INPUTSHAPE:     inputshape_q     <= reg_wdata;
          REG_INPUTRSTCNT:    inputrstcnt_q    <= reg_wdata;
          REG_KERNELSHAPE:    kernelshape_q    <= reg_wdata;
          REG_KERNELSIZE:     kernelsize_q     <= reg_wdata;
          REG_OUTPUTSIZE:     outputsize_q     <= reg_wdata;
          REG_WEIGHTINTERVAL: weightinterval_q <= reg_wdata;
          default: ;
        endcase
      end
      if (start) begin
        done_q <= 1'b0;
        ovf_q  <= 1'b0;
        err_q  <= 1'b0;
      end else begin
        if (done)     done_q <= 1'b1;
        if (overflow) ovf_q  <= 1'b1;
        if (conf_err) err_q  <= 1'b1;
      end
      if (reg_rd) begin
        unique case (reg_addr)
          REG_CTRL:           reg_rdata <= {30'd0, soft_rst, 1'b0};
          REG_STATUS:         reg_rdata <= {28'd0, err_q, ovf_q, done_q, busy};
          REG_INPUTSHAPE:     reg_rdata <= inputshape_q;
          REG_INPUTRSTCNT:    reg_rdata <= inputrstcnt_q;
          REG_KERNELSHAPE:    reg_rdata <= kernelshape_q;
          REG_KERNELSIZE:     reg_rdata <= kernelsize_q;
          REG_OUTPUTSIZE:     reg_rdata <= outputsize_q;
          REG_WEIGHTINTERVAL: reg_rdata <= weightinterval_q;
          default:            reg_rdata <= 32'hDEAD_BEEF;
        endcase
      end
    end
  end

  always_comb begin
    conf.h           = inputshape_q[31:16];
    conf.w           = inputshape_q[15:0];
    conf.plane_words = inputrstcnt_q;
    conf.m           = kernelshape_q[31:16];
    conf.c           = kernelshape_q[15:0];
    conf.r           = kernelsize_q[31:16];
    conf.s           = kernelsize_q[15:0];
    conf.p           = outputsize_q[31:16];
    conf.q           = outputsize_q[15:0];
    conf.group_words = weightinterval_q;
  end

endmodule
