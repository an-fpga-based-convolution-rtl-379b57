// psum_accum_ctrl: Psum Accumulate Router.
//
// Takes the K per-kernel partial sums the engine produces for one output
// pixel and adds them into the output global buffer. An output word holds
// the K kernels' outputs of one pixel, kernel k in bits [OUT_W*k +: OUT_W].
// The first contribution to a word (tag.first) is written directly; every
// later one is a read-modify-write: read the word, add the K partial sums
// lane by lane, write it back. The adders and the feedback from the output
// buffer follow the published drawing; the 8-bit output lane and 32-bit
// word follow the published core schematic. The partial sum is cut to its
// low OUT_W bits, so each lane holds the exact convolution sum modulo
// 2**OUT_W (a choice of this design; the source does not say which bits are
// kept). Writes to addresses past DEPTH are dropped, each with a pulse on
// o_overflow.
//
// Interface:  memctrl0_* is the core's port on the output buffer: separate
//             read (radd/rden, data odat with ovld one cycle later) and
//             write (wadd/idat/wren) ports.
// Timing:     a first write happens in the cycle the psum arrives; an
//             accumulate reads in that cycle and writes in the next. Two
//             consecutive psums must not target the same word.
module psum_accum_ctrl
#(
  parameter int unsigned K      = conv_pkg::K,
  parameter int unsigned PSUM_W = conv_pkg::PSUM_W,
  parameter int unsigned OUT_W  = conv_pkg::OUT_W,
  parameter int unsigned DEPTH  = 131072
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                psum_vld,
  input  logic [PSUM_W-1:0]   psum [K],
  input  conv_pkg::psum_tag_t           tag,
  output logic [conv_pkg::ADDR_W-1:0]   memctrl0_radd,
  output logic                memctrl0_rden,
  input  logic [K*OUT_W-1:0]  memctrl0_odat,
  input  logic                memctrl0_ovld,
  output logic [conv_pkg::ADDR_W-1:0]   memctrl0_wadd,
  output logic [K*OUT_W-1:0]  memctrl0_idat,
  output logic                memctrl0_wren,
  output logic                o_overflow,
  output logic                o_busy
);

  logic               take, in_range;
  logic               pend_q;
  logic [conv_pkg::ADDR_W-1:0]  pend_addr_q;
  logic [K*OUT_W-1:0] pend_psum_q;
  logic [K*OUT_W-1:0] in_pack, sum_pack;

  always_comb begin
    for (int k = 0; k < K; k++) in_pack[k*OUT_W +: OUT_W] = psum[k][OUT_W-1:0];
  end

  assign in_range = (tag.addr < conv_pkg::ADDR_W'(DEPTH));
  assign take     = psum_vld && tag.emit && in_range;

  // Accumulate read for non-first contributions.
  assign memctrl0_rden = take && !tag.first;
  assign memctrl0_radd = tag.addr;

  always_ff @(posedge clk) begin
    if (rst) begin
      pend_q      <= 1'b0;
      pend_addr_q <= '0;
      pend_psum_q <= '0;
    end else begin
      pend_q      <= memctrl0_rden;
      pend_addr_q <= tag.addr;
      pend_psum_q <= in_pack;
    end
  end

  always_comb begin
    for (int k = 0; k < K; k++)
      sum_pack[k*OUT_W +: OUT_W] = memctrl0_odat[k*OUT_W +: OUT_W] + pend_psum_q[k*OUT_W +: OUT_W];
  end

  // Write port: a pending accumulate has priority; a direct first write
  // never coincides with one because passes are separated by a drain.
  always_comb begin
    if (pend_q) begin
      memctrl0_wren = !rst;
      memctrl0_wadd = pend_addr_q;
      memctrl0_idat = sum_pack;
    end else begin
      memctrl0_wren = take && tag.first;
      memctrl0_wadd = tag.addr;
      memctrl0_idat = in_pack;
    end
  end

  assign o_busy     = pend_q;
  assign o_overflow = psum_vld && tag.emit && !in_range;   // one pulse per dropped output

  // Handshake rules of this port.
  a_no_write_clash: assert property (@(posedge clk) disable iff (rst)
    !(pend_q && take && tag.first));
  a_read_data_valid: assert property (@(posedge clk) disable iff (rst)
    pend_q |-> memctrl0_ovld);
  a_no_raw_same_word: assert property (@(posedge clk) disable iff (rst)
    !(pend_q && memctrl0_rden && memctrl0_radd == pend_addr_q));

endmodule
