// conv_controller: sequencer of the weight-stationary convolution.
//
// A run is a set of passes, one per (kernel group of K, channel group of J,
// kernel row r), kernel group outermost and kernel row innermost. Each pass
//   WLOAD : reads E weight vectors (kernel columns s = 0..E-1 of row r) from
//           the weight buffer and loads vector s into KCPE s;
//   STREAM: reads the P*W input pixels of rows r .. r+P-1 of the channel
//           group, one per cycle, and tags each pixel at column x >= S-1 as
//           the end of the window of output (p, x-S+1);
//   DRAIN : waits until the last partial sum has been written back.
// The first pass of a kernel group (channel group 0, row 0) writes the output
// words; later passes accumulate into them. Because weight vectors are stored
// in pass order and the pixels of a pass are contiguous, every address is a
// running counter: no multiplier is needed. The loop nest follows the
// published weight-stationary dataflow and performance model; the buffer
// layouts, the drain and the error check are this design's own.
//
// Buffer layouts: input word (cg*H + y)*W + x holds the J channels of pixel
// (y, x) of channel group cg; weight word ((kg*CG + cg)*R + r)*S + s holds
// the K*J weights of kernel column s, row r; output word kg*P*Q + p*Q + q
// holds the K kernels' outputs of pixel (p, q).
//
// Timing: buffers answer reads one cycle later; eng_* and weight loads are
// the read requests delayed by that cycle. busy covers
// passes * (E + P*W + DRAIN) + 1 cycles. Requires S == E, stride 1, C a
// multiple of J and M a multiple of K. S != E, W < E or a zero R, P, C or M
// ends the run at once with o_conf_err; the two multiples are not checked.
module conv_controller
#(
  parameter int unsigned E = conv_pkg::E,
  parameter int unsigned K = conv_pkg::K,
  parameter int unsigned J = conv_pkg::J
) (
  input  logic                 clk,
  input  logic                 rst,
  input  conv_pkg::conv_conf_t           conf,
  input  logic                 start,
  // weight global buffer read
  output logic                 wb_rden,
  output logic [conv_pkg::ADDR_W-1:0]    wb_raddr,
  // input global buffer read
  output logic                 ib_rden,
  output logic [conv_pkg::ADDR_W-1:0]    ib_raddr,
  // to the engine, aligned with the buffers' read data
  output logic                 eng_weight_vld,
  output logic [$clog2(E)-1:0] eng_weight_sel,
  output logic                 eng_data_vld,
  output conv_pkg::psum_tag_t            eng_tag,
  // status
  output logic                 o_busy,
  output logic                 o_done,
  output logic                 o_conf_err
);

  localparam int unsigned DRAIN = conv_pkg::N_DELAY + 2;

  typedef enum logic [2:0] {S_IDLE, S_WLOAD, S_STREAM, S_DRAIN, S_DONE} state_t;
  state_t state_q;

  logic [15:0]       kc_q, cc_q, r_q, p_q, x_q;
  logic [$clog2(E)-1:0] s_q;
  logic [3:0]        drain_q;
  logic [conv_pkg::ADDR_W-1:0] wptr_q, cg_base_q, r_off_q, in_ptr_q, kg_base_q, out_ptr_q;

  logic conf_ok;
  assign conf_ok = (conf.s == 16'(E)) && (conf.r != 0) && (conf.p != 0) && (conf.w >= 16'(E)) &&
                   (conf.c != 0) && (conf.m != 0);

  logic emit_now, first_pass;
  assign emit_now   = (x_q >= 16'(E - 1));
  assign first_pass = (cc_q == 0) && (r_q == 0);

  always_ff @(posedge clk) begin
    if (rst) begin
      state_q    <= S_IDLE;
      kc_q       <= '0;
      cc_q       <= '0;
      r_q        <= '0;
      p_q        <= '0;
      x_q        <= '0;
      s_q        <= '0;
      drain_q    <= '0;
      wptr_q     <= '0;
      cg_base_q  <= '0;
      r_off_q    <= '0;
      in_ptr_q   <= '0;
      kg_base_q  <= '0;
      out_ptr_q  <= '0;
      o_conf_err <= 1'b0;
    end else begin
      unique case (state_q)
        S_IDLE: if (start) begin
          kc_q <= '0; cc_q <= '0; r_q <= '0; s_q <= '0;
          wptr_q <= '0; cg_base_q <= '0; r_off_q <= '0; kg_base_q <= '0;
          o_conf_err <= !conf_ok;
          state_q <= conf_ok ? S_WLOAD : S_DONE;
        end
        S_WLOAD: begin
          wptr_q <= wptr_q + 1;
          if (s_q == $bits(s_q)'(E - 1)) begin
            s_q       <= '0;
            p_q       <= '0;
            x_q       <= '0;
            in_ptr_q  <= cg_base_q + r_off_q;
            out_ptr_q <= kg_base_q;
            state_q   <= S_STREAM;
          end else begin
            s_q <= s_q + 1;
          end
        end
        S_STREAM: begin
          in_ptr_q <= in_ptr_q + 1;
          if (emit_now) out_ptr_q <= out_ptr_q + 1;
          if (x_q == conf.w - 1) begin
            x_q <= '0;
            if (p_q == conf.p - 1) begin
              drain_q <= '0;
              state_q <= S_DRAIN;
            end else begin
              p_q <= p_q + 1;
            end
          end else begin
            x_q <= x_q + 1;
          end
        end
        S_DRAIN: begin
          drain_q <= drain_q + 1;
          if (drain_q == 4'(DRAIN - 1)) begin
            state_q <= S_WLOAD;
            if (r_q == conf.r - 1) begin
              r_q     <= '0;
              r_off_q <= '0;
              if (cc_q + 16'(J) >= conf.c) begin
                cc_q      <= '0;
                cg_base_q <= '0;
                kg_base_q <= kg_base_q + conf.group_words;
                if (kc_q + 16'(K) >= conf.m) state_q <= S_DONE;
                else                         kc_q <= kc_q + 16'(K);
              end else begin
                cc_q      <= cc_q + 16'(J);
                cg_base_q <= cg_base_q + conf.plane_words;
              end
            end else begin
              r_q     <= r_q + 1;
              r_off_q <= r_off_q + conv_pkg::ADDR_W'(conf.w);
            end
          end
        end
        S_DONE: state_q <= S_IDLE;
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assign wb_rden  = (state_q == S_WLOAD);
  assign wb_raddr = wptr_q;
  assign ib_rden  = (state_q == S_STREAM);
  assign ib_raddr = in_ptr_q;
  assign o_busy   = (state_q != S_IDLE);
  assign o_done   = (state_q == S_DONE);

  // Align the engine controls with the one-cycle buffer read latency.
  always_ff @(posedge clk) begin
    if (rst) begin
      eng_weight_vld <= 1'b0;
      eng_weight_sel <= '0;
      eng_data_vld   <= 1'b0;
      eng_tag        <= '0;
    end else begin
      eng_weight_vld <= wb_rden;
      eng_weight_sel <= s_q;
      eng_data_vld   <= ib_rden;
      eng_tag.emit   <= ib_rden && emit_now;
      eng_tag.first  <= first_pass;
      eng_tag.addr   <= out_ptr_q;
    end
  end

  a_no_weight_load_while_streaming: assert property (@(posedge clk) disable iff (rst)
    !(wb_rden && ib_rden));

endmodule
