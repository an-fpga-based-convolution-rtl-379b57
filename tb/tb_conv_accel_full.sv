// tb_conv_accel_full: the published workload on the accelerator at its
// default sizes (256 KB input, 32 KB weight, 512 KB output buffers).
// A random 224x224x3 input map is convolved with 3x3x3 kernel sets of
// M = 4, 8 and 16 kernels, as in the published experiments. M = 4 and M = 8
// fit the output buffer and run in one pass each. For M = 16 the outputs
// (4 x 222 x 222 words) exceed the 131072-word output buffer: the run must
// flag the overflow, and the host then computes the layer as two runs of
// 8 kernels, draining the buffer in between. Every output word is checked
// against a direct evaluation of the convolution (modulo 256 per lane), and
// the cycle count of each run is compared with the published performance
// model H*W*C*M*R*S/(E*K*J) + n_delay, which it must not exceed by more than
// the per-pass weight load and drain.
module tb_conv_accel_full;
  import conv_pkg::*;
  localparam int IB_BYTES = 262144, WB_BYTES = 32768, OB_BYTES = 524288;
  localparam int IB_AW = $clog2(IB_BYTES / 4), WB_AW = $clog2(WB_BYTES / 12), OB_AW = $clog2(OB_BYTES / 4);
  localparam int OB_WORDS = OB_BYTES / 4;

  logic             clk = 1'b0, rst = 1'b1;
  logic             reg_wr = 1'b0, reg_rd = 1'b0;
  logic [7:0]       reg_addr = '0;
  logic [31:0]      reg_wdata = '0, reg_rdata;
  logic             ib_we = 1'b0, wb_we = 1'b0, ob_rd = 1'b0, irq_done;
  logic [IB_AW-1:0] ib_waddr = '0;
  logic [WB_AW-1:0] wb_waddr = '0;
  logic [OB_AW-1:0] ob_raddr = '0;
  logic [31:0]      ib_wdata = '0, ob_rdata;
  logic [95:0]      wb_wdata = '0;
  int checks = 0, failures = 0;

  conv_accel_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (6000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- mechanism counters ----
  int n_wload = 0, n_first = 0, n_rmw = 0, n_irq = 0, n_kgroups = 0, n_cgroups = 0;
  int n_ovf_flag = 0, n_split_runs = 0, n_soft_rst = 0, n_conf_err = 0;
  always @(posedge clk) if (!rst) begin
    if (dut.u_core.eng_weight_vld) n_wload++;
    if (dut.ob_wren && !dut.u_core.memctrl0_rden && !dut.u_core.u_accum.pend_q) n_first++;
    if (dut.u_core.memctrl0_rden) n_rmw++;
    if (irq_done) n_irq++;
  end

  // ---- host and DMA helpers ----
  task automatic reg_write(logic [7:0] a, logic [31:0] d);
    @(negedge clk); reg_wr = 1'b1; reg_addr = a; reg_wdata = d;
    @(negedge clk); reg_wr = 1'b0;
  endtask

  task automatic reg_read(logic [7:0] a, output logic [31:0] d);
    @(negedge clk); reg_rd = 1'b1; reg_addr = a;
    @(negedge clk); reg_rd = 1'b0; d = reg_rdata;
  endtask

  byte unsigned img [][][];   // [c][y][x]
  byte unsigned flt [][][][]; // [m][c][r][s]
  int H, W, C, M, R, P, Q;

  task automatic make_data(int h, int w, int c, int m, int r);
    H = h; W = w; C = c; M = m; R = r; P = h - r + 1; Q = w - 2;
    img = new[c]; foreach (img[i]) begin img[i] = new[h]; foreach (img[i][y]) img[i][y] = new[w]; end
    flt = new[m];
    foreach (flt[i]) begin
      flt[i] = new[c];
      foreach (flt[i][j]) begin flt[i][j] = new[r]; foreach (flt[i][j][k]) flt[i][j][k] = new[3]; end
    end
    foreach (img[i, y, x]) img[i][y][x] = 8'($urandom);
    foreach (flt[a, b, d, e]) flt[a][b][d][e] = 8'($urandom);
  endtask

  task automatic dma_input();
    for (int cg = 0; cg < C / 3; cg++)
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          @(negedge clk);
          ib_we = 1'b1; ib_waddr = IB_AW'((cg * H + y) * W + x);
          ib_wdata = {8'h00, img[cg*3+2][y][x], img[cg*3+1][y][x], img[cg*3][y][x]};
        end
    @(negedge clk); ib_we = 1'b0;
  endtask

  // Weights of kernel groups kg0 .. kg0+nkg-1, stored from word 0.
  task automatic dma_weights(int kg0, int nkg);
    for (int kg = 0; kg < nkg; kg++)
      for (int cg = 0; cg < C / 3; cg++)
        for (int rr = 0; rr < R; rr++)
          for (int ss = 0; ss < 3; ss++) begin
            logic [95:0] v;
            for (int k = 0; k < 4; k++)
              for (int j = 0; j < 3; j++) v[8*(k*3+j) +: 8] = flt[(kg0+kg)*4+k][cg*3+j][rr][ss];
            @(negedge clk);
            wb_we = 1'b1; wb_waddr = WB_AW'(((kg * (C / 3) + cg) * R + rr) * 3 + ss); wb_wdata = v;
          end
    @(negedge clk); wb_we = 1'b0;
  endtask

  task automatic configure(int m_run, int s_val);
    reg_write(REG_INPUTSHAPE, {16'(H), 16'(W)});
    reg_write(REG_INPUTRSTCNT, H * W);
    reg_write(REG_KERNELSHAPE, {16'(m_run), 16'(C)});
    reg_write(REG_KERNELSIZE, {16'(R), 16'(s_val)});
    reg_write(REG_OUTPUTSIZE, {16'(P), 16'(Q)});
    reg_write(REG_WEIGHTINTERVAL, P * Q);
  endtask

  task automatic start_and_wait(output logic [31:0] status);
    reg_write(REG_CTRL, 32'h1);
    do reg_read(REG_STATUS, status); while (status[0]);
  endtask

  // Compare the output buffer with kernel groups kg0 .. kg0+nkg-1.
  task automatic check_outputs(int kg0, int nkg);
    for (int kg = 0; kg < nkg; kg++)
      for (int pp = 0; pp < P; pp++)
        for (int qq = 0; qq < Q; qq++) begin
          logic [31:0] word;
          @(negedge clk); ob_rd = 1'b1; ob_raddr = OB_AW'(kg * P * Q + pp * Q + qq);
          @(negedge clk); ob_rd = 1'b0; word = ob_rdata;
          for (int k = 0; k < 4; k++) begin
            byte unsigned acc = 0;
            for (int cc = 0; cc < C; cc++)
              for (int rr = 0; rr < R; rr++)
                for (int ss = 0; ss < 3; ss++)
                  acc += 8'(img[cc][pp+rr][qq+ss] * flt[(kg0+kg)*4+k][cc][rr][ss]);
            checks++;
            if (word[8*k +: 8] !== acc) begin
              failures++;
              if (failures < 10) $display("kg%0d p%0d q%0d k%0d got %0d exp %0d", kg0+kg, pp, qq, k, word[8*k +: 8], acc);
            end
          end
        end
  endtask

  int run_cycles;
  always @(posedge clk) if (!rst && dut.busy) run_cycles++;

  task automatic timed_run(int m_run, output logic [31:0] st);
    longint model;
    int passes;
    run_cycles = 0;
    start_and_wait(st);
    passes = (m_run / 4) * (C / 3) * R;
    model  = longint'(H) * W * C * m_run * R * 3 / (3 * 4 * 3) + N_DELAY;
    $display("M=%0d: %0d cycles (%0.5f s at 300 MHz), performance model %0d cycles", m_run, run_cycles,
             real'(run_cycles) / 300.0e6, model);
    checks++;
    if (run_cycles != passes * (3 + P * W + 6) + 1 || run_cycles > model + passes * 9) begin
      failures++; $display("unexpected run length");
    end
  endtask

  initial begin
    logic [31:0] st;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    make_data(224, 224, 3, 16, 3);
    dma_input();

    // M = 4
    dma_weights(0, 1); configure(4, 3);
    timed_run(4, st);
    checks++; if (st[3:1] != 3'b001) begin failures++; $display("status %0h", st); end
    check_outputs(0, 1);

    // M = 8
    dma_weights(0, 2); configure(8, 3);
    timed_run(8, st);
    checks++; if (st[3:1] != 3'b001) begin failures++; $display("status %0h", st); end
    check_outputs(0, 2);
    n_kgroups += 2;

    // M = 16: does not fit, flagged
    dma_weights(0, 4); configure(16, 3);
    timed_run(16, st);
    checks++;
    if (!st[2]) begin failures++; $display("overflow not flagged"); end else n_ovf_flag++;
    // split into two runs of 8 kernels
    for (int half = 0; half < 2; half++) begin
      dma_weights(half * 2, 2); configure(8, 3);
      timed_run(8, st);
      checks++; if (st[3:1] != 3'b001) begin failures++; $display("split run status %0h", st); end
      check_outputs(half * 2, 2);
      n_split_runs++;
    end

    $display("weight loads %0d, first writes %0d, accumulates %0d, overflow flagged %0d, split runs %0d, done irqs %0d",
             n_wload, n_first, n_rmw, n_ovf_flag, n_split_runs, n_irq);
    checks += 5;
    if (n_wload == 0)      failures++;
    if (n_first == 0)      failures++;
    if (n_rmw == 0)        failures++;
    if (n_ovf_flag == 0)   failures++;
    if (n_split_runs == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
