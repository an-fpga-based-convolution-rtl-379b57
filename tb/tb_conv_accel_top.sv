// tb_conv_accel_top: end-to-end test of the accelerator subsystem at
// reduced buffer sizes (16 KB input, 1.5 KB weight, 1 KB output).
// The test plays the host processor (register writes, status polling) and
// the DMA (buffer writes, result reads). Every output is compared with a
// direct evaluation of the convolution, modulo 256 per lane. It makes each
// mechanism of the design happen and counts it:
//   - weight loads into the KCPEs (weight-stationary passes);
//   - several kernel groups and several channel groups in one run;
//   - first writes and read-modify-write accumulation in the output buffer;
//   - an output set larger than the output buffer: flagged in STATUS, then
//     computed by the host in several runs with the buffer drained between;
//   - a soft reset through CTRL in the middle of a run;
//   - a shape the core cannot run (S != 3), flagged as a configuration error;
//   - the done interrupt.
module tb_conv_accel_top;
  import conv_pkg::*;
  localparam int IB_BYTES = 16384, WB_BYTES = 1536, OB_BYTES = 1024;
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

  conv_accel_top #(.IB_BYTES(IB_BYTES), .WB_BYTES(WB_BYTES), .OB_BYTES(OB_BYTES)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
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

  initial begin
    logic [31:0] st;
    repeat (3) @(posedge clk);
    rst <= 1'b0;

    // 1. one run with two kernel groups and two channel groups
    make_data(6, 7, 6, 8, 3);
    dma_input(); dma_weights(0, 2); configure(8, 3);
    start_and_wait(st);
    checks++; if (st[3:1] != 3'b001) begin failures++; $display("status %0h", st); end
    check_outputs(0, 2);
    n_kgroups += 2; n_cgroups += 2;

    // 2. outputs larger than the buffer: 3 groups of 10x12 words > 256 words
    make_data(12, 14, 3, 12, 3);
    dma_input(); dma_weights(0, 3); configure(12, 3);
    start_and_wait(st);
    checks++;
    if (!st[2]) begin failures++; $display("overflow not flagged"); end else n_ovf_flag++;
    //    the host splits the kernels into runs that fit and drains between
    for (int kg = 0; kg < 3; kg++) begin
      dma_weights(kg, 1); configure(4, 3);
      start_and_wait(st);
      checks++; if (st[3:1] != 3'b001) begin failures++; $display("split run status %0h", st); end
      check_outputs(kg, 1);
      n_split_runs++;
    end

    // 3. soft reset in the middle of a run, then a clean run
    make_data(7, 8, 3, 4, 3);
    dma_input(); dma_weights(0, 1); configure(4, 3);
    reg_write(REG_CTRL, 32'h1);
    repeat (30) @(negedge clk);
    reg_write(REG_CTRL, 32'h2);
    reg_read(REG_STATUS, st);
    checks++; if (st[0]) begin failures++; $display("busy after soft reset"); end else n_soft_rst++;
    reg_write(REG_CTRL, 32'h0);
    start_and_wait(st);
    check_outputs(0, 1);

    // 4. unsupported kernel width
    configure(4, 2);
    start_and_wait(st);
    checks++; if (!st[3]) begin failures++; $display("config error not flagged"); end else n_conf_err++;

    // mechanism coverage
    $display("weight loads %0d, first writes %0d, accumulates %0d, kernel groups %0d, channel groups %0d",
             n_wload, n_first, n_rmw, n_kgroups, n_cgroups);
    $display("overflow flagged %0d, split runs %0d, soft resets %0d, config errors %0d, done irqs %0d",
             n_ovf_flag, n_split_runs, n_soft_rst, n_conf_err, n_irq);
    checks += 10;
    if (n_wload == 0)      failures++;
    if (n_first == 0)      failures++;
    if (n_rmw == 0)        failures++;
    if (n_kgroups == 0)    failures++;
    if (n_cgroups == 0)    failures++;
    if (n_ovf_flag == 0)   failures++;
    if (n_split_runs == 0) failures++;
    if (n_soft_rst == 0)   failures++;
    if (n_conf_err == 0)   failures++;
    if (n_irq < 6)         failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
