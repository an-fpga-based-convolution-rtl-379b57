// tb_conv_ip_core: end-to-end test of the convolution IP core.
// Behavioural buffers with one-cycle read latency surround the core. For a
// set of random shapes (several kernel groups, channel groups and kernel
// rows) the test fills the input and weight buffers with random 8-bit data
// in the core's layouts, runs the core, and compares every output word with
// a direct evaluation of O(p,q,m) = sum over c,r,s of I(p+r,q+s,c)*F(c,r,s,m),
// kept modulo 256 per lane. It also checks the run length against the
// controller's cycle formula and against the performance model
// H*W*C*M*R*S/(E*K*J) + n_delay, which a run must not exceed.
module tb_conv_ip_core;
  import conv_pkg::*;
  logic        clk = 1'b0, rst = 1'b1, start = 1'b0;
  conv_conf_t  conf = '0;
  logic        ib_rden, wb_rden, ob_rden, ob_wren, ob_ovld = 1'b0, busy, done, ovf, err;
  logic [31:0] ib_raddr, wb_raddr, ob_radd, ob_wadd, ib_rdata, ob_idat, ob_odat;
  logic [95:0] wb_rdata;
  int checks = 0, failures = 0;

  localparam int IBD = 4096, WBD = 512, OBD = 2048;
  logic [31:0] ibm [IBD];
  logic [95:0] wbm [WBD];
  logic [31:0] obm [OBD];

  conv_ip_core #(.OB_DEPTH(OBD)) dut (.clk, .rst, .conf, .start,
    .ib_rden, .ib_raddr, .ib_rdata, .wb_rden, .wb_raddr, .wb_rdata,
    .memctrl0_radd(ob_radd), .memctrl0_rden(ob_rden), .memctrl0_odat(ob_odat), .memctrl0_ovld(ob_ovld),
    .memctrl0_wadd(ob_wadd), .memctrl0_idat(ob_idat), .memctrl0_wren(ob_wren),
    .o_busy(busy), .o_done(done), .o_overflow(ovf), .o_conf_err(err));

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (ib_rden) ib_rdata <= ibm[ib_raddr % IBD];
    if (wb_rden) wb_rdata <= wbm[wb_raddr % WBD];
    if (ob_rden) ob_odat  <= obm[ob_radd % OBD];
    ob_ovld <= ob_rden;
    if (ob_wren) obm[ob_wadd % OBD] <= ob_idat;
  end

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  byte unsigned img [][][];   // [c][y][x]
  byte unsigned flt [][][][]; // [m][c][r][s]

  task automatic run(int h, int w, int c, int m, int r);
    int s = 3, p = h - r + 1, q = w - s + 1, cycles = 0, passes;
    img = new[c]; foreach (img[i]) begin img[i] = new[h]; foreach (img[i][y]) img[i][y] = new[w]; end
    flt = new[m];
    foreach (flt[i]) begin
      flt[i] = new[c];
      foreach (flt[i][j]) begin flt[i][j] = new[r]; foreach (flt[i][j][k]) flt[i][j][k] = new[s]; end
    end
    foreach (img[i, y, x]) img[i][y][x] = 8'($urandom);
    foreach (flt[a, b, d, e]) flt[a][b][d][e] = 8'($urandom);
    // input layout: word (cg*H + y)*W + x, channel j in byte j
    for (int cg = 0; cg < c / 3; cg++)
      for (int y = 0; y < h; y++)
        for (int x = 0; x < w; x++)
          ibm[(cg * h + y) * w + x] = {8'($urandom), img[cg*3+2][y][x], img[cg*3+1][y][x], img[cg*3][y][x]};
    // weight layout: word ((kg*CG + cg)*R + r)*S + s, kernel k channel j in byte k*3+j
    for (int kg = 0; kg < m / 4; kg++)
      for (int cg = 0; cg < c / 3; cg++)
        for (int rr = 0; rr < r; rr++)
          for (int ss = 0; ss < s; ss++) begin
            logic [95:0] v;
            for (int k = 0; k < 4; k++)
              for (int j = 0; j < 3; j++) v[8*(k*3+j) +: 8] = flt[kg*4+k][cg*3+j][rr][ss];
            wbm[((kg * (c / 3) + cg) * r + rr) * s + ss] = v;
          end
    foreach (obm[i]) obm[i] = $urandom;   // stale contents must be overwritten
    conf.h = h; conf.w = w; conf.c = c; conf.m = m; conf.r = r; conf.s = s;
    conf.p = p; conf.q = q; conf.plane_words = h * w; conf.group_words = p * q;
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
    while (busy) begin cycles++; @(negedge clk); end
    passes = (m / 4) * (c / 3) * r;
    checks += 3;
    if (cycles != passes * (3 + p * w + 6) + 1) begin
      failures++; $display("run took %0d cycles, expected %0d", cycles, passes * (3 + p * w + 6) + 1);
    end
    if (cycles > (h * w * c * m * r * s) / (3 * 4 * 3) + N_DELAY + passes * 9 + 1) begin
      failures++; $display("run slower than the performance model");
    end
    if (ovf || err) begin failures++; $display("unexpected flag"); end
    for (int kg = 0; kg < m / 4; kg++)
      for (int pp = 0; pp < p; pp++)
        for (int qq = 0; qq < q; qq++)
          for (int k = 0; k < 4; k++) begin
            byte unsigned acc = 0;
            for (int cc = 0; cc < c; cc++)
              for (int rr = 0; rr < r; rr++)
                for (int ss = 0; ss < s; ss++)
                  acc += 8'(img[cc][pp+rr][qq+ss] * flt[kg*4+k][cc][rr][ss]);
            checks++;
            if (obm[kg * p * q + pp * q + qq][8*k +: 8] !== acc) begin
              failures++;
              if (failures < 10) $display("out kg%0d p%0d q%0d k%0d got %0d exp %0d", kg, pp, qq, k,
                                          obm[kg * p * q + pp * q + qq][8*k +: 8], acc);
            end
          end
    $display("run H=%0d W=%0d C=%0d M=%0d R=%0d: %0d cycles", h, w, c, m, r, cycles);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    run(5, 6, 3, 4, 3);
    run(8, 9, 6, 8, 3);
    run(4, 7, 3, 12, 1);
    run(6, 5, 9, 4, 2);
    run(10, 12, 3, 4, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
