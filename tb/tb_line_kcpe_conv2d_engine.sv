// tb_line_kcpe_conv2d_engine: self-checking test of the line of KCPEs.
// Part 1 replays a published waveform: kernel 0 weights 151 on all three
// channels of KCPE 0, pixels 0x178d5a, 0x168d5a, 0x128e5a; the kernel-0
// partial sums must be 38354, 38203, 37750 once those pixels reach KCPE 0.
// Part 2 loads random weights into all KCPEs, streams random pixels with
// gaps and checks every output against a software model of the window and
// the per-kernel sums. The latency from pixel to partial sum must be 4
// cycles, and each tag must come out with its own partial sum.
module tb_line_kcpe_conv2d_engine;
  import conv_pkg::*;
  localparam int NE = 3, NK = 4, NJ = 3;
  logic        clk = 1'b0, rst = 1'b1;
  logic        wvld = 1'b0, dvld = 1'b0;
  logic [1:0]  wsel = '0;
  logic [95:0] wv = '0;
  logic [23:0] px = '0;
  psum_tag_t   itag = '0, otag;
  logic        ovld;
  logic [15:0] psum [NK];
  int checks = 0, failures = 0;

  line_kcpe_conv2d_engine dut (.clk, .rst, .i_weight_vld(wvld), .i_weight_sel(wsel), .i_weight(wv),
    .i_data_vld(dvld), .i_data(px), .i_tag(itag), .o_psum_vld(ovld), .o_psum(psum), .o_tag(otag));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [95:0] wmem [NE];
  logic [23:0] win [NE];
  // expected outputs, queued in issue order
  logic [NK*16-1:0] exp_q [$];
  logic [31:0] exp_tag [$];
  int          exp_cyc [$];
  int          cyc = 0;
  logic [15:0] k0_log [$];
  int          lat_fail = 0;

  always @(posedge clk) cyc <= cyc + 1;

  function automatic logic [15:0] ksum(int k);
    logic [15:0] s = '0;
    for (int e = 0; e < NE; e++)
      for (int j = 0; j < NJ; j++) s += 16'(win[e][8*j +: 8] * wmem[e][8*(k*NJ+j) +: 8]);
    return s;
  endfunction

  // Checker: compare outputs in order and measure latency.
  always @(negedge clk) if (!rst && ovld) begin
    logic [NK*16-1:0] e;
    e = exp_q.pop_front();
    checks++;
    if (otag.addr !== exp_tag.pop_front()) begin failures++; $display("tag mismatch"); end
    if (cyc - exp_cyc.pop_front() != N_DELAY) begin failures++; lat_fail++; end
    for (int k = 0; k < NK; k++) begin
      checks++;
      if (psum[k] !== e[16*k +: 16]) begin
        failures++;
        $display("k=%0d got %0d exp %0d", k, psum[k], e[16*k +: 16]);
      end
    end
  end

  task automatic load_w(int e, logic [95:0] v);
    @(negedge clk); wvld = 1'b1; wsel = 2'(e); wv = v; wmem[e] = v;
    @(negedge clk); wvld = 1'b0; wv = {$urandom, $urandom, $urandom};
  endtask

  task automatic push(logic [23:0] p, logic [31:0] tagv);
    logic [NK*16-1:0] e;
    @(negedge clk);
    dvld = 1'b1; px = p; itag = '{emit: 1'b1, first: 1'b0, addr: tagv};
    for (int i = 0; i < NE-1; i++) win[i] = win[i+1];
    win[NE-1] = p;
    for (int k = 0; k < NK; k++) e[16*k +: 16] = ksum(k);
    exp_q.push_back(e);
    k0_log.push_back(e[15:0]);
    exp_tag.push_back(tagv);
    exp_cyc.push_back(cyc);
  endtask

  task automatic idle();
    @(negedge clk); dvld = 1'b0; px = 24'($urandom);
  endtask

  initial begin
    logic [15:0] fig [3] = '{16'd38354, 16'd38203, 16'd37750};
    logic [23:0] pix [3] = '{24'h178d5a, 24'h168d5a, 24'h128e5a};
    int got;
    for (int e = 0; e < NE; e++) win[e] = '0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    // Part 1: published vector
    load_w(0, 96'h201000201000201000979797);
    load_w(1, '0);
    load_w(2, '0);
    for (int i = 0; i < 3; i++) push(pix[i], i);
    push(24'h0, 3); push(24'h0, 4);
    idle();
    // kernel-0 sums of pixels 0..2 appear when each is in window slot 0,
    // i.e. for pushes 2, 3, 4
    for (int i = 0; i < 3; i++) begin
      checks++;
      if (k0_log[2+i] !== fig[i]) begin failures++; $display("model mismatch with published vector"); end
    end
    repeat (8) @(negedge clk);
    // Part 2: random
    for (int round = 0; round < 5; round++) begin
      repeat (6) @(negedge clk);  // drain before changing weights
      for (int e = 0; e < NE; e++) load_w(e, {$urandom, $urandom, $urandom});
      for (int t = 0; t < 80; t++) begin
        if ($urandom_range(0, 3) == 0) idle();
        push(24'($urandom), 32'($urandom));
      end
      idle();
    end
    repeat (10) @(negedge clk);
    checks++;
    got = exp_q.size();
    if (got != 0) begin failures++; $display("%0d outputs missing", got); end
    if (lat_fail) $display("%0d latency mismatches", lat_fail);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
