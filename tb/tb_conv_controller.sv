// tb_conv_controller: self-checking test of the convolution sequencer.
// For several shapes (more than one kernel group and channel group, several
// kernel rows) the test builds the expected stream of weight-buffer reads,
// input-buffer reads and engine tags from the loop nest of the convolution
// and compares every request the controller makes against it, in order.
// It also checks the weight-select sequence, the length of a run
// (passes * (E + P*W + 6) + 1 busy cycles) and that a shape with S != 3
// ends at once with the configuration-error flag.
module tb_conv_controller;
  import conv_pkg::*;
  logic        clk = 1'b0, rst = 1'b1, start = 1'b0;
  conv_conf_t  conf = '0;
  logic        wb_rden, ib_rden, ewv, edv, busy, done, err;
  logic [31:0] wb_raddr, ib_raddr;
  logic [1:0]  ews;
  psum_tag_t   etag;
  int checks = 0, failures = 0;

  conv_controller dut (.clk, .rst, .conf, .start, .wb_rden, .wb_raddr, .ib_rden, .ib_raddr,
    .eng_weight_vld(ewv), .eng_weight_sel(ews), .eng_data_vld(edv), .eng_tag(etag),
    .o_busy(busy), .o_done(done), .o_conf_err(err));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int          exp_w [$], exp_sel [$], exp_in [$];
  logic [33:0] exp_tag [$];  // {emit, first, addr}
  int          busy_cycles;
  bit          mon = 0;

  // The address of a non-emitting pixel carries no meaning and is not compared.
  always @(posedge clk) if (mon) begin
    if (busy) busy_cycles++;
    if (wb_rden) begin
      checks++;
      if (exp_w.size() == 0 || wb_raddr != exp_w.pop_front()) begin failures++; $display("weight read %0d unexpected", wb_raddr); end
    end
    if (ewv) begin
      checks++;
      if (exp_sel.size() == 0 || ews != exp_sel.pop_front()) begin failures++; $display("weight select wrong"); end
    end
    if (ib_rden) begin
      checks++;
      if (exp_in.size() == 0 || ib_raddr != exp_in.pop_front()) begin failures++; $display("input read %0d unexpected", ib_raddr); end
    end
    if (edv) begin
      checks++;
      if (exp_tag.size() == 0 || {etag.emit, etag.first, etag.emit ? etag.addr : 32'd0} != exp_tag.pop_front()) begin
        failures++; $display("tag wrong: emit %0d first %0d addr %0d", etag.emit, etag.first, etag.addr);
      end
    end
  end

  task automatic run(int h, int w, int c, int m, int r, int s);
    int p = h - r + 1, q = w - s + 1, passes = 0, wa = 0;
    conf.h = h; conf.w = w; conf.c = c; conf.m = m; conf.r = r; conf.s = s;
    conf.p = p; conf.q = q; conf.plane_words = h * w; conf.group_words = p * q;
    exp_w.delete(); exp_sel.delete(); exp_in.delete(); exp_tag.delete();
    if (s == 3) begin
      for (int kg = 0; kg < m / 4; kg++)
        for (int cg = 0; cg < c / 3; cg++)
          for (int rr = 0; rr < r; rr++) begin
            passes++;
            for (int ss = 0; ss < 3; ss++) begin exp_w.push_back(wa++); exp_sel.push_back(ss); end
            for (int pp = 0; pp < p; pp++)
              for (int x = 0; x < w; x++) begin
                exp_in.push_back((cg * h + pp + rr) * w + x);
                exp_tag.push_back({x >= 2, cg == 0 && rr == 0,
                                   32'(x >= 2 ? kg * p * q + pp * q + x - 2 : 0)});
              end
          end
    end
    busy_cycles = 0;
    mon = 1;
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
    while (busy) @(negedge clk);
    repeat (3) @(negedge clk);
    mon = 0;
    checks += 2;
    if (exp_w.size() || exp_sel.size() || exp_in.size() || exp_tag.size()) begin
      failures++; $display("requests missing");
    end
    if (s == 3) begin
      if (busy_cycles != passes * (3 + p * w + 6) + 1 || err) begin
        failures++; $display("run length %0d exp %0d", busy_cycles, passes * (3 + p * w + 6) + 1);
      end
    end else if (!err || busy_cycles != 1) begin
      failures++; $display("config error not flagged");
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    run(5, 6, 3, 4, 3, 3);
    run(6, 7, 6, 8, 3, 3);
    run(4, 5, 3, 12, 1, 3);
    run(5, 5, 3, 4, 3, 2);
    run(9, 3, 9, 4, 2, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
