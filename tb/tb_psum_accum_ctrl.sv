// tb_psum_accum_ctrl: self-checking test of the psum accumulate router.
// A small memory model with one-cycle read latency stands in for the output
// buffer. Bursts of partial sums are sent to consecutive words: the first
// burst writes directly, the following bursts read-modify-write. Final
// contents are compared with per-lane sums modulo 256 kept by the test.
// Non-emitting psums must not touch memory, and psums addressed past DEPTH
// must be dropped and raise the overflow flag.
module tb_psum_accum_ctrl;
  import conv_pkg::*;
  localparam int NK = 4, DEPTH = 64;
  logic        clk = 1'b0, rst = 1'b1;
  logic        vld = 1'b0;
  logic [15:0] psum [NK];
  psum_tag_t   tag = '0;
  logic [31:0] radd, wadd, idat, odat = '0;
  logic        rden, wren, ovld = 1'b0, ovf, busy;
  logic [31:0] mem [DEPTH];
  logic [7:0]  model [DEPTH][NK];
  int checks = 0, failures = 0, writes_direct = 0, writes_rmw = 0;

  psum_accum_ctrl #(.DEPTH(DEPTH)) dut (.clk, .rst, .psum_vld(vld), .psum(psum), .tag(tag),
    .memctrl0_radd(radd), .memctrl0_rden(rden), .memctrl0_odat(odat), .memctrl0_ovld(ovld),
    .memctrl0_wadd(wadd), .memctrl0_idat(idat), .memctrl0_wren(wren), .o_overflow(ovf), .o_busy(busy));

  always #5 clk = ~clk;

  logic ovf_seen = 1'b0;
  always @(posedge clk) if (!rst && ovf) ovf_seen <= 1'b1;

  always @(posedge clk) begin
    if (wren) begin
      if (wadd < DEPTH) mem[wadd] <= idat;
      else begin failures++; $display("write out of range"); end
      if (rden) writes_rmw++; else writes_direct++;
    end
    ovld <= rden;
    if (rden) odat <= mem[radd];
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic burst(bit first, int base, int n, bit emit_all);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      vld = 1'b1;
      tag.first = first;
      tag.addr  = base + i;
      tag.emit  = emit_all || (i % 3 != 0);
      for (int k = 0; k < NK; k++) psum[k] = 16'($urandom);
      if (tag.emit && (base + i) < DEPTH)
        for (int k = 0; k < NK; k++)
          model[base+i][k] = first ? psum[k][7:0] : model[base+i][k] + psum[k][7:0];
    end
    @(negedge clk); vld = 1'b0;
    repeat (4) @(negedge clk);
  endtask

  initial begin
    for (int a = 0; a < DEPTH; a++) begin
      mem[a] = 32'hA5A5_A5A5;
      for (int k = 0; k < NK; k++) model[a][k] = 8'hA5;
    end
    for (int k = 0; k < NK; k++) psum[k] = '0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    burst(1'b1, 0, 40, 1'b1);
    burst(1'b0, 0, 40, 1'b1);
    burst(1'b0, 0, 40, 1'b0);   // some psums not emitted
    burst(1'b0, 10, 30, 1'b1);
    checks++;
    if (ovf_seen) begin failures++; $display("overflow raised early"); end
    burst(1'b1, 60, 8, 1'b1);   // runs past the end of the buffer
    checks++;
    if (!ovf_seen) begin failures++; $display("overflow not raised"); end
    for (int a = 0; a < DEPTH; a++)
      for (int k = 0; k < NK; k++) begin
        checks++;
        if (mem[a][8*k +: 8] !== model[a][k]) begin
          failures++;
          $display("word %0d lane %0d got %0h exp %0h", a, k, mem[a][8*k +: 8], model[a][k]);
        end
      end
    checks++;
    if (writes_direct == 0 || writes_rmw == 0) failures++;
    $display("direct writes %0d, read-modify-writes %0d", writes_direct, writes_rmw);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
