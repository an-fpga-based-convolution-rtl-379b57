// tb_weight_global_buffer: self-checking test of the weight_global_buffer RAM at its default size.
// Writes random words to random addresses (including the first and last
// word), then reads them back and checks the one-cycle read latency, that
// the read data holds while no read is issued, and that a read of a word
// being written in the same cycle returns the old contents.
module tb_weight_global_buffer;
  localparam int W = 96, DEPTH = 2730, AW = $clog2(DEPTH);
  logic          clk = 1'b0, we = 1'b0, rden = 1'b0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [W-1:0]  wdata = '0, rdata;
  logic [W-1:0]  model [int];
  int checks = 0, failures = 0;

  weight_global_buffer dut (.clk, .we, .waddr, .wdata, .rden, .raddr, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] rnd();
    logic [W-1:0] v;
    for (int i = 0; i < W; i += 32) v[i +: 32] = $urandom;
    return v;
  endfunction

  task automatic write(int a, logic [W-1:0] d);
    @(negedge clk); we = 1'b1; waddr = AW'(a); wdata = d; model[a] = d;
    @(negedge clk); we = 1'b0;
  endtask

  task automatic read_check(int a);
    @(negedge clk); rden = 1'b1; raddr = AW'(a);
    @(negedge clk); rden = 1'b0; raddr = AW'($urandom);
    checks++;
    if (rdata !== model[a]) begin failures++; $display("addr %0d got %0h exp %0h", a, rdata, model[a]); end
    @(negedge clk);
    checks++;
    if (rdata !== model[a]) begin failures++; $display("read data not held"); end
  endtask

  initial begin
    int addrs [$];
    addrs.push_back(0);
    addrs.push_back(DEPTH - 1);
    for (int i = 0; i < 300; i++) addrs.push_back($urandom_range(0, DEPTH - 1));
    foreach (addrs[i]) write(addrs[i], rnd());
    addrs.shuffle();
    foreach (addrs[i]) read_check(addrs[i]);
    // read during write of the same word returns the old word
    begin
      logic [W-1:0] old, nw;
      old = model[addrs[0]];
      nw  = ~old;
      @(negedge clk); we = 1'b1; waddr = AW'(addrs[0]); wdata = nw; rden = 1'b1; raddr = AW'(addrs[0]);
      @(negedge clk); we = 1'b0; rden = 1'b0;
      checks++;
      if (rdata !== old) begin failures++; $display("read-during-write returned new data"); end
      model[addrs[0]] = nw;
      read_check(addrs[0]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
