// tb_output_global_buffer: self-checking test of the output buffer RAM at
// its default 512 KB size. Writes random words, reads them back, checks the
// one-cycle read latency and ovld, held read data, and that a read of a
// word written in the same cycle returns the old contents (the accumulator
// relies on that ordering).
module tb_output_global_buffer;
  localparam int DEPTH = 131072, AW = $clog2(DEPTH);
  logic          clk = 1'b0, rst = 1'b1, wren = 1'b0, rden = 1'b0, ovld;
  logic [AW-1:0] wadd = '0, radd = '0;
  logic [31:0]   idat = '0, odat;
  logic [31:0]   model [int];
  int checks = 0, failures = 0;

  output_global_buffer dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write(int a, logic [31:0] d);
    @(negedge clk); wren = 1'b1; wadd = AW'(a); idat = d; model[a] = d;
    @(negedge clk); wren = 1'b0;
  endtask

  task automatic read_check(int a);
    @(negedge clk); rden = 1'b1; radd = AW'(a);
    @(negedge clk); rden = 1'b0; radd = AW'($urandom);
    checks += 2;
    if (!ovld) begin failures++; $display("ovld missing"); end
    if (odat !== model[a]) begin failures++; $display("addr %0d got %0h exp %0h", a, odat, model[a]); end
    @(negedge clk);
    checks += 2;
    if (ovld) begin failures++; $display("ovld stuck"); end
    if (odat !== model[a]) begin failures++; $display("read data not held"); end
  endtask

  initial begin
    int addrs [$];
    repeat (2) @(negedge clk);
    rst = 1'b0;
    addrs.push_back(0);
    addrs.push_back(DEPTH - 1);
    for (int i = 0; i < 300; i++) addrs.push_back($urandom_range(0, DEPTH - 1));
    foreach (addrs[i]) write(addrs[i], $urandom);
    addrs.shuffle();
    foreach (addrs[i]) read_check(addrs[i]);
    begin
      logic [31:0] old;
      old = model[addrs[0]];
      @(negedge clk); wren = 1'b1; wadd = AW'(addrs[0]); idat = ~old; rden = 1'b1; radd = AW'(addrs[0]);
      @(negedge clk); wren = 1'b0; rden = 1'b0;
      checks++;
      if (odat !== old) begin failures++; $display("read-during-write returned new data"); end
      model[addrs[0]] = ~old;
      read_check(addrs[0]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
