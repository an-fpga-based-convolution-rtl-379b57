// tb_conv_pe: self-checking test of one processing element.
// Loads random weights, drives random activations and incoming partial sums,
// and checks that each output equals psum_in + a*w of the previous cycle,
// wrapped to 16 bits; also checks that the weight is held while w_load is low.
module tb_conv_pe;
  logic        clk = 1'b0, rst = 1'b1, w_load = 1'b0;
  logic [7:0]  w_in = '0, a_in = '0;
  logic [15:0] psum_in = '0, psum_out;
  int checks = 0, failures = 0;

  conv_pe dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0]  w, a;
    logic [15:0] expect_v;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int t = 0; t < 400; t++) begin
      if (t % 50 == 0) begin
        w = 8'($urandom);
        if (t == 0) w = 8'd151;
        @(negedge clk); w_load = 1'b1; w_in = w;
        @(negedge clk); w_load = 1'b0; w_in = 8'($urandom);  // must be ignored
      end
      a = (t == 0) ? 8'd90 : 8'($urandom);
      @(negedge clk);
      a_in = a;
      @(negedge clk);                 // product registered at the edge before
      psum_in = 16'($urandom);
      a_in = 8'($urandom);
      #1;
      expect_v = psum_in + 16'(a * w);
      checks++;
      if (psum_out !== expect_v) begin
        failures++;
        $display("t=%0d a=%0d w=%0d psum_in=%0d got %0d exp %0d", t, a, w, psum_in, psum_out, expect_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
