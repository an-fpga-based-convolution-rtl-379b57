// tb_conv_kcpe: self-checking test of a Kernel-Channel Processing Engine.
// Loads a random 4x3 weight matrix, drives random pixels every cycle and
// checks that two cycles later each kernel output is the dot product of the
// pixel's three channels with that kernel's weights (16-bit wrap).
module tb_conv_kcpe;
  localparam int K = 4, J = 3;
  logic        clk = 1'b0, rst = 1'b1, ld = 1'b0;
  logic [95:0] wv = '0;
  logic [23:0] px = '0;
  logic [15:0] psum [K];
  int checks = 0, failures = 0;
  logic [23:0] hist [3];

  conv_kcpe dut (.clk, .rst, .i_weight_load(ld), .i_weight(wv), .i_data(px), .o_psum(psum));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] dot(logic [23:0] p, logic [95:0] w, int k);
    logic [15:0] s = '0;
    for (int j = 0; j < J; j++) s += 16'(p[8*j +: 8] * w[8*(k*J+j) +: 8]);
    return s;
  endfunction

  initial begin
    logic [95:0] wcur;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int round = 0; round < 6; round++) begin
      wcur = {$urandom, $urandom, $urandom};
      @(negedge clk); ld = 1'b1; wv = wcur;
      @(negedge clk); ld = 1'b0;
      for (int t = 0; t < 60; t++) begin
        px = 24'($urandom);
        hist[0] = px;
        @(negedge clk);
        hist[1] = hist[0];
        if (t >= 1) begin
          for (int k = 0; k < K; k++) begin
            checks++;
            if (psum[k] !== dot(hist[2], wcur, k)) begin
              failures++;
              $display("round %0d t %0d k %0d got %0d exp %0d", round, t, k, psum[k], dot(hist[2], wcur, k));
            end
          end
        end
        hist[2] = hist[1];
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
