// tb_conv_regfile: self-checking test of the register file.
// Writes every configuration register with random data and reads it back,
// checks the field split into the configuration struct, the one-cycle start
// pulse (and that a start while busy is ignored), the soft-reset level, and
// the sticky status bits and their clearing by the next start.
module tb_conv_regfile;
  import conv_pkg::*;
  logic        clk = 1'b0, rst = 1'b1;
  logic        reg_wr = 1'b0, reg_rd = 1'b0;
  logic [7:0]  reg_addr = '0;
  logic [31:0] reg_wdata = '0, reg_rdata;
  conv_conf_t  conf;
  logic        start, soft_rst, busy = 1'b0, done = 1'b0, overflow = 1'b0, conf_err = 1'b0;
  int checks = 0, failures = 0, starts = 0;

  conv_regfile dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (!rst && start) starts++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(logic [7:0] a, logic [31:0] d);
    @(negedge clk); reg_wr = 1'b1; reg_addr = a; reg_wdata = d;
    @(negedge clk); reg_wr = 1'b0;
  endtask

  task automatic rd(logic [7:0] a, output logic [31:0] d);
    @(negedge clk); reg_rd = 1'b1; reg_addr = a;
    @(negedge clk); reg_rd = 1'b0; d = reg_rdata;
  endtask

  task automatic check(string what, logic [31:0] got, logic [31:0] expv);
    checks++;
    if (got !== expv) begin failures++; $display("%s: got %0h exp %0h", what, got, expv); end
  endtask

  initial begin
    logic [31:0] v [8];
    logic [31:0] d;
    logic [7:0]  addrs [6] = '{REG_INPUTSHAPE, REG_INPUTRSTCNT, REG_KERNELSHAPE,
                               REG_KERNELSIZE, REG_OUTPUTSIZE, REG_WEIGHTINTERVAL};
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int rep = 0; rep < 4; rep++) begin
      for (int i = 0; i < 6; i++) begin v[i] = $urandom; wr(addrs[i], v[i]); end
      for (int i = 0; i < 6; i++) begin rd(addrs[i], d); check("readback", d, v[i]); end
      check("h", conf.h, v[0][31:16]);  check("w", conf.w, v[0][15:0]);
      check("plane", conf.plane_words, v[1]);
      check("m", conf.m, v[2][31:16]);  check("c", conf.c, v[2][15:0]);
      check("r", conf.r, v[3][31:16]);  check("s", conf.s, v[3][15:0]);
      check("p", conf.p, v[4][31:16]);  check("q", conf.q, v[4][15:0]);
      check("group", conf.group_words, v[5]);
    end
    // start pulse
    wr(REG_CTRL, 32'h1);
    @(negedge clk);
    check("one start", starts, 1);
    repeat (2) @(negedge clk);
    check("start is a pulse", starts, 1);
    // status
    busy = 1'b1;
    wr(REG_CTRL, 32'h1);           // ignored while busy
    check("start ignored while busy", starts, 1);
    rd(REG_STATUS, d); check("busy", d, 32'h1);
    @(negedge clk); done = 1'b1; overflow = 1'b1; busy = 1'b0;
    @(negedge clk); done = 1'b0; overflow = 1'b0;
    rd(REG_STATUS, d); check("done+ovf sticky", d, 32'h6);
    @(negedge clk); conf_err = 1'b1;
    @(negedge clk); conf_err = 1'b0;
    rd(REG_STATUS, d); check("err sticky", d, 32'hE);
    wr(REG_CTRL, 32'h1);
    rd(REG_STATUS, d); check("cleared by start", d, 32'h0);
    // soft reset level
    wr(REG_CTRL, 32'h2);
    check("soft reset on", soft_rst, 1'b1);
    rd(REG_CTRL, d); check("ctrl readback", d, 32'h2);
    wr(REG_CTRL, 32'h0);
    check("soft reset off", soft_rst, 1'b0);
    rd(8'hF0, d); check("unmapped", d, 32'hDEAD_BEEF);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
