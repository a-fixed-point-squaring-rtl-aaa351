// Self-checking test of the general-radix squarer at several digit sizes:
// radix 2 (M=1, bit-serial), 4, 8, 16, 256 and 65536 (a 64-bit squarand
// as four 16-bit digits), and the default N = 64, M = 2. Every instance
// checks its squares and its 7n + 1 cycle latency.
module tb_sqr_radix_general;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int K = 7;
  int   c[K], f[K];
  logic fin[K];

  tb_gen_unit #(.N(8),  .M(1), .COUNT(60)) u0 (.clk, .rst_n, .checks(c[0]), .failures(f[0]), .finished(fin[0]));
  tb_gen_unit #(.N(16), .M(2), .COUNT(60)) u1 (.clk, .rst_n, .checks(c[1]), .failures(f[1]), .finished(fin[1]));
  tb_gen_unit #(.N(24), .M(3), .COUNT(60)) u2 (.clk, .rst_n, .checks(c[2]), .failures(f[2]), .finished(fin[2]));
  tb_gen_unit #(.N(32), .M(4), .COUNT(60)) u3 (.clk, .rst_n, .checks(c[3]), .failures(f[3]), .finished(fin[3]));
  tb_gen_unit #(.N(64), .M(8), .COUNT(60)) u4 (.clk, .rst_n, .checks(c[4]), .failures(f[4]), .finished(fin[4]));
  tb_gen_unit #(.N(64), .M(2), .COUNT(60)) u5 (.clk, .rst_n, .checks(c[5]), .failures(f[5]), .finished(fin[5]));
  // 64-bit squarand as four radix-65536 digits (m = 16)
  tb_gen_unit #(.N(64), .M(16), .COUNT(60)) u6 (.clk, .rst_n, .checks(c[6]), .failures(f[6]), .finished(fin[6]));

  function automatic int sum(input int v[K]);
    int s = 0;
    foreach (v[i]) s += v[i];
    return s;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", sum(c), sum(f) + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    wait (fin[0] && fin[1] && fin[2] && fin[3] && fin[4] && fin[5] && fin[6]);
    $display("TB_RESULT checks=%0d failures=%0d", sum(c), sum(f));
    $finish;
  end
endmodule
