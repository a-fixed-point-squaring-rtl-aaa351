// Self-checking test of the quaternary controller for N = 8 (n = 4) and
// N = 64 (n = 32): load only with start while ready, exactly n iteration
// cycles (en) per start, done one cycle after the last iteration, ready
// again in the done cycle, start ignored while busy, back-to-back starts.
module tb_sq4_controller;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // two instances driven by the same kind of stimulus
  logic s8, r8, l8, e8, d8;
  logic s64, r64, l64, e64, d64;
  sq4_controller #(.N(8))  u8  (.clk, .rst_n, .start(s8),  .ready(r8),  .load(l8),  .en(e8),  .done(d8));
  sq4_controller #(.N(64)) u64 (.clk, .rst_n, .start(s64), .ready(r64), .load(l64), .en(e64), .done(d64));

  // reference: cycles of en since the last load, and done expected next
  int cnt8 = 0, cnt64 = 0;
  bit exp_d8 = 0, exp_d64 = 0;
  int ops8 = 0, ops64 = 0, ignored = 0, b2b = 0;

  always @(posedge clk) if (rst_n) begin
    // sample before the edge updates
    check(d8 == exp_d8, "done N=8");
    check(d64 == exp_d64, "done N=64");
    check(l8 == (r8 && s8), "load N=8");
    check(l64 == (r64 && s64), "load N=64");
    if (s8 && !r8) ignored++;
    if (s8 && r8 && d8) b2b++;
    if (l8) begin cnt8 = 1; ops8++; end else if (e8) cnt8++;
    if (l64) begin cnt64 = 1; ops64++; end else if (e64) cnt64++;
    exp_d8  = e8  && cnt8 == 4;
    exp_d64 = e64 && cnt64 == 32;
    if (e8)  check(cnt8 <= 4, "en count N=8");
    if (e64) check(cnt64 <= 32, "en count N=64");
    if (!e8)  check(r8, "ready when idle N=8");
  end

  initial begin
    s8 = 0; s64 = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      s8  = ($urandom % 3) == 0 || (k > 2000 && k < 2100);
      s64 = ($urandom % 7) == 0;
    end
    @(negedge clk) begin s8 = 0; s64 = 0; end
    repeat (40) @(negedge clk);
    check(r8 && r64, "idle at end");
    check(ops8 > 100 && ops64 > 10, "operations started");
    check(ignored > 0, "start while busy seen");
    check(b2b > 0, "back-to-back start seen");
    $display("ops8=%0d ops64=%0d ignored=%0d b2b=%0d", ops8, ops64, ignored, b2b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
