// Self-checking test of the quaternary datapath, driven directly: load
// with the squarand, then n-1 further enabled cycles; res must equal
// alpha^2 (computed by the simulator as a 128-bit product). Covers all
// 8-bit squarands for N = 8 and random/extreme squarands for N = 64.
module tb_sq4_datapath;
  import sq_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;

  always #5 clk = ~clk;

  logic l8, e8;   logic [7:0]  a8;  logic [15:0]  q8;  a0_case_e d8;
  logic l64, e64; logic [63:0] a64; logic [127:0] q64; a0_case_e d64;

  sq4_datapath #(.N(8))  u8  (.clk, .rst_n, .load(l8),  .en(e8),  .alpha(a8),  .res(q8),  .a0(d8));
  sq4_datapath #(.N(64)) u64 (.clk, .rst_n, .load(l64), .en(e64), .alpha(a64), .res(q64), .a0(d64));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    l8 = 0; e8 = 0; a8 = 0; l64 = 0; e64 = 0; a64 = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int v = 0; v < 256; v++) begin
      @(negedge clk) begin a8 = 8'(v); l8 = 1; e8 = 1; end
      @(negedge clk) l8 = 0;
      repeat (3) @(negedge clk);     // iterations 1..3 of n = 4
      e8 = 0; a8 = '1;               // input may change after the load
      @(negedge clk);
      checks++;
      if (q8 != 16'(v * v)) begin
        failures++;
        $display("FAIL N=8 %0d^2 -> %0d", v, q8);
      end
    end
    for (int k = 0; k < 300; k++) begin
      logic [63:0] a;
      a = {$urandom, $urandom};
      if (k == 0) a = '1;
      if (k == 1) a = 64'h5555_5555_5555_5555;
      if (k == 2) a = 64'hAAAA_AAAA_AAAA_AAAA;
      @(negedge clk) begin a64 = a; l64 = 1; e64 = 1; end
      @(negedge clk) l64 = 0;
      repeat (31) @(negedge clk);    // iterations 1..31 of n = 32
      e64 = 0;
      @(negedge clk);
      checks++;
      if (q64 != 128'(a) * 128'(a)) begin
        failures++;
        $display("FAIL N=64 %h^2 -> %h", a, q64);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
