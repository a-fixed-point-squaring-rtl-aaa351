// Test harness for one general-radix squarer instance: squares COUNT
// squarands (all-ones, zero, one, then random) one after another and
// compares each result with the simulator's wide product; checks the
// 7n + 1 cycle latency from the start cycle to done. Reports its counts
// through ports and raises finished when done.
module tb_gen_unit #(
  parameter int unsigned N     = 16,
  parameter int unsigned M     = 2,
  parameter int unsigned COUNT = 50
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output logic finished
);
  localparam int unsigned NDIG = N / M;

  logic           start, ready, done;
  logic [N-1:0]   alpha;
  logic [2*N-1:0] square;

  sqr_radix_general #(.N(N), .M(M)) dut (.*);

  initial begin
    logic [N-1:0]   a;
    logic [255:0]   exp;
    int             lat;
    checks = 0; failures = 0; finished = 0;
    start = 0; alpha = '0;
    @(posedge rst_n);
    for (int k = 0; k < COUNT; k++) begin
      a = N'({$urandom, $urandom});
      if (k == 0) a = '1;
      if (k == 1) a = '0;
      if (k == 2) a = N'(1);
      @(negedge clk);
      while (!ready) @(negedge clk);
      alpha = a; start = 1;
      @(negedge clk);
      start = 0; alpha = N'({$urandom, $urandom});
      lat = 1;
      while (!done && lat < 10 * int'(NDIG) + 20) begin
        @(negedge clk);
        lat++;
      end
      exp = 256'(a) * 256'(a);
      checks++;
      if (256'(square) != exp) begin
        failures++;
        $display("FAIL N=%0d M=%0d %h^2 -> %h", N, M, a, square);
      end
      checks++;
      if (lat != 7 * int'(NDIG) + 1) begin
        failures++;
        $display("FAIL N=%0d M=%0d latency %0d", N, M, lat);
      end
    end
    finished = 1;
  end
endmodule
