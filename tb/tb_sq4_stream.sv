// Test harness: one quaternary squarer of width N fed a stream of COUNT
// squarands back to back (a new start in every done cycle). Checks every
// square against the simulator's wide product and reports, through its
// ports, the number of clocks from the first start to the last done.
module tb_sq4_stream
  import sq_pkg::*;
#(
  parameter int unsigned N     = 8,
  parameter int unsigned COUNT = 100
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output int   clocks,
  output logic finished
);
  logic           start, ready, done, busy;
  logic [N-1:0]   alpha;
  logic [2*N-1:0] square;
  a0_case_e       a0;

  sq4_squarer #(.N(N)) dut (.*);

  logic [N-1:0] q[$];
  int           completed = 0;
  logic         counting  = 0;

  always @(posedge clk) if (rst_n) begin
    if (counting) clocks <= clocks + 1;
    if (done) begin
      logic [N-1:0] a;
      a = q.pop_front();
      checks <= checks + 1;
      if (256'(square) != 256'(a) * 256'(a)) begin
        failures <= failures + 1;
        $display("FAIL N=%0d %h^2 -> %h", N, a, square);
      end
      completed <= completed + 1;
      if (completed + 1 == int'(COUNT)) counting <= 0;
    end
    if (start && ready) begin
      q.push_back(alpha);
      if (completed == 0) counting <= 1;
    end
  end

  initial begin
    checks = 0; failures = 0; clocks = 0; finished = 0;
    start = 0; alpha = '0;
    @(posedge rst_n);
    @(negedge clk);
    for (int k = 0; k < int'(COUNT); k++) begin
      while (!ready) @(negedge clk);
      alpha = N'({$urandom, $urandom});
      if (k == 0) alpha = '1;
      start = 1;
      @(negedge clk);
      start = 0;
    end
    while (completed < int'(COUNT)) @(negedge clk);
    finished = 1;
  end
endmodule
