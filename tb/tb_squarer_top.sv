// End-to-end test of the top level at its default parameters (N = 64,
// general unit with M = 2). Both squarers run concurrently on random and
// extreme squarands; every square is compared with the simulator's
// 128-bit product and every latency with n = 32 cycles (quaternary unit)
// or 7n + 1 = 225 cycles (general unit). It also counts how often each
// mechanism happens and fails if one never did: each of the four cases of
// the low digit a0, the adder array adding a non-zero right bus (a0 = 3),
// a non-zero carry kept by the accumulator, a back-to-back start in the
// done cycle, a start ignored while busy, and in the general unit a
// negative, zero and positive residual r.
module tb_squarer_top;
  import sq_pkg::*;
  localparam int N = 64;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic sq4_start, sq4_ready, sq4_done, sq4_busy;
  logic [N-1:0] sq4_alpha;
  logic [2*N-1:0] sq4_square;
  a0_case_e sq4_a0;
  logic gen_start, gen_ready, gen_done;
  logic [N-1:0] gen_alpha;
  logic [2*N-1:0] gen_square;

  squarer_top dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int a0_seen[4];
  int adder_used = 0, carry_kept = 0, back_to_back = 0, ignored = 0;
  int r_neg = 0, r_zero = 0, r_pos = 0;
  int sq4_ops = 0, gen_ops = 0;

  logic [N-1:0] p4, pg;
  longint t4, tg, cyc = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (sq4_busy) begin
        a0_seen[int'(sq4_a0)]++;
        if (dut.u_sq4.u_dp.right != '0) adder_used++;
      end
      if (dut.u_sq4.u_dp.u_acc.carry_q != '0) carry_kept++;
      if (sq4_start && !sq4_ready) ignored++;
      if (sq4_start && sq4_ready && sq4_done) back_to_back++;
      if (dut.u_gen.state_q == G_STEP5) begin
        if (dut.u_gen.r_signed < 0)       r_neg++;
        else if (dut.u_gen.r_signed == 0) r_zero++;
        else                              r_pos++;
      end
      if (sq4_done) begin
        check(sq4_square == 128'(p4) * 128'(p4), $sformatf("sq4 %h^2 = %h", p4, sq4_square));
        check(cyc - t4 == longint'(N / 2), $sformatf("sq4 latency %0d", cyc - t4));
        sq4_ops++;
      end
      if (gen_done) begin
        check(gen_square == 128'(pg) * 128'(pg), $sformatf("gen %h^2 = %h", pg, gen_square));
        check(cyc - tg == longint'(7 * (N / 2) + 1), $sformatf("gen latency %0d", cyc - tg));
        gen_ops++;
      end
      if (sq4_start && sq4_ready) begin p4 <= sq4_alpha; t4 <= cyc; end
      if (gen_start && gen_ready) begin pg <= gen_alpha; tg <= cyc; end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
  end

  function automatic logic [N-1:0] pick(input int k);
    case (k)
      0: return '1;
      1: return '0;
      2: return 64'hFFFF_FFFF_0000_0001;
      3: return 64'h8000_0000_0000_0000;
      default: return {$urandom, $urandom};
    endcase
  endfunction

  // quaternary unit: mostly back to back, sometimes a gap or a start while busy
  initial begin
    sq4_start = 0; sq4_alpha = '0;
    @(posedge rst_n);
    for (int k = 0; k < 400; k++) begin
      @(negedge clk);
      while (!sq4_ready) begin
        sq4_start = ($urandom % 16) == 0;  // ignored while busy
        sq4_alpha = {$urandom, $urandom};
        @(negedge clk);
      end
      sq4_alpha = pick(k); sq4_start = 1;
      @(negedge clk);
      sq4_start = 0; sq4_alpha = {$urandom, $urandom};
      if ($urandom % 4 == 0) repeat ($urandom % 5) @(negedge clk);
      else if (k % 2 == 0) begin
        // wait for the done cycle and start again in it
        while (!sq4_ready) @(negedge clk);
        sq4_alpha = pick(k + 100); sq4_start = 1;
        @(negedge clk);
        sq4_start = 0;
        k++;
      end
    end
  end

  // general unit
  initial begin
    gen_start = 0; gen_alpha = '0;
    @(posedge rst_n);
    for (int k = 0; k < 40; k++) begin
      @(negedge clk);
      while (!gen_ready) @(negedge clk);
      gen_alpha = pick(k); gen_start = 1;
      @(negedge clk);
      gen_start = 0; gen_alpha = {$urandom, $urandom};
    end
    while (gen_ops < 40 || sq4_ops < 400) @(negedge clk);
    repeat (40) @(negedge clk);
    foreach (a0_seen[i]) check(a0_seen[i] > 0, $sformatf("a0 case %0d never seen", i));
    check(adder_used > 0, "adder array never added");
    check(carry_kept > 0, "accumulator carry never kept");
    check(back_to_back > 0, "no back-to-back start");
    check(ignored > 0, "no start while busy");
    check(r_neg > 0 && r_zero > 0 && r_pos > 0, "general unit residual signs");
    check(sq4_ops >= 400, $sformatf("sq4 completed %0d", sq4_ops));
    check(gen_ops == 40, $sformatf("gen completed %0d", gen_ops));
    $display("a0 cases %0d %0d %0d %0d, adder %0d, carry %0d, back-to-back %0d, ignored %0d, r -/0/+ %0d/%0d/%0d, ops %0d/%0d",
             a0_seen[0], a0_seen[1], a0_seen[2], a0_seen[3], adder_used, carry_kept,
             back_to_back, ignored, r_neg, r_zero, r_pos, sq4_ops, gen_ops);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
