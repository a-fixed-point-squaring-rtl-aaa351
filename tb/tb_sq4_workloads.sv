// Runs the evaluated word sizes of the quaternary squarer (8, 16, 32 and
// 64 bits) as back-to-back streams of squares, each unit built at its word
// size. Besides the squares it checks the throughput in clocks per square:
// it must be n = N/2, and it must agree with the ratio of maximum clock
// frequency to throughput reported for the circuit (MHz / MW/s: 1328/332,
// 1109/138, 824/51.5 and 638/20, i.e. 4, 8, 16 and 32 when rounded).
module tb_sq4_workloads;
  localparam int COUNT = 100;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int c[4], f[4], k[4];
  logic fin[4];

  tb_sq4_stream #(.N(8),  .COUNT(COUNT)) u0 (.clk, .rst_n, .checks(c[0]), .failures(f[0]), .clocks(k[0]), .finished(fin[0]));
  tb_sq4_stream #(.N(16), .COUNT(COUNT)) u1 (.clk, .rst_n, .checks(c[1]), .failures(f[1]), .clocks(k[1]), .finished(fin[1]));
  tb_sq4_stream #(.N(32), .COUNT(COUNT)) u2 (.clk, .rst_n, .checks(c[2]), .failures(f[2]), .clocks(k[2]), .finished(fin[2]));
  tb_sq4_stream #(.N(64), .COUNT(COUNT)) u3 (.clk, .rst_n, .checks(c[3]), .failures(f[3]), .clocks(k[3]), .finished(fin[3]));

  // reported maximum frequency (MHz) and throughput (MW/s) per word size
  real fmax[4] = '{1328.0, 1109.0, 824.0, 638.0};
  real tput[4] = '{332.0, 138.0, 51.5, 20.0};
  int  width[4] = '{8, 16, 32, 64};

  int checks = 0, failures = 0;

  initial begin
    repeat (50000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    wait (fin[0] && fin[1] && fin[2] && fin[3]);
    foreach (c[i]) begin
      int per_word, reported;
      checks   += c[i];
      failures += f[i];
      // clocks counts from the cycle after the first start to the last done
      per_word = k[i] / COUNT;
      reported = int'(fmax[i] / tput[i]);   // rounds to nearest
      checks++;
      if (k[i] != COUNT * width[i] / 2 || per_word != reported) begin
        failures++;
        $display("FAIL N=%0d: %0d clocks for %0d squares, reported ratio %0d",
                 width[i], k[i], COUNT, reported);
      end
      $display("N=%0d: %0d squares in %0d clocks = %0d clocks/square (reported ratio %0d)",
               width[i], COUNT, k[i], per_word, reported);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
