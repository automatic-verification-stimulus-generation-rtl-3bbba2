// tb_hburst_bias: word-level biasing of a 3-bit burst-type field over one
// million clocks.
//
// A 3-bit word_bias_gen stands for the generator of the AHB HBURST field
// (000 SINGLE, 001 INCR, 010 WRAP4, 011 INCR4, 100 WRAP8, 101 INCR8,
// 110 WRAP16, 111 INCR16) with word weights 10/20/40/5/15/0/0/10. No
// per-bit bias can produce this distribution. Each burst type must appear
// within 5 standard deviations of its expected count, and INCR8 and WRAP16,
// weighted 0, never.
module tb_hburst_bias;
  localparam int CYCLES = 1_000_000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   checks = 0;
  int   failures = 0;

  always #5 clk = ~clk;

  logic [7:0] weight [8];
  logic [2:0] hburst;
  logic       valid;

  word_bias_gen #(.NBITS(3), .WW(8), .RW(16), .SEED(32'h4B75_5257)) u_gen (
    .clk(clk), .rst_n(rst_n), .weight(weight), .value(hburst), .valid(valid));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (CYCLES + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stim
    string names [8] = '{"SINGLE", "INCR", "WRAP4", "INCR4", "WRAP8", "INCR8", "WRAP16", "INCR16"};
    int    w [8] = '{10, 20, 40, 5, 15, 0, 0, 10};
    int    cnt [8];
    int    wsum;
    wsum = 0;
    for (int i = 0; i < 8; i++) begin
      weight[i] = 8'(w[i]);
      cnt[i] = 0;
      wsum += w[i];
    end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < CYCLES; k++) begin
      @(posedge clk);
      #1;
      check(valid, "valid");
      cnt[hburst]++;
    end
    for (int i = 0; i < 8; i++) begin
      real p, mu, sd;
      p  = real'(w[i]) / real'(wsum);
      mu = p * CYCLES;
      sd = $sqrt(CYCLES * p * (1.0 - p));
      $display("HBURST %03b %-6s weight %2d count %7d (%.2f%%)", 3'(i), names[i], w[i], cnt[i],
               100.0 * cnt[i] / CYCLES);
      if (w[i] == 0) check(cnt[i] == 0, $sformatf("%s weighted 0 appeared", names[i]));
      else check(real'(cnt[i]) > mu - 5.0 * sd - 0.001 * CYCLES && real'(cnt[i]) < mu + 5.0 * sd + 0.001 * CYCLES,
                 $sformatf("%s count %0d, expected %.0f", names[i], cnt[i], mu));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
