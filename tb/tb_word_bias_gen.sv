// tb_word_bias_gen: self-checking testbench for word_bias_gen.
//
// A 2-bit generator runs with word weights 5/40/40/15 for 200,000 clocks,
// then with 0/1/0/3, then with all weights 0. The count of every value must
// lie within 5 standard deviations (plus 0.1 %) of the binomial expectation
// N * W_v / sum(W); a value of weight 0 must never appear; with all weights
// 0 valid must stay low. A 1-bit generator with weights 3/1 runs alongside.
module tb_word_bias_gen;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   checks = 0;
  int   failures = 0;

  always #5 clk = ~clk;

  logic [7:0] w2 [4];
  logic [7:0] w1 [2];
  logic [1:0] v2;
  logic       v1;
  logic       ok2, ok1;

  word_bias_gen #(.NBITS(2), .WW(8), .RW(16), .SEED(32'h0BAD_F00D)) u_d (
    .clk(clk), .rst_n(rst_n), .weight(w2), .value(v2), .valid(ok2));
  word_bias_gen #(.NBITS(1), .WW(8), .RW(16), .SEED(32'h5EED_0B0B)) u_b (
    .clk(clk), .rst_n(rst_n), .weight(w1), .value(v1), .valid(ok1));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (800_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic judge(input string name, input int cnt, input int n, input int w, input int wsum);
    real p, mu, sd, tol;
    p   = real'(w) / real'(wsum);
    mu  = p * n;
    sd  = $sqrt(n * p * (1.0 - p));
    tol = 5.0 * sd + 0.001 * n;
    if (w == 0)
      check(cnt == 0, $sformatf("%s: weight 0 appeared %0d times", name, cnt));
    else
      check((real'(cnt) > mu - tol) && (real'(cnt) < mu + tol),
            $sformatf("%s: count %0d, expected %.1f +- %.1f", name, cnt, mu, tol));
  endtask

  task automatic run(input int a, b, c, d, input int n);
    int cnt2 [4];
    int cnt1 [2];
    int inval;
    w2 = '{8'(a), 8'(b), 8'(c), 8'(d)};
    foreach (cnt2[i]) cnt2[i] = 0;
    foreach (cnt1[i]) cnt1[i] = 0;
    inval = 0;
    for (int k = 0; k < n; k++) begin
      @(posedge clk);
      #1;
      if (ok2) cnt2[v2]++;
      else     inval++;
      if (ok1) cnt1[v1]++;
    end
    if (a + b + c + d == 0) begin
      check(inval == n, "all-zero weights: never valid");
      check(v2 == 2'd0, "all-zero weights: value 0");
    end else begin
      check(inval == 0, "valid whenever a weight is non-zero");
      for (int i = 0; i < 4; i++)
        judge($sformatf("d=%0d (weights %0d/%0d/%0d/%0d)", i, a, b, c, d),
              cnt2[i], n, int'(w2[i]), a + b + c + d);
    end
    judge("b=0", cnt1[0], n, 3, 4);
    judge("b=1", cnt1[1], n, 1, 4);
  endtask

  initial begin : stim
    w1 = '{8'd3, 8'd1};
    w2 = '{8'd5, 8'd40, 8'd40, 8'd15};
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    run(5, 40, 40, 15, 200_000);
    run(0, 1, 0, 3, 100_000);
    run(0, 0, 0, 0, 1_000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
