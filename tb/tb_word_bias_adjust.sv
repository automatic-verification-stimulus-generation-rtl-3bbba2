// tb_word_bias_adjust: self-checking testbench for word_bias_adjust.
//
// First the worked example: transition weights 80/40/40/20/100, a 1-bit
// signal b with word weights 3/1 that t1 and t5 force to 0, t4 forces to 1
// and t2, t3 leave free. The modified weights must be 60/40/40/5/75.
// Then a 2-bit signal with random weights and feasibility sets, checked
// against floor(w * feasible_share / total_share) computed here.
module tb_word_bias_adjust;
  int checks = 0;
  int failures = 0;

  logic [7:0] w1 [5];
  logic [1:0] f1 [5];
  logic [7:0] ww1 [2];
  logic [7:0] wm1 [5];

  logic [7:0] w2 [5];
  logic [3:0] f2 [5];
  logic [7:0] ww2 [4];
  logic [7:0] wm2 [5];

  word_bias_adjust #(.N(5), .NBITS(1), .WW(8)) u_1bit (
    .w(w1), .feasible(f1), .word_w(ww1), .w_mod(wm1));
  word_bias_adjust #(.N(5), .NBITS(2), .WW(8)) u_2bit (
    .w(w2), .feasible(f2), .word_w(ww2), .w_mod(wm2));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stim
    int expect1 [5] = '{60, 40, 40, 5, 75};
    w1  = '{8'd80, 8'd40, 8'd40, 8'd20, 8'd100};
    f1  = '{2'b01, 2'b11, 2'b11, 2'b10, 2'b01};
    ww1 = '{8'd3, 8'd1};
    w2  = '{8'd0, 8'd0, 8'd0, 8'd0, 8'd0};
    f2  = '{4'd0, 4'd0, 4'd0, 4'd0, 4'd0};
    ww2 = '{8'd0, 8'd0, 8'd0, 8'd0};
    #1;
    for (int t = 0; t < 5; t++)
      check(int'(wm1[t]) == expect1[t],
            $sformatf("worked example t%0d: got %0d want %0d", t + 1, wm1[t], expect1[t]));
    // All word weights zero: weights pass unchanged.
    ww1 = '{8'd0, 8'd0};
    #1;
    for (int t = 0; t < 5; t++)
      check(wm1[t] == w1[t], "zero word weights leave transition weights alone");

    for (int k = 0; k < 5000; k++) begin
      int tot;
      for (int t = 0; t < 5; t++) begin
        w2[t] = 8'($urandom);
        f2[t] = 4'($urandom);
      end
      for (int i = 0; i < 4; i++) ww2[i] = 8'($urandom);
      #1;
      tot = 0;
      for (int i = 0; i < 4; i++) tot += ww2[i];
      for (int t = 0; t < 5; t++) begin
        int share, want;
        share = 0;
        for (int i = 0; i < 4; i++) if (f2[t][i]) share += ww2[i];
        want = (tot == 0) ? int'(w2[t]) : int'($floor(real'(w2[t]) * real'(share) / real'(tot) + 1e-9));
        check(int'(wm2[t]) == want,
              $sformatf("random: w=%0d share=%0d tot=%0d got %0d want %0d", w2[t], share, tot, wm2[t], want));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
