// tb_weighted_select: self-checking testbench for weighted_select (N = 5).
//
// Part 1 sweeps every one of the 2^16 random inputs for several weight and
// enable settings and counts how often each candidate wins. Candidate i must
// win floor or ceil of 2^16 * w_i / sum(enabled w) times, so the
// distribution is exactly proportional to the weights (within one count).
// The settings include the transition weights 80/40/40/20/100 with only t1
// and t4 enabled (an 80 % : 20 % split), zero weights and an empty set.
// Part 2 applies random weights, enables and numbers and checks the result
// against an interval search written here: candidate i is correct when
// r = (rnd * total) >> 16 lies in [P_(i-1), P_i) of the enabled prefix sums.
module tb_weighted_select;
  localparam int N = 5;
  int checks = 0;
  int failures = 0;

  logic [7:0]  weight [N];
  logic [N-1:0] enable;
  logic [15:0] rnd;
  logic        valid;
  logic [2:0]  sel;
  logic [N-1:0] onehot;
  logic [10:0] total;

  weighted_select #(.N(N), .WW(8), .RW(16)) dut (
    .weight(weight), .enable(enable), .rnd(rnd),
    .valid(valid), .sel(sel), .onehot(onehot), .total(total));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    #100_000_000;
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic sweep(input int w0, w1, w2, w3, w4, input logic [N-1:0] en);
    int cnt [N];
    int sum;
    int none;
    weight = '{8'(w0), 8'(w1), 8'(w2), 8'(w3), 8'(w4)};
    enable = en;
    sum = 0;
    for (int i = 0; i < N; i++) begin
      cnt[i] = 0;
      if (en[i]) sum += weight[i];
    end
    none = 0;
    for (int k = 0; k < 65536; k++) begin
      rnd = 16'(k);
      #1;
      if (valid) cnt[sel]++;
      else none++;
    end
    check(total == 11'(sum), $sformatf("total %0d want %0d", total, sum));
    if (sum == 0) begin
      check(none == 65536, "empty or zero-weight set never valid");
    end else begin
      check(none == 0, "non-empty set always valid");
      for (int i = 0; i < N; i++) begin
        longint ideal_x = longint'(65536) * (en[i] ? weight[i] : 0);
        longint lo = ideal_x / sum;
        longint hi = (ideal_x + sum - 1) / sum;
        check(cnt[i] >= lo && cnt[i] <= hi,
              $sformatf("weights %p en %b: candidate %0d won %0d times, want %0d..%0d",
                        weight, en, i, cnt[i], lo, hi));
      end
    end
  endtask

  initial begin : stim
    // Transition weights of the burst model; t1 and t4 are the candidates.
    sweep(80, 40, 40, 20, 100, 5'b01001);
    // Modified weights 60/40/40/5/75 with the same two candidates.
    sweep(60, 40, 40, 5, 75, 5'b01001);
    sweep(80, 40, 40, 20, 100, 5'b11111);
    sweep(0, 7, 0, 255, 1, 5'b11111);
    sweep(10, 20, 30, 40, 50, 5'b10100);
    sweep(10, 20, 30, 40, 50, 5'b00000);
    sweep(0, 0, 9, 0, 0, 5'b11011);
    // Random vectors against an interval search.
    for (int k = 0; k < 20000; k++) begin
      int p [N];
      int acc, tot, r, want;
      for (int i = 0; i < N; i++) weight[i] = 8'($urandom_range(0, 255));
      if (k % 7 == 0) weight[$urandom_range(0, N-1)] = 8'd0;
      enable = N'($urandom);
      rnd    = 16'($urandom);
      #1;
      acc = 0;
      for (int i = 0; i < N; i++) begin
        if (enable[i]) acc += weight[i];
        p[i] = acc;
      end
      tot = acc;
      r = (int'(rnd) * tot) >>> 16;
      want = -1;
      for (int i = 0; i < N; i++)
        if (r >= (i == 0 ? 0 : p[i-1]) && r < p[i]) want = i;
      check(valid == (tot != 0), "valid iff enabled weight sum non-zero");
      if (tot != 0) begin
        check(int'(sel) == want, $sformatf("sel %0d want %0d", sel, want));
        check(onehot == (N'(1) << want), "onehot matches sel");
        check(enable[sel] && weight[sel] != 0, "winner is enabled with non-zero weight");
      end else begin
        check(onehot == '0, "no winner when nothing to pick");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
