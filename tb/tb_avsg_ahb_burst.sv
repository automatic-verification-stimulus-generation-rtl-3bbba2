// tb_avsg_ahb_burst: end-to-end testbench of the burst-master generator at
// its default parameters.
//
// A random slave answers the generator: wait states (I_r low), ready, error
// responses (I_e high, I_r low) and, now and then, the illegal combination
// I_r and I_e together. Whenever the generator reaches a terminal state the
// slave starts a new burst of random length and address. A reference model
// here recomputes, before every rising edge, which transitions the protocol
// allows, and after the edge checks that
//   - fail was raised exactly when none was allowed, and then nothing moved;
//   - the transition taken was an allowed one and its update function holds
//     (next state, V_b, O_a, O_b; held values held);
//   - terminal states hold until start, and start reloads the burst.
// It also checks the biasing: with t1 and t4 both allowed, t4 must be taken
// with probability 5/65 (effective weights 60 and 5 after the busy bias);
// randomised O_d must follow the word weights 5/40/40/15, and randomised O_b
// the weights 3/1. Directed checks cover the reset values and the two worked
// cases: ready with 4 beats left at address 20, and ready together with
// error. Every mechanism (t1..t5, fail, wait hold, each terminal state,
// restart) must be seen at least once.
module tb_avsg_ahb_burst;
  import avsg_pkg::*;

  localparam int CYCLES = 200_000;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        start = 1'b0;
  logic [4:0]  start_len = '0;
  logic [31:0] start_addr = '0;
  logic        i_r = 1'b0, i_e = 1'b0;
  logic        o_b, fail, terminal, trans_valid;
  logic [31:0] o_a;
  logic [1:0]  o_d;
  logic [4:0]  v_b;
  state_e      state;
  trans_e      trans;

  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  avsg_ahb_burst dut (
    .clk(clk), .rst_n(rst_n), .start(start), .start_len(start_len), .start_addr(start_addr),
    .i_r(i_r), .i_e(i_e), .o_b(o_b), .o_a(o_a), .o_d(o_d), .fail(fail),
    .state(state), .v_b(v_b), .terminal(terminal), .trans(trans), .trans_valid(trans_valid));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  initial begin : watchdog
    repeat (CYCLES + 10_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Mechanism and statistics counters.
  int n_trans [NUM_T];
  int n_fail = 0, n_wait_hold = 0, n_restart = 0;
  int n_done = 0, n_busy = 0, n_error = 0;
  int n_pair = 0, n_pair_t4 = 0;
  int n_d [4];
  int n_rand_b [2];

  // Apply one clock with the given slave response and start request;
  // compare the result with the reference.
  task automatic step(input logic r, input logic e, input logic st,
                      input logic [4:0] len, input logic [31:0] addr);
    state_e      p_state;
    logic [4:0]  p_vb;
    logic [31:0] p_oa;
    logic        p_ob;
    logic [1:0]  p_od;
    logic [4:0]  allowed;   // {t5, t4, t3, t2, t1}
    bit          p_fail;
    @(negedge clk);
    i_r = r; i_e = e; start = st; start_len = len; start_addr = addr;
    #1;
    p_state = state; p_vb = v_b; p_oa = o_a; p_ob = o_b; p_od = o_d; p_fail = fail;
    allowed = '0;
    if (p_state == S_SEQ) begin
      allowed[0] =  r && !e && (p_vb != 0);
      allowed[1] = !r && !e;
      allowed[2] =  r && !e && (p_vb == 0);
      allowed[3] =  r && !e && (p_vb != 0);
      allowed[4] = !r &&  e;
    end
    check(p_fail == (p_state == S_SEQ && allowed == 0),
          $sformatf("fail=%0d in %s with I_r=%0d I_e=%0d", p_fail, p_state.name(), r, e));
    check(terminal == (p_state != S_SEQ), "terminal flag");
    @(posedge clk);
    #1;
    if (st) begin
      n_restart++;
      check(state == S_SEQ && v_b == len && o_a == addr && o_b == 1'b0 && !trans_valid,
            "start reloads a new burst");
    end else if (p_state != S_SEQ) begin
      check(state == p_state && v_b == p_vb && o_a == p_oa && o_b == p_ob && o_d == p_od && !trans_valid,
            $sformatf("terminal state %s holds", p_state.name()));
    end else if (allowed == 0) begin
      n_fail++;
      check(state == p_state && v_b == p_vb && o_a == p_oa && o_b == p_ob && o_d == p_od && !trans_valid,
            "protocol violation: nothing moves");
    end else begin
      check(trans_valid, "a transition is taken when one is allowed");
      check(allowed[trans], $sformatf("taken t%0d is allowed (%b)", int'(trans) + 1, allowed));
      n_trans[trans]++;
      if (allowed[0] && allowed[3]) begin
        n_pair++;
        if (trans == T4) n_pair_t4++;
      end
      case (trans)
        T1: begin
          check(state == S_SEQ && v_b == p_vb - 1 && o_a == p_oa + 1 && o_b == 1'b0, "t1 update");
          n_d[o_d]++;
        end
        T2: begin
          check(state == S_SEQ && v_b == p_vb && o_a == p_oa && o_b == p_ob && o_d == p_od, "t2 holds outputs");
          n_wait_hold++;
        end
        T3: begin
          check(state == S_DONE && v_b == p_vb, "t3 update");
          n_d[o_d]++;
          n_rand_b[o_b]++;
          n_done++;
        end
        T4: begin
          check(state == S_BUSY && v_b == p_vb - 1 && o_a == p_oa + 1 && o_b == 1'b1, "t4 update");
          n_d[o_d]++;
          n_busy++;
        end
        T5: begin
          check(state == S_ERROR && v_b == p_vb && o_b == 1'b0 && o_d == p_od, "t5 update");
          n_error++;
        end
        default: check(1'b0, "unknown transition");
      endcase
    end
  endtask

  function automatic bit in_band(int cnt, int n, real p, real sigmas);
    real mu, sd;
    mu = p * n;
    sd = $sqrt(n * p * (1.0 - p));
    return (real'(cnt) > mu - sigmas * sd - 0.002 * n) && (real'(cnt) < mu + sigmas * sd + 0.002 * n);
  endfunction

  initial begin : stim
    int cyc;
    int idle;
    foreach (n_trans[i]) n_trans[i] = 0;
    foreach (n_d[i]) n_d[i] = 0;
    foreach (n_rand_b[i]) n_rand_b[i] = 0;
    repeat (2) @(posedge clk);
    #1;
    check(state == S_SEQ && v_b == 5'd4 && o_a == 32'd20 && o_b == 1'b0 && o_d == 2'd0,
          "reset values: SEQ, V_b=4, O_a=20, O_b=0, O_d=0");
    rst_n = 1'b1;

    // Worked case 2: ready together with error is a violation.
    step(1'b1, 1'b1, 1'b0, '0, '0);
    // Worked case 1: ready with 4 beats left at address 20, until a t4 is drawn.
    begin
      bit seen_t4;
      seen_t4 = 0;
      for (int k = 0; k < 200 && !seen_t4; k++) begin
        step(1'b0, 1'b0, 1'b1, 5'd4, 32'd20);
        step(1'b1, 1'b0, 1'b0, '0, '0);
        if (trans_valid && trans == T4) begin
          seen_t4 = 1;
          check(state == S_BUSY && o_b == 1'b1 && o_a == 32'd21 && v_b == 5'd3,
                "case 1 via t4: BUSY, O_b=1, O_a=21, V_b=3");
        end else begin
          check(trans_valid && trans == T1 && state == S_SEQ && o_b == 1'b0 && o_a == 32'd21 && v_b == 5'd3,
                "case 1 via t1: SEQ, O_b=0, O_a=21, V_b=3");
        end
      end
      check(seen_t4, "case 1 reached t4 within 200 tries");
    end

    // Random slave.
    cyc = 0;
    idle = 0;
    while (cyc < CYCLES) begin
      int roll;
      logic r, e;
      roll = $urandom_range(0, 999);
      if (roll < 600)      begin r = 1; e = 0; end   // ready
      else if (roll < 930) begin r = 0; e = 0; end   // wait
      else if (roll < 980) begin r = 0; e = 1; end   // error response
      else                 begin r = 1; e = 1; end   // illegal
      if (terminal && idle >= 2) begin
        step(r, e, 1'b1, 5'($urandom_range(0, 31)), $urandom);
        idle = 0;
      end else begin
        if (terminal) idle++;
        step(r, e, 1'b0, '0, '0);
      end
      cyc++;
    end

    // Biasing checks.
    check(n_pair > 1000, $sformatf("enough t1/t4 choices (%0d)", n_pair));
    check(in_band(n_pair_t4, n_pair, 5.0 / 65.0, 5.0),
          $sformatf("t4 share among t1/t4 choices %0d/%0d, expected %.4f", n_pair_t4, n_pair, 5.0 / 65.0));
    begin
      int nd;
      real pd [4] = '{0.05, 0.40, 0.40, 0.15};
      nd = n_d[0] + n_d[1] + n_d[2] + n_d[3];
      for (int i = 0; i < 4; i++)
        check(in_band(n_d[i], nd, pd[i], 5.0), $sformatf("O_d=%0d drawn %0d of %0d, expected %.2f", i, n_d[i], nd, pd[i]));
      check(in_band(n_rand_b[0], n_rand_b[0] + n_rand_b[1], 0.75, 5.0),
            $sformatf("random O_b=0 drawn %0d of %0d, expected 0.75", n_rand_b[0], n_rand_b[0] + n_rand_b[1]));
    end

    // Every mechanism happened.
    for (int t = 0; t < NUM_T; t++) begin
      $display("t%0d taken %0d times", t + 1, n_trans[t]);
      check(n_trans[t] > 0, $sformatf("t%0d taken", t + 1));
    end
    $display("protocol violations %0d, wait holds %0d, restarts %0d, DONE %0d, BUSY %0d, ERROR %0d",
             n_fail, n_wait_hold, n_restart, n_done, n_busy, n_error);
    $display("t4 among t1/t4 choices: %0d of %0d; O_d counts %0d/%0d/%0d/%0d",
             n_pair_t4, n_pair, n_d[0], n_d[1], n_d[2], n_d[3]);
    check(n_fail > 0, "protocol violation detected");
    check(n_wait_hold > 0, "wait state held outputs");
    check(n_restart > 0, "burst restarted");
    check(n_done > 0 && n_busy > 0 && n_error > 0, "every terminal state reached");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
