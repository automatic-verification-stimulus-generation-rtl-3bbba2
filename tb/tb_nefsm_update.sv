// tb_nefsm_update: self-checking testbench for nefsm_update.
//
// For random present values and random generator outputs, each of the five
// transitions is applied and the result compared with its update function:
// t1 SEQ, V_b-1, O_a+1, O_b=0, O_d random; t2 SEQ, all held; t3 DONE,
// outputs random; t4 BUSY, V_b-1, O_a+1, O_b=1, O_d random; t5 ERROR,
// O_b=0, O_d held, O_a random. With no valid selection everything holds.
module tb_nefsm_update;
  import avsg_pkg::*;
  int checks = 0;
  int failures = 0;

  trans_e      sel;
  logic        sel_valid;
  state_e      state, state_n;
  logic        o_b, o_b_n, rnd_b;
  logic [31:0] o_a, o_a_n, rnd_a;
  logic [1:0]  o_d, o_d_n, rnd_d;
  logic [4:0]  v_b, v_b_n;

  nefsm_update #(.ADDR_W(32), .VB_W(5)) dut (
    .sel(sel), .sel_valid(sel_valid), .state(state),
    .o_b(o_b), .o_a(o_a), .o_d(o_d), .v_b(v_b),
    .rnd_b(rnd_b), .rnd_d(rnd_d), .rnd_a(rnd_a),
    .state_n(state_n), .o_b_n(o_b_n), .o_a_n(o_a_n), .o_d_n(o_d_n), .v_b_n(v_b_n));

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
    for (int k = 0; k < 4000; k++) begin
      int t;
      state_e ws;
      logic wb; logic [31:0] wa; logic [1:0] wd; logic [4:0] wv;
      t         = k % 5;
      sel       = trans_e'(t);
      sel_valid = (k % 11 != 0);
      state     = S_SEQ;
      o_b = 1'($urandom); o_a = $urandom; o_d = 2'($urandom); v_b = 5'($urandom_range(1, 31));
      if (k % 13 == 0) o_a = 32'hFFFF_FFFF;
      rnd_b = 1'($urandom); rnd_a = $urandom; rnd_d = 2'($urandom);
      #1;
      ws = state; wb = o_b; wa = o_a; wd = o_d; wv = v_b;
      if (sel_valid) begin
        case (t)
          0: begin ws = S_SEQ;   wv = v_b - 1; wa = o_a + 1; wb = 0;     wd = rnd_d; end
          1: begin ws = S_SEQ; end
          2: begin ws = S_DONE;  wb = rnd_b; wa = rnd_a; wd = rnd_d; end
          3: begin ws = S_BUSY;  wv = v_b - 1; wa = o_a + 1; wb = 1;     wd = rnd_d; end
          4: begin ws = S_ERROR; wb = 0; wa = rnd_a; end
          default: ;
        endcase
      end
      check(state_n == ws, $sformatf("t%0d valid=%0d: state %s want %s", t + 1, sel_valid, state_n.name(), ws.name()));
      check(o_b_n == wb, $sformatf("t%0d valid=%0d: O_b %0d want %0d", t + 1, sel_valid, o_b_n, wb));
      check(o_a_n == wa, $sformatf("t%0d valid=%0d: O_a %h want %h", t + 1, sel_valid, o_a_n, wa));
      check(o_d_n == wd, $sformatf("t%0d valid=%0d: O_d %0d want %0d", t + 1, sel_valid, o_d_n, wd));
      check(v_b_n == wv, $sformatf("t%0d valid=%0d: V_b %0d want %0d", t + 1, sel_valid, v_b_n, wv));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
