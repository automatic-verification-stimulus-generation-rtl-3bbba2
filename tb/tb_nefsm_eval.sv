// tb_nefsm_eval: self-checking testbench for nefsm_eval.
//
// Exhaustive over the four states, both slave inputs and every burst count
// of a 5-bit V_b. The expected candidate set is written out per input case:
// in SEQ, ready without error gives {t1, t4} with beats left and {t3}
// without; not ready without error gives {t2}; error without ready gives
// {t5}; ready with error gives nothing, which is a protocol violation
// (fail). The other states have no transitions and are terminal.
module tb_nefsm_eval;
  import avsg_pkg::*;
  int checks = 0;
  int failures = 0;

  state_e     state;
  logic       i_r, i_e;
  logic [4:0] v_b;
  tmask_t     ntcs;
  logic       fail, terminal;

  nefsm_eval #(.VB_W(5)) dut (
    .state(state), .i_r(i_r), .i_e(i_e), .v_b(v_b),
    .ntcs(ntcs), .fail(fail), .terminal(terminal));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stim
    state_e st;
    for (int s = 0; s < 4; s++) begin
      st = state_e'(s);
      for (int r = 0; r < 2; r++)
        for (int e = 0; e < 2; e++)
          for (int b = 0; b < 32; b++) begin
            logic [4:0] want;
            bit want_fail;
            state = st; i_r = 1'(r); i_e = 1'(e); v_b = 5'(b);
            #1;
            // bit order: {t5, t4, t3, t2, t1}
            if (st != S_SEQ)              want = 5'b00000;
            else if (r == 1 && e == 0)    want = (b != 0) ? 5'b01001 : 5'b00100;
            else if (r == 0 && e == 0)    want = 5'b00010;
            else if (r == 0 && e == 1)    want = 5'b10000;
            else                          want = 5'b00000;
            want_fail = (st == S_SEQ) && (r == 1) && (e == 1);
            check(ntcs == want, $sformatf("state %s I_r=%0d I_e=%0d V_b=%0d: ntcs %b want %b",
                                          st.name(), r, e, b, ntcs, want));
            check(fail == want_fail, $sformatf("state %s I_r=%0d I_e=%0d: fail %0d", st.name(), r, e, fail));
            check(terminal == (st != S_SEQ), "terminal flag");
          end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
