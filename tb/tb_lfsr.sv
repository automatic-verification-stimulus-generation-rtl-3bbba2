// tb_lfsr: self-checking testbench for lfsr.
//
// Instance u_full runs the default 32-bit register, 16 steps per clock; every
// value is compared with a reference computed here one bit-step at a time
// from the polynomial. Instance u_small is an 8-bit register with the
// maximal polynomial x^8+x^6+x^5+x^4+1, one step per clock; the test checks
// that it visits all 255 non-zero states exactly once before returning to
// its seed. Both must load their seed on reset and never reach zero.
module tb_lfsr;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   checks = 0;
  int   failures = 0;

  always #5 clk = ~clk;

  logic [31:0] v_full;
  logic [7:0]  v_small;

  lfsr #(.WIDTH(32), .POLY(32'h8020_0003), .STEPS(16), .SEED(32'hACE1_2468)) u_full (
    .clk(clk), .rst_n(rst_n), .value(v_full));
  lfsr #(.WIDTH(8), .POLY(8'hB8), .STEPS(1), .SEED(8'h01)) u_small (
    .clk(clk), .rst_n(rst_n), .value(v_small));

  function automatic logic [31:0] ref_step32(logic [31:0] s, int n);
    for (int k = 0; k < n; k++) begin
      logic fb;
      fb = s[0];
      s  = {1'b0, s[31:1]};
      if (fb) begin
        s[31] = ~s[31];   // x^32 term
        s[21] = ~s[21];   // x^22
        s[1]  = ~s[1];    // x^2
        s[0]  = ~s[0];    // x^1
      end
    end
    return s;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stim
    logic [31:0] expect32;
    bit          seen [256];
    int          period;
    repeat (2) @(posedge clk);
    #1;
    check(v_full == 32'hACE1_2468, "32-bit seed loaded on reset");
    check(v_small == 8'h01, "8-bit seed loaded on reset");
    rst_n = 1'b1;
    expect32 = 32'hACE1_2468;
    foreach (seen[i]) seen[i] = 1'b0;
    seen[1] = 1'b1;
    period = 0;
    for (int c = 0; c < 300; c++) begin
      @(posedge clk);
      #1;
      expect32 = ref_step32(expect32, 16);
      check(v_full == expect32, $sformatf("32-bit value at clock %0d: got %h want %h", c, v_full, expect32));
      check(v_full != 0, "32-bit register never zero");
      if (period == 0) begin
        if (v_small == 8'h01) period = c + 1;
        else begin
          check(!seen[v_small], $sformatf("8-bit state %h repeats early", v_small));
          seen[v_small] = 1'b1;
        end
      end
    end
    check(period == 255, $sformatf("8-bit period %0d, want 255", period));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
