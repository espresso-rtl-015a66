// tb_espresso_monomial: maximum-degree monomial test on the Espresso RTL.
//
// This is the chosen-IV non-randomness test used to size the initialization.
// Pick a set of d key/IV bits and set all others to zero. Run all 2^d
// setups and XOR the output bit produced at each initialization clock over
// all of them. The XOR is the coefficient of the degree-d monomial of the
// chosen bits in that output bit. While the coefficient is still zero, the
// bits are not yet fully mixed and the output is distinguishable. The
// measure is the number of leading outputs z(S(0)), z(S(1)), ... whose
// coefficient is zero.
//
// The bit set is found greedily: every single key/IV bit is tried, the best
// is kept, and then one bit at a time is added, each time the bit that
// keeps the monomial absent longest. Output bits are read from ks_bit
// during initialization, where z(S(m)) appears at clock m+2.
// Checks:
//   * for every d up to D_MAX, the monomial appears before the first
//     keystream bit z(S(257)), i.e. 256 initialization clocks suffice for
//     these degrees;
//   * every setup produces its first keystream bit 515 clocks after load
//     starts;
//   * for d = 1 the monomial is absent for at least one output (mixing
//     takes time).
// The measured number of absent outputs per degree is printed. The
// cipher's own analysis, using the unpipelined equations and key bits as
// well, reports about 45, 110 and 141 rounds for d = 1, 2, 3, and at most
// 159 up to d = 28.
module tb_espresso_monomial;

  localparam int D_MAX = 8;
  localparam int NOBS  = 258;  // z(S(0)) .. z(S(257))

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, kiv_bit = 1'b0;
  logic kiv_req, ks_bit, ks_valid, busy;
  int checks = 0, failures = 0;

  espresso dut (.clk, .rst_n, .start, .kiv_bit, .kiv_req, .ks_bit, .ks_valid, .busy);

  always #5 clk = ~clk;

  initial begin
    #4000000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  int lat_bad = 0;

  // One setup; returns the outputs z(S(0)) .. z(S(NOBS-1)).
  task automatic setup(input logic [223:0] kiv, output logic [NOBS-1:0] obs);
    int idx = 0;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    for (int t = 0; t < 256; t++) begin
      kiv_bit = kiv_req ? kiv[idx] : 1'b0;
      if (kiv_req) idx++;
      @(negedge clk);
    end
    for (int n = 0; n < NOBS + 2; n++) begin
      if (n >= 2) obs[n-2] = ks_bit;
      if (ks_valid != (n >= 259)) lat_bad++;
      @(negedge clk);
    end
  endtask

  // Number of leading outputs whose monomial coefficient is zero.
  task automatic absent_rounds(input int set[$], output int r);
    logic [NOBS-1:0] acc, obs;
    logic [223:0] kiv;
    acc = '0;
    for (int a = 0; a < (1 << set.size()); a++) begin
      kiv = '0;
      foreach (set[i]) kiv[set[i]] = a[i];
      setup(kiv, obs);
      acc ^= obs;
    end
    r = NOBS;
    for (int m = NOBS - 1; m >= 0; m--) if (acc[m]) r = m;
  endtask

  int set[$];
  int best_bit, best_r, r;
  logic used[224];

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    foreach (used[i]) used[i] = 1'b0;
    for (int d = 1; d <= D_MAX; d++) begin
      best_r = -1;
      best_bit = 0;
      for (int b = 0; b < 224; b++) begin
        if (used[b]) continue;
        set.push_back(b);
        absent_rounds(set, r);
        void'(set.pop_back());
        if (r > best_r) begin
          best_r = r;
          best_bit = b;
        end
      end
      set.push_back(best_bit);
      used[best_bit] = 1'b1;
      if (best_bit < 128)
        $display("degree %0d: k%0d added, monomial absent in first %0d outputs", d, best_bit, best_r);
      else
        $display("degree %0d: IV%0d added, monomial absent in first %0d outputs", d,
                 best_bit - 128, best_r);
      check(best_r < NOBS, "monomial appears before the first keystream bit");
      if (d == 1) check(best_r > 0, "mixing takes at least one clock");
    end
    check(lat_bad == 0, "keystream 515 clocks after load start in every setup");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
