// tb_espresso: end-to-end testbench of the Espresso keystream generator at
// its default parameters (256 initialization clocks).
//
// For several random key/IV pairs (plus all-zero and all-one ones) the
// testbench pulses start and feeds the 224 key/IV bits serially on
// kiv_req. It checks the loaded state and the 515-clock latency, then
// compares 300 keystream bits with an untimed reference. The reference
// uses the reference step function g_step and output function z_ref, and
// it mirrors the circuit's timing. At initialization clock n (n = 0..255)
// and the first warm-up clock (n = 256), the bit XORed into stages 255 and
// 217 is z of the state at clock n-3; it is zero for n < 3 because the
// pipeline starts empty. Keystream bit k is z of the state at clock 257+k.
// One setup is aborted in the middle of initialization by a new start.
// The testbench counts each mechanism: key/IV bits taken, padding clocks,
// feedback ones during initialization, warm-up clocks, keystream bits, and
// restarts. It fails if any of them never happened.
module tb_espresso;
  import espresso_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, kiv_bit = 1'b0;
  logic kiv_req, ks_bit, ks_valid, busy;
  int checks = 0, failures = 0;
  int n_kiv = 0, n_pad = 0, n_fb1 = 0, n_warm = 0, n_ks = 0, n_restart = 0;

  localparam int KS_BITS = 300;

  espresso dut (.clk, .rst_n, .start, .kiv_bit, .kiv_req, .ks_bit, .ks_valid, .busy);

  always #5 clk = ~clk;

  initial begin
    #2000000;
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

  st_t S[0:KS_BITS + 260];

  // reference: states S[0..] from the loaded state S[0]
  task automatic build_reference();
    logic fb;
    for (int n = 0; n < KS_BITS + 259; n++) begin
      fb = (n >= 3 && n <= 256) ? z_ref(S[n-3]) : 1'b0;
      S[n+1] = g_step(S[n], fb, fb);
    end
  endtask

  // Pulse start and load key/IV. Returns early (abort) after `stop_at`
  // clocks of initialization when stop_at >= 0.
  task automatic run(input logic [127:0] key, input logic [95:0] iv, input int stop_at);
    logic [223:0] kiv;
    int t, first_ks, idx;
    kiv = {iv, key};
    S[0] = {1'b0, {31{1'b1}}, kiv};
    build_reference();
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    // load: 256 clocks
    idx = 0;
    for (t = 0; t < 256; t++) begin
      check(busy && !ks_valid, "busy during load");
      if (kiv_req) begin
        kiv_bit = kiv[idx];
        idx++;
        n_kiv++;
      end else begin
        kiv_bit = 1'($urandom);  // must be ignored
        n_pad++;
      end
      @(negedge clk);
    end
    check(idx == 224, "224 key/IV bits requested");
    check(dut.u_g.state == S[0], "loaded state");
    // initialization, warm-up, keystream
    first_ks = -1;
    for (t = 0; t < 259 + KS_BITS; t++) begin
      if (stop_at >= 0 && t == stop_at) begin
        n_restart++;
        return;
      end
      check(dut.u_g.state == S[t], "state trajectory");
      if (t < 256 && dut.fb255) n_fb1++;
      if (t >= 256 && t < 259) n_warm++;
      if (ks_valid) begin
        if (first_ks < 0) first_ks = t;
        check(ks_bit == z_ref(S[t - 2]), "keystream bit");
        n_ks++;
      end
      @(negedge clk);
    end
    check(first_ks == 259, "first keystream bit 256+256+3 clocks after load start");
  endtask

  function automatic logic [127:0] rkey();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction
  function automatic logic [95:0] riv();
    return {$urandom, $urandom, $urandom};
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(!ks_valid && !busy, "idle after reset");
    run('0, '0, -1);
    run('1, '1, -1);
    run(rkey(), riv(), 100);  // aborted by the next start
    for (int r = 0; r < 3; r++) run(rkey(), riv(), -1);
    check(n_kiv > 0, "key/IV bits loaded");
    check(n_pad > 0, "padding loaded");
    check(n_fb1 > 0, "initialization feedback was one");
    check(n_warm > 0, "warm-up clocks");
    check(n_ks > 0, "keystream produced");
    check(n_restart > 0, "restart during initialization");
    $display("mechanisms: kiv=%0d pad=%0d fb_ones=%0d warm=%0d ks=%0d restart=%0d",
             n_kiv, n_pad, n_fb1, n_warm, n_ks, n_restart);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
