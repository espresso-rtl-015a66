// tb_espresso_ctrl: self-checking testbench for the phase sequencer.
//
// After a start pulse the sequencer must spend exactly 256 clocks in LOAD
// (224 of them with kiv_req), then INIT_ROUNDS clocks with init, then 3
// warm-up clocks, then stay in keystream mode. The padding it supplies for
// load clocks 224..255 must be 31 ones and a zero. The first keystream
// clock must come 515 clocks after the first load clock. A start during
// initialization must restart the load. Run at the default INIT_ROUNDS.
module tb_espresso_ctrl;
  import espresso_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  phase_e phase;
  logic load, kiv_req, pad, init, ks_valid;
  int checks = 0, failures = 0;

  espresso_ctrl dut (.clk, .rst_n, .start, .phase, .load, .kiv_req, .pad, .init, .ks_valid);

  always #5 clk = ~clk;

  initial begin
    #100000;
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

  int n_load, n_req, n_init, n_warm, first_ks, pad_ones, pad_zero_pos;

  task automatic run_setup(input int abort_after);
    n_load = 0; n_req = 0; n_init = 0; n_warm = 0; first_ks = -1;
    pad_ones = 0; pad_zero_pos = -1;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    for (int t = 0; t < 600; t++) begin
      if (abort_after >= 0 && t == abort_after) return;
      if (load) begin
        if (kiv_req) begin
          check(n_req == n_load, "kiv_req only in first 224 load clocks");
          n_req++;
        end else if (pad) pad_ones++;
        else pad_zero_pos = n_load;
        n_load++;
      end
      if (init) n_init++;
      if (phase == PH_WARM) n_warm++;
      check(!(load && init) && !(init && ks_valid), "phases exclusive");
      if (ks_valid && first_ks < 0) first_ks = t;
      @(negedge clk);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    check(phase == PH_IDLE && !ks_valid && !load, "reset to idle");
    rst_n = 1'b1;
    @(negedge clk);
    check(phase == PH_IDLE, "idle holds without start");

    run_setup(-1);
    check(n_load == 256, "256 load clocks");
    check(n_req == 224, "224 key/IV bits requested");
    check(pad_ones == 31 && pad_zero_pos == 255, "padding 31 ones then zero");
    check(n_init == 256, "256 init clocks");
    check(n_warm == 3, "3 warm-up clocks");
    check(first_ks == 515, "latency 256+256+3 clocks");
    check(ks_valid, "keystream holds");

    // restart in the middle of initialization
    run_setup(400);
    check(init, "in init at abort point");
    run_setup(-1);
    check(n_load == 256 && n_init == 256 && first_ks == 515, "restart from init");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
