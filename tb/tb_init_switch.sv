// tb_init_switch: self-checking testbench for the phase-switch register.
// Random z and init each clock; fb must equal z AND init of the previous
// clock (one clock of latency).
module tb_init_switch;
  logic clk = 1'b0, rst_n = 1'b0, z = 1'b0, init = 1'b0, fb;
  logic exp_fb;
  int checks = 0, failures = 0, ones = 0;

  init_switch dut (.clk, .rst_n, .z, .init, .fb);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    checks++;
    if (fb !== 1'b0) failures++;
    rst_n = 1'b1;
    for (int t = 0; t < 400; t++) begin
      z    = 1'($urandom);
      init = 1'($urandom);
      exp_fb = z & init;
      if (exp_fb) ones++;
      @(negedge clk);
      checks++;
      if (fb !== exp_fb) begin
        failures++;
        if (failures < 10) $display("FAIL fb at %0t", $time);
      end
    end
    checks++;
    if (ones == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
