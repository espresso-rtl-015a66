// tb_nlfsr_g: self-checking testbench for the Galois NLFSR G.
//
// 1. Serial load: 256 random bits are shifted in. The first bit must end
//    in stage 0 and the last in stage 255.
// 2. Stepping: from random loaded states, every clock of the RTL (with
//    random feedback bits on fb255/fb217) is compared with the reference
//    g_step, written from the plain algebraic normal forms.
// 3. Equivalence with F: G runs freely while its stages 231 and 193 are
//    recorded. From those sequences a state of the transformed register F
//    is built. F is then run forward, and its stages 255 and 217 must
//    reproduce G's stages 231 and 193. F is defined by two functions that
//    are independent of G's fourteen, so this cross-checks every G tap.
// Inputs change on the falling edge; outputs are compared on the next one.
module tb_nlfsr_g;
  import espresso_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic load = 1'b0, din = 1'b0, fb255 = 1'b0, fb217 = 1'b0;
  logic [255:0] state;
  int checks = 0, failures = 0;

  nlfsr_g dut (.clk, .rst_n, .load, .din, .fb255, .fb217, .state);

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

  task automatic serial_load(input st_t v);
    load = 1'b1;
    for (int i = 0; i < 256; i++) begin
      din = v[i];
      @(negedge clk);
    end
    load = 1'b0;
    din  = 1'b0;
  endtask

  function automatic st_t rand_state();
    st_t v;
    for (int w = 0; w < 8; w++) v[w*32 +: 32] = $urandom;
    return v;
  endfunction

  st_t v, model, fs;
  logic a[0:699], b[0:699];

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check(state == '0, "reset value");

    // 1. serial load order
    for (int r = 0; r < 4; r++) begin
      v = rand_state();
      serial_load(v);
      check(state == v, "serial load");
    end

    // 2. stepping against the reference
    for (int r = 0; r < 8; r++) begin
      v = rand_state();
      serial_load(v);
      model = v;
      for (int c = 0; c < 300; c++) begin
        fb255 = 1'($urandom);
        fb217 = 1'($urandom);
        model = g_step(model, fb255, fb217);
        @(negedge clk);
        check(state == model, "g step");
      end
      fb255 = 1'b0;
      fb217 = 1'b0;
    end

    // 3. equivalence of G stage 231 / 193 with F stage 255 / 217
    for (int r = 0; r < 4; r++) begin
      serial_load(rand_state());
      for (int t = 0; t < 700; t++) begin
        a[t] = state[231];
        b[t] = state[193];
        @(negedge clk);
      end
      for (int i = 218; i < 256; i++) fs[i] = a[400 - (255 - i)];
      for (int i = 0; i < 218; i++)   fs[i] = b[400 - (217 - i)];
      for (int k = 0; k < 300; k++) begin
        check(fs[255] == a[400 + k] && fs[217] == b[400 + k], "G/F equivalence");
        fs = f_step(fs);
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
