// tb_z_pipe: self-checking testbench for the pipelined output function.
//
// A random 256-bit state is applied every clock. The output two clocks
// later must equal z(x) computed by the unpipelined reference z_ref. The
// synchronous clear must empty both register stages: the output is zero
// for the two clocks after a clear. Biased states (mostly ones) make sure
// the 6-input product term is exercised; the testbench counts how often
// it was one and fails if never.
module tb_z_pipe;
  import espresso_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0;
  logic [255:0] x = '0;
  logic z;
  int checks = 0, failures = 0, prod6 = 0;
  logic [255:0] hist[0:2];

  z_pipe dut (.clk, .rst_n, .clear, .x, .z);

  always #5 clk = ~clk;

  initial begin
    #1000000;
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

  function automatic logic [255:0] rand_state(input bit biased);
    logic [255:0] v;
    for (int w = 0; w < 8; w++) begin
      v[w*32 +: 32] = $urandom;
      if (biased) v[w*32 +: 32] |= $urandom | $urandom;
    end
    return v;
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check(z == 1'b0, "reset");
    for (int t = 0; t < 2000; t++) begin
      x = rand_state(t % 2 == 1);
      if (x[255] & x[247] & x[243] & x[213] & x[181] & x[174]) prod6++;
      hist[2] = hist[1];
      hist[1] = hist[0];
      hist[0] = x;
      @(negedge clk);
      // after this edge, z belongs to the state applied two clocks earlier
      if (t >= 1) check(z == z_ref(hist[1]), "z latency 2");
    end
    // clear empties the pipeline
    clear = 1'b1;
    @(negedge clk);
    clear = 1'b0;
    x = '1;
    check(z == 1'b0, "clear stage 2");
    @(negedge clk);
    check(z == 1'b0, "clear stage 1");
    @(negedge clk);
    check(z == z_ref('1), "refill");
    check(prod6 > 0, "6-input product exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
