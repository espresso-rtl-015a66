// init_switch: the phase switch that feeds z(x) back during initialization.
//
// A 2-input multiplexer whose second input is tied to 0 reduces to an AND.
// The output bit z is ANDed with `init` and registered, so the XOR that
// takes the result into g255 (or g217) sits behind a flip-flop. The phase
// switch thus adds no gate to the critical path, at the cost of one clock
// of latency. This structure is the cipher's. Espresso uses two copies, one
// for stage 255 and one for stage 217.
//
// Interface: clk, rst_n (asynchronous, active low), z, init. fb is
// registered: fb(t) = z(t-1) & init(t-1).
module init_switch (
  input  logic clk,
  input  logic rst_n,
  input  logic z,
  input  logic init,
  output logic fb
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) fb <= 1'b0;
    else        fb <= z & init;
  end

endmodule
