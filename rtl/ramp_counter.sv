// ramp_counter: the 14-bit code counter that drives the ramp DAC during a BIST
// capture.
//
// `clear` loads zero; `step` advances the code by one. The counter covers every
// code from 0 to 2^DAC_BITS - 1 and `last` is high while the code is the final
// one, so the controller knows the ramp is complete once it steps past it
// (the code then wraps to 0). `clear` wins over `step`.
//
// Follows the source design: a 14-bit counter, triggered by the controller,
// sweeping 0 .. 2^14 - 1. The clear/step/last handshake is this design's own.
module ramp_counter #(
  parameter int unsigned DAC_BITS = bist_pkg::DAC_BITS
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clear,
  input  logic                step,
  output logic [DAC_BITS-1:0] code,
  output logic                last
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     code <= '0;
    else if (clear) code <= '0;
    else if (step)  code <= code + 1'b1;
  end

  assign last = &code;

endmodule
