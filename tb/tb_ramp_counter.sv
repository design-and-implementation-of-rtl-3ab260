// tb_ramp_counter: sweeps the ramp counter through all 2^14 codes and checks
// every code, the `last` flag on the final code only, the wrap to zero, hold
// when not stepping, and that clear wins over step.
module tb_ramp_counter;
  import bist_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, step = 1'b0;
  logic [DAC_BITS-1:0] code;
  logic last;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  ramp_counter dut (.clk, .rst_n, .clear, .step, .code, .last);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(code == 0, "reset value");
    step = 1'b1;
    for (int k = 0; k < 2 ** DAC_BITS; k++) begin
      check(code == DAC_BITS'(k), $sformatf("code %0d got %0d", k, code));
      check(last == (k == 2 ** DAC_BITS - 1), $sformatf("last at %0d", k));
      @(negedge clk);
    end
    check(code == 0, "wrap to zero");
    step = 1'b0;
    repeat (3) @(negedge clk);
    check(code == 0, "hold");
    step = 1'b1;
    repeat (5) @(negedge clk);
    check(code == 5, "count 5");
    clear = 1'b1;
    @(negedge clk);
    check(code == 0, "clear wins over step");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
