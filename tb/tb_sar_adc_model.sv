// tb_sar_adc_model: with the capacitor error off the model must be the ideal
// quantiser floor(v / VLSB) (clamped to the code range), offset_en must shift the
// input by OFFSET_V, a start while busy must be ignored, and done must come
// ADC_BITS clocks after the start clock. With the default error the code must
// stay within 6 LSB of the ideal one.
module tb_sar_adc_model;
  import bist_pkg::*;
  localparam real VLSB = 5.0 / 4096.0;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, offset_en = 1'b0;
  real vin;
  logic busy_i, done_i, busy_m, done_m;
  logic [ADC_BITS-1:0] code_i, code_m;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  sar_adc_model #(.MSB_ERR_LSB(0.0)) ideal (.clk, .rst_n, .start, .vin, .offset_en,
      .busy(busy_i), .done(done_i), .code(code_i));
  sar_adc_model adc (.clk, .rst_n, .start, .vin, .offset_en,
      .busy(busy_m), .done(done_m), .code(code_m));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    vin = 0.0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 600; n++) begin
      int  exp, cyc;
      real v;
      v = real'($urandom_range(1000000)) / 1000000.0 * 5.2 - 0.1;
      offset_en = (n % 4 == 3);
      vin = v;
      exp = int'($floor((v + (offset_en ? 0.02 : 0.0)) / VLSB));
      if (exp < 0) exp = 0;
      if (exp > 4095) exp = 4095;
      @(negedge clk);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      vin = 0.0;                               // the sample must be held
      cyc = 0;
      while (!done_i) begin
        if (cyc == 3) start = 1'b1;            // ignored while busy
        @(negedge clk);
        start = 1'b0;
        cyc++;
      end
      check(cyc == ADC_BITS, $sformatf("done %0d clocks after the start clock", cyc));
      check(int'(code_i) == exp, $sformatf("v %f code %0d expected %0d", v, code_i, exp));
      check(int'(code_m) - exp <= 6 && exp - int'(code_m) <= 6, $sformatf("mismatch v %f code %0d", v, code_m));
      @(negedge clk);
      check(!busy_i, "idle after done");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
