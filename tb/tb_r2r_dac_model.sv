// tb_r2r_dac_model: with the mismatch switched off the output must be exactly
// code * VREF / 2^14 and the offset input must add OFFSET_V; with the default
// mismatch the output must stay within 0.25 % of full scale of the ideal ramp
// and be non-trivially non-linear (the BIST relies on that not mattering).
module tb_r2r_dac_model;
  import bist_pkg::*;
  localparam real VREF = 5.0;
  logic [DAC_BITS-1:0] code;
  logic offset_en;
  real vi, vm;
  int checks = 0, failures = 0;

  r2r_dac_model #(.MISMATCH(0.0)) ideal (.code, .offset_en, .vout(vi));
  r2r_dac_model                   real_dac (.code, .offset_en, .vout(vm));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real worst;
    worst = 0.0;
    for (int k = 0; k < 2 ** DAC_BITS; k += 7) begin
      real id;
      code = DAC_BITS'(k);
      offset_en = 1'b0;
      #1;
      id = real'(k) * VREF / 16384.0;
      check(vi - id < 1e-9 && id - vi < 1e-9, $sformatf("ideal code %0d: %f", k, vi));
      check(vm - id < 0.0025 * VREF && id - vm < 0.0025 * VREF, $sformatf("mismatch code %0d", k));
      if (vm - id > worst) worst = vm - id;
      if (id - vm > worst) worst = id - vm;
      offset_en = 1'b1;
      #1;
      check(vi - id - 0.03 < 1e-9 && id + 0.03 - vi < 1e-9, $sformatf("offset code %0d", k));
    end
    check(worst > 0.2 * VREF / 16384.0, "mismatch has an effect");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
