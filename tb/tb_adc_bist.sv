// tb_adc_bist: end-to-end test of the whole BIST subsystem at its default sizes
// (14-bit ramp, 12-bit ADC, full 2^14-code sweeps).
//
// Run 1, loose limits: a complete self-test must end with `pass`, the locked
// worst INL and DNL must match the true INL/DNL of the ADC model within 1 LSB
// (the truth is computed here from the model's documented capacitor errors),
// the INL curve read back from memory must match the truth code by code within
// 0.75 LSB (the captures are quantised; around the largest code-width error the
// estimate is biased by up to about 0.5 LSB), the identified offset must match the two offset sources, offset and
// gain error must be plausible, and the run must take exactly the number of
// clocks that the phase schedule gives.
// Run 2, INL limit below the worst INL: the same test must end with `fail`.
// Normal mode: the ADC must convert the external input, and the DAC driven
// through the predistortion table (cal_en) must deviate from its best-fit line
// (codes 256 .. 2^14-257) by less than half as much (RMS) as the raw DAC. The
// worst deviation is only reported: at the DAC's few gaps of several LSB no
// code can reach the target.
// Each mechanism (two sweeps, offset sweep, clipped codes at full scale, pass
// verdict, fail verdict, predistortion lookup, host read-back, normal-mode
// conversion) is counted and a failure is counted for any that never happened.
module tb_adc_bist;
  import bist_pkg::*;
  localparam int unsigned NS = 2 ** DAC_BITS;
  localparam int unsigned NC = 2 ** ADC_BITS;
  localparam real         VREF = 5.0;
  localparam real         VLSB = VREF / real'(NC);
  localparam longint      LAT_EST = 1 + 48*48 + longint'(NS)*39 + 50*49 + 200*48*49;
  localparam longint      LAT_RUN = longint'(NS)*2*(ADC_BITS+2) + (1 + LAT_EST)
                                  + (1 + NC + 1) + (1 + 4*NS + 69*34 + 1);

  logic clk = 1'b0, rst_n = 1'b0;
  logic test_mode = 1'b0, cal_en = 1'b0, bist_start = 1'b0;
  logic [ERR_W-1:0] inl_limit, dnl_limit, max_inl, max_dnl;
  logic [DAC_BITS-1:0] func_dac_code = '0;
  real dac_vout, ain = 0.0;
  logic func_adc_start = 1'b0, adc_busy, adc_done;
  logic [ADC_BITS-1:0] adc_code;
  logic host_rd_en = 1'b0;
  logic [REGION_W+DAC_BITS-1:0] host_addr = '0;
  logic [MEM_W-1:0] host_rdata;
  logic bist_busy, bist_done, bist_pass, bist_fail;
  logic signed [ADC_BITS:0] offset_err, gain_err;
  logic signed [23:0] alpha_est;

  always #5 clk = ~clk;

  adc_bist dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 12) $display("FAIL: %s", what);
    end
  endtask

  // ---- mechanism counters ----
  int n_sweep_off = 0, n_sweep_on = 0, n_clipped = 0, n_pass = 0, n_fail = 0;
  int n_pred_lookup = 0, n_readback = 0, n_normal_conv = 0;
  always @(posedge clk) begin
    if (test_mode && adc_done && adc_code == '1) n_clipped++;
    if (test_mode && dut.fsm_adc_start && !adc_busy) begin
      if (dut.offset_en) n_sweep_on++;
      else               n_sweep_off++;
    end
    if (!test_mode && cal_en && dut.dac_code != func_dac_code) n_pred_lookup++;
  end

  // ---- truth: the ADC model's transition levels (its documented error pattern) ----
  function automatic real trans(int c);
    real t;
    t = real'(c);
    for (int i = 0; i < ADC_BITS; i++)
      if (c[i]) t += 4.0 * $sin(2.3 * i + 1.1) * $sqrt((2.0 ** i) / (2.0 ** (ADC_BITS - 1)));
    return t;
  endfunction

  // worst and RMS deviation of v[256 .. NS-257] from its least-squares line,
  // in DAC LSB
  function automatic void line_dev(const ref real v [NS], output real w, output real rms);
    real sx, sy, sxx, sxy, n, a, b;
    sx = 0; sy = 0; sxx = 0; sxy = 0; n = 0;
    for (int k = 256; k < NS - 256; k++) begin
      sx += k; sy += v[k]; sxx += real'(k) * k; sxy += real'(k) * v[k]; n += 1;
    end
    b = (n * sxy - sx * sy) / (n * sxx - sx * sx);
    a = (sy - b * sx) / n;
    w   = 0;
    rms = 0;
    for (int k = 256; k < NS - 256; k++) begin
      real d;
      d = (v[k] - a - b * k) / (VREF / real'(NS));
      rms += d * d;
      if (d < 0) d = -d;
      if (d > w) w = d;
    end
    rms = $sqrt(rms / n);
  endfunction

  initial begin : watchdog
    repeat (3 * LAT_RUN + 200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_bist(logic [ERR_W-1:0] il, logic [ERR_W-1:0] dl, output longint cyc);
    inl_limit = il;
    dnl_limit = dl;
    test_mode = 1'b1;
    @(negedge clk);
    bist_start = 1'b1;
    @(negedge clk);
    bist_start = 1'b0;
    cyc = 0;
    while (bist_busy) begin
      @(negedge clk);
      cyc++;
    end
  endtask

  initial begin
    real    true_inl [NC];
    real    wi, wd, e0, span;
    longint cyc;

    // true best-fit-line INL and worst INL/DNL of the ADC model
    begin
      real sx, sy, sxx, sxy;
      sx = 0; sy = 0; sxx = 0; sxy = 0;
      for (int c = 0; c < NC; c++) begin
        sx += c; sy += trans(c) - c; sxx += real'(c) * c; sxy += real'(c) * (trans(c) - c);
      end
      span = (NC * sxy - sx * sy) / (NC * sxx - sx * sx);
      e0   = (sy - span * sx) / NC;
    end
    wi = 0.0;
    wd = 0.0;
    for (int c = 0; c < NC; c++) begin
      true_inl[c] = trans(c) - real'(c) - e0 - span * real'(c);
      if (true_inl[c] > wi) wi = true_inl[c];
      if (-true_inl[c] > wi) wi = -true_inl[c];
      if (c > 0 && true_inl[c] - true_inl[c-1] > wd) wd = true_inl[c] - true_inl[c-1];
      if (c > 0 && true_inl[c-1] - true_inl[c] > wd) wd = true_inl[c-1] - true_inl[c];
    end
    $display("model ADC: worst INL %f LSB, worst DNL %f LSB", wi, wd);

    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // ---------- run 1: loose limits (20 LSB) ----------
    run_bist(16'd5120, 16'd5120, cyc);
    check(cyc == LAT_RUN, $sformatf("run time %0d clocks, expected %0d", cyc, LAT_RUN));
    check(bist_done && bist_pass && !bist_fail, "run 1 passes");
    if (bist_pass) n_pass++;
    check(n_sweep_off == NS && n_sweep_on == NS, "one conversion per code in each sweep");
    $display("BIST: max INL %f LSB, max DNL %f LSB, offset %0d, gain %0d, alpha %f",
             real'(max_inl) / 256.0, real'(max_dnl) / 256.0, offset_err, gain_err,
             real'(alpha_est) / 256.0);
    check(real'(max_inl) / 256.0 - wi < 1.0 && wi - real'(max_inl) / 256.0 < 1.0, "worst INL");
    check(real'(max_dnl) / 256.0 - wd < 1.0 && wd - real'(max_dnl) / 256.0 < 1.0, "worst DNL");
    check(real'(alpha_est) / 256.0 > (0.05 / VLSB) - 1.5 && real'(alpha_est) / 256.0 < (0.05 / VLSB) + 1.5,
          "identified offset");
    check(offset_err == 0, $sformatf("offset error %0d", offset_err));
    check(gain_err >= -16 && gain_err <= 16, $sformatf("gain error %0d", gain_err));

    // read the INL curve back through the host port
    begin
      real worst_rb;
      worst_rb = 0.0;
      for (int c = 0; c < NC; c++) begin
        real v, err;
        @(negedge clk);
        host_rd_en = 1'b1;
        host_addr  = mem_addr(REG_INL, DAC_BITS'(c));
        @(negedge clk);
        host_rd_en = 1'b0;
        n_readback++;
        v   = real'(signed'(host_rdata)) / 256.0;
        err = v - true_inl[c];
        if (err < 0) err = -err;
        if (err > worst_rb) worst_rb = err;
        check(err < 0.75, $sformatf("INL(%0d) read back %f, true %f", c, v, true_inl[c]));
      end
      $display("INL curve read back: worst error %f LSB", worst_rb);
    end

    // ---------- normal mode: conversion of the external input ----------
    test_mode = 1'b0;
    for (int n = 0; n < 50; n++) begin
      int exp;
      ain = real'($urandom_range(100000)) / 100000.0 * 4.9;
      exp = int'($floor(ain / VLSB));
      @(negedge clk);
      func_adc_start = 1'b1;
      @(negedge clk);
      func_adc_start = 1'b0;
      while (!adc_done) @(negedge clk);
      n_normal_conv++;
      check(int'(adc_code) - exp <= 6 && exp - int'(adc_code) <= 6,
            $sformatf("normal conversion %f -> %0d", ain, adc_code));
    end

    // ---------- normal mode: raw and predistorted DAC ----------
    begin
      real raw [NS];
      real cal [NS];
      real wr, wc, rr, rc;
      for (int k = 0; k < NS; k++) begin
        func_dac_code = DAC_BITS'(k);
        cal_en = 1'b0;
        #1 raw[k] = dac_vout;
      end
      cal_en = 1'b1;
      for (int k = 0; k < NS; k++) begin
        @(negedge clk);
        func_dac_code = DAC_BITS'(k);
        @(negedge clk);                       // one clock of table lookup
        cal[k] = dac_vout;
      end
      cal_en = 1'b0;
      // non-linearity of both against their best-fit line over codes
      // 256 .. 2^14-257 (the ends are clipped by the ADC during calibration), in DAC LSB
      line_dev(raw, wr, rr);
      line_dev(cal, wc, rc);
      $display("DAC deviation from best-fit line: raw worst %f rms %f, predistorted worst %f rms %f DAC LSB",
               wr, rr, wc, rc);
      check(rc < rr / 2.0, "predistortion improves the DAC");
    end

    // ---------- run 2: INL limit 1 LSB below the worst INL ----------
    run_bist(max_inl - 16'd256, 16'd5120, cyc);
    check(bist_done && bist_fail && !bist_pass, "run 2 fails on the INL limit");
    if (bist_fail) n_fail++;

    check(n_sweep_off > 0 && n_sweep_on > 0, "sweeps");
    check(n_clipped > 0, "clipped codes seen");
    check(n_pass > 0, "pass verdict seen");
    check(n_fail > 0, "fail verdict seen");
    check(n_pred_lookup > 0, "predistortion used");
    check(n_readback > 0, "read-back used");
    check(n_normal_conv > 0, "normal-mode conversion");
    $display("mechanisms: sweeps %0d/%0d clipped %0d pass %0d fail %0d pred %0d readback %0d normal %0d",
             n_sweep_off, n_sweep_on, n_clipped, n_pass, n_fail, n_pred_lookup, n_readback,
             n_normal_conv);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
