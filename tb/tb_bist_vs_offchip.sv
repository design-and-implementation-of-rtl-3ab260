// tb_bist_vs_offchip: compares the on-chip self-test with a conventional
// off-chip ramp-histogram measurement of the same ADC, at the default sizes.
//
// On chip: one complete self-test with INL and DNL limits of 6 LSB, after which
// the INL curve is read back from the BIST memory through the host port.
// Off chip: in normal mode the testbench plays the part of a precise external
// ramp generator. It feeds the ADC through `ain` with an ideal ramp from -2 LSB
// to 4098 LSB in steps of 1/8 LSB, one conversion per step, and builds the code
// histogram. From the histogram come the code widths (DNL) and the transition
// levels (INL). Both INL curves are referred to the line through codes 1 and
// 4095, since a histogram does not see the transition below code 0.
// Where the ADC's transition levels are non-monotonic (around its largest
// capacitor errors) the histogram sees missing codes: their width is 0 and
// their transition level is not defined, while the self-test still estimates
// it. Codes next to a missing code are therefore compared differently.
// Checks: at every code whose transition level the histogram defines (the code
// and the one below it both occur), the two INL curves agree within 0.75 LSB
// and the two DNL values within 1 LSB; within 3 codes of every missing code in
// the histogram the self-test sees a code narrower than 0.25 LSB (a run of
// missing codes is skipped by one negative step, so only one code of the run
// carries it); the worst INL agrees within 0.5 LSB and
// the worst DNL within 1 LSB; both methods give the same verdict (pass) for the
// 6 LSB limits.
// Calibrated ramp: the on-chip DAC steps through all 2^14 codes in normal mode,
// once raw and once through the predistortion table. Its output is fed to the
// ADC, and each capture is compared with the ideal code k/4. After a best-fit
// line is removed, adding the on-chip INL of the captured code must leave
// less than 0.5 LSB RMS with the calibrated ramp (quantisation alone gives
// 0.29), and less than half of what is left with the raw ramp. The calibrated
// capture error must correlate with the on-chip INL (coefficient above 0.95).
// Counted mechanisms: the BIST verdict, histogram conversions, missing codes,
// read-backs, ramp captures; a mechanism that never happened counts as a
// failure.
module tb_bist_vs_offchip;
  import bist_pkg::*;
  localparam int unsigned NC      = 2 ** ADC_BITS;
  localparam int unsigned NS      = 2 ** DAC_BITS;
  localparam real         VLSB    = 5.0 / real'(NC);
  localparam int unsigned SUB     = 8;                   // ramp steps per LSB
  localparam int          NSTEP   = (NC + 4) * SUB;      // -2 .. NC+2 LSB
  localparam logic [ERR_W-1:0] LIMIT = 16'd1536;          // 6 LSB in Q8

  logic clk = 1'b0, rst_n = 1'b0;
  logic test_mode = 1'b0, cal_en = 1'b0, bist_start = 1'b0;
  logic [ERR_W-1:0] inl_limit = LIMIT, dnl_limit = LIMIT, max_inl, max_dnl;
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
  int n_pass = 0, n_conv = 0, n_read = 0, n_miss = 0, n_ramp = 0;   // mechanisms
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 12) $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (6000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real bist_inl [NC];
    real bist_ep [NC];                 // INL as read back (end-point line)
    real hist_inl [NC];
    int  hist [NC];
    real w_inl, w_dnl, h_inl, h_dnl, dev_inl, dev_dnl;

    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // ---------------- on chip ----------------
    test_mode = 1'b1;
    @(negedge clk);
    bist_start = 1'b1;
    @(negedge clk);
    bist_start = 1'b0;
    while (bist_busy) @(negedge clk);
    check(bist_done && bist_pass && !bist_fail, "self-test passes at 6 LSB");
    if (bist_pass) n_pass++;
    for (int c = 0; c < NC; c++) begin
      @(negedge clk);
      host_rd_en = 1'b1;
      host_addr  = mem_addr(REG_INL, DAC_BITS'(c));
      @(negedge clk);
      host_rd_en = 1'b0;
      bist_inl[c] = real'(signed'(host_rdata)) / 256.0;
      bist_ep[c]  = bist_inl[c];
      n_read++;
    end

    // ---------------- off chip: ramp histogram ----------------
    test_mode = 1'b0;
    foreach (hist[c]) hist[c] = 0;
    for (int s = 0; s < NSTEP; s++) begin
      ain = (-2.0 + real'(s) / real'(SUB)) * VLSB;
      @(negedge clk);
      func_adc_start = 1'b1;
      @(negedge clk);
      func_adc_start = 1'b0;
      while (!adc_done) @(negedge clk);
      hist[adc_code]++;
      n_conv++;
    end
    // transition level of code c (c >= 1), in LSB
    begin
      real t;
      t = -2.0 + real'(hist[0]) / real'(SUB);
      for (int c = 1; c < NC; c++) begin
        hist_inl[c] = t - real'(c);
        t += real'(hist[c]) / real'(SUB);
      end
    end

    // refer both curves to the line through codes 1 and NC-1
    begin
      real b0, b1, h0, h1;
      b0 = bist_inl[1]; b1 = bist_inl[NC-1];
      h0 = hist_inl[1]; h1 = hist_inl[NC-1];
      for (int c = 1; c < NC; c++) begin
        real f;
        f = real'(c - 1) / real'(NC - 2);
        bist_inl[c] -= b0 + (b1 - b0) * f;
        hist_inl[c] -= h0 + (h1 - h0) * f;
      end
    end

    w_inl = 0; w_dnl = 0; h_inl = 0; h_dnl = 0; dev_inl = 0; dev_dnl = 0;
    for (int c = 1; c < NC; c++) begin
      real d;
      bit defined;
      defined = hist[c] > 0 && hist[c-1] > 0;
      d = bist_inl[c] - hist_inl[c];
      if (d < 0) d = -d;
      if (defined && d > dev_inl) dev_inl = d;
      if (defined)
        check(d < 0.75, $sformatf("INL(%0d): on chip %f, histogram %f", c, bist_inl[c], hist_inl[c]));
      if ((bist_inl[c] < 0 ? -bist_inl[c] : bist_inl[c]) > w_inl) w_inl = bist_inl[c] < 0 ? -bist_inl[c] : bist_inl[c];
      if ((hist_inl[c] < 0 ? -hist_inl[c] : hist_inl[c]) > h_inl) h_inl = hist_inl[c] < 0 ? -hist_inl[c] : hist_inl[c];
      if (c >= 2) begin
        real db, dh;
        db = bist_inl[c] - bist_inl[c-1];
        dh = hist_inl[c] - hist_inl[c-1];
        d  = db - dh;
        if (d < 0) d = -d;
        if (defined && hist[c-2] > 0) begin
          if (d > dev_dnl) dev_dnl = d;
          check(d < 1.0, $sformatf("DNL(%0d): on chip %f, histogram %f", c - 1, db, dh));
        end
        if (hist[c-1] == 0 && c >= 5 && c < NC - 3) begin
          real wmin;                 // narrowest on-chip code width near c-1
          n_miss++;
          wmin = 1.0e9;
          for (int j = c - 4; j <= c + 2; j++)
            if (bist_inl[j+1] - bist_inl[j] + 1.0 < wmin) wmin = bist_inl[j+1] - bist_inl[j] + 1.0;
          check(wmin < 0.25, $sformatf("code %0d missing, narrowest on-chip width nearby %f", c - 1, wmin));
        end
        if ((db < 0 ? -db : db) > w_dnl) w_dnl = db < 0 ? -db : db;
        if ((dh < 0 ? -dh : dh) > h_dnl) h_dnl = dh < 0 ? -dh : dh;
      end
    end
    $display("on chip:   worst INL %f LSB, worst DNL %f LSB (locked: %f / %f)", w_inl, w_dnl,
             real'(max_inl) / 256.0, real'(max_dnl) / 256.0);
    $display("histogram: worst INL %f LSB, worst DNL %f LSB", h_inl, h_dnl);
    $display("largest difference: INL %f LSB, DNL %f LSB", dev_inl, dev_dnl);
    check(w_inl - h_inl < 0.5 && h_inl - w_inl < 0.5, "worst INL agrees");
    check(w_dnl - h_dnl < 1.0 && h_dnl - w_dnl < 1.0, "worst DNL agrees");
    check(h_inl <= 6.0 && h_dnl <= 6.0, "histogram verdict is pass, as on chip");

    // ---------------- calibrated ramp, captured off chip ----------------
    // The on-chip DAC, raw and through the predistortion table, drives the ADC
    // input with codes 0 .. 2^14-1; every capture is compared with the ideal
    // code k/4. After the on-chip INL of the captured code is added back,
    // what is left is the ramp's own error plus quantisation.
    begin
      real rms_r [2];
      real corr_cal;
      for (int pass = 0; pass < 2; pass++) begin
        real r [NS];
        real e [NS];
        real sx, sy, sxx, sxy, n, a, b, ee, pp, ep;
        cal_en = pass == 1;
        for (int k = 0; k < NS; k++) begin
          int q;
          @(negedge clk);
          func_dac_code = DAC_BITS'(k);
          @(negedge clk);                      // one clock of table lookup
          ain = dac_vout;
          func_adc_start = 1'b1;
          @(negedge clk);
          func_adc_start = 1'b0;
          while (!adc_done) @(negedge clk);
          n_ramp++;
          q    = int'(adc_code);
          e[k] = real'(q) - real'(k) / 4.0;
          r[k] = e[k] + bist_ep[q];
        end
        cal_en = 1'b0;
        // remove the best-fit line (offset and gain) over the unclipped codes
        sx = 0; sy = 0; sxx = 0; sxy = 0; n = 0;
        for (int k = 256; k < NS - 256; k++) begin
          sx += k; sy += r[k]; sxx += real'(k) * k; sxy += real'(k) * r[k]; n += 1;
        end
        b = (n * sxy - sx * sy) / (n * sxx - sx * sx);
        a = (sy - b * sx) / n;
        rms_r[pass] = 0;
        for (int k = 256; k < NS - 256; k++)
          rms_r[pass] += (r[k] - a - b * k) ** 2;
        rms_r[pass] = $sqrt(rms_r[pass] / n);
        // correlation of the captured error with the on-chip INL of the code
        sx = 0; sy = 0; sxx = 0; sxy = 0; ee = 0;
        for (int k = 256; k < NS - 256; k++) begin
          ep = -bist_ep[int'(real'(k) / 4.0 + e[k])];
          sx += e[k]; sy += ep; sxx += e[k] * e[k]; ee += ep * ep; sxy += e[k] * ep;
        end
        pp = (n * sxy - sx * sy) / $sqrt((n * sxx - sx * sx) * (n * ee - sy * sy));
        if (pass == 1) corr_cal = pp;
        $display("%s ramp: residual after on-chip INL %f LSB rms, correlation with on-chip INL %f",
                 (pass == 1) ? "calibrated" : "raw", rms_r[pass], pp);
      end
      check(rms_r[1] < rms_r[0] / 2.0, "calibrated ramp much closer to ideal than raw ramp");
      check(rms_r[1] < 0.5, "calibrated capture explained by on-chip INL");
      check(corr_cal > 0.95, "calibrated off-chip error follows on-chip INL");
    end

    check(n_pass > 0, "on-chip verdict seen");
    check(n_conv == NSTEP, "histogram conversions");
    check(n_read == NC, "read-backs");
    check(n_miss > 0, "missing codes seen");
    check(n_ramp == 2 * NS, "DAC ramp captures");
    $display("mechanisms: pass %0d conversions %0d missing codes %0d read-backs %0d ramp captures %0d",
             n_pass, n_conv, n_miss, n_read, n_ramp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
