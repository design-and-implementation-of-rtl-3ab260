// tb_rome_unit: checks the predistortion generator against an independent
// reference and against the DAC it is meant to correct.
//
// The testbench models the BIST memory. Region REG_CAP1 holds the codes an ideal
// 12-bit quantiser gives for a 14-bit DAC with known bit-weight errors (so the
// DAC error is additive over code bits, with a 12 DAC-LSB step at mid-scale);
// region REG_INL holds small random INL values (within +-0.4 LSB).
// Checks:
//  - every predistortion code equals the reference: per-segment means of
//    y(k) = 256*C1 + INL(C1) + 128 - 64*k over unclipped samples, segments
//    k[13:9], k[8:4], k[3:2] (integer
//    division truncating toward zero), E(c) = sum of the three segment
//    means of c - 2*mean_all, step(c) = k - floor((E(c) + 32) / 64) clamped to
//    the DAC range, p1 = step(k), p2 = step(p1), and of p1, p2, p2 - 1, p2 + 1
//    the first one with the smallest |64*p + E(p) - 64*k|;
//  - away from the ends, the DAC driven with the predistortion code of k is
//    within 2.5 DAC LSB of the best any code can reach for k (the DAC has
//    gaps of several LSB), within 1.25 LSB of it for all but at most 16 codes,
//    and the worst error drops at least threefold;
//  - the run time is 4 * 2^14 + 69 * 34 + 1 clocks and only REG_PRED is written.
module tb_rome_unit;
  import bist_pkg::*;
  localparam int unsigned NS = 2 ** DAC_BITS;
  localparam int unsigned NC = 2 ** ADC_BITS;
  localparam int unsigned NT = 32 + 32 + 4 + 1;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, busy, done;
  mem_req_t req;
  logic [MEM_W-1:0] rdata;
  logic [MEM_W-1:0] mem [2 ** (REGION_W + DAC_BITS)];
  int checks = 0, failures = 0, foreign = 0;

  always #5 clk = ~clk;
  rome_unit dut (.clk, .rst_n, .start, .busy, .done, .mem_req(req), .mem_rdata(rdata));

  always_ff @(posedge clk)
    if (req.en) begin
      if (req.we) begin
        mem[req.addr] <= req.wdata;
        if (req.addr[REGION_W+DAC_BITS-1 -: REGION_W] != REG_PRED) foreign++;
      end else rdata <= mem[req.addr];
    end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  // DAC output in DAC LSB: ideal code plus per-bit errors (MSB weight 12 LSB low)
  function automatic real dac_v(int k);
    real v;
    v = real'(k) + 3.0;
    for (int i = 0; i < DAC_BITS; i++)
      if (k[i]) v += (i == DAC_BITS - 1) ? -12.0 : 2.5 * $sin(1.1 * i + 0.3) * real'(i) / 13.0;
    return v;
  endfunction

  longint mean [NT];
  function automatic longint emod(int c);       // fitted error E(c), Q8 ADC LSB
    return mean[c / 512] + mean[32 + (c / 16) % 32] + mean[64 + (c / 4) % 4] - 2 * mean[NT - 1];
  endfunction
  function automatic real model_miss(int c, int k);
    real d;
    d = real'(longint'(c) * 64 + emod(c) - longint'(k) * 64);
    return d < 0 ? -d : d;
  endfunction

  initial begin : watchdog
    repeat (5 * NS + NT * 40 + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    longint sum [NT];
    int     cnt [NT];
    real    worst_raw, worst_cal;
    int     n_off = 0;
    for (int k = 0; k < NS; k++) begin
      int c;
      c = int'($floor(dac_v(k) / 4.0));
      if (c < 0) c = 0;
      if (c > NC - 1) c = NC - 1;
      mem[{REG_CAP1, DAC_BITS'(k)}] = MEM_W'(c);
    end
    for (int c = 0; c < NC; c++)
      mem[{REG_INL, DAC_BITS'(c)}] = MEM_W'($signed($urandom_range(200)) - 100);
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    cyc = 0;
    do begin
      @(negedge clk);
      cyc++;
    end while (!done);
    check(cyc == 4 * NS + NT * 34 + 1, $sformatf("latency %0d", cyc));
    check(foreign == 0, "write outside REG_PRED");

    // reference fit
    for (int j = 0; j < NT; j++) begin
      sum[j] = 0;
      cnt[j] = 0;
    end
    for (int k = 0; k < NS; k++) begin
      int c1;
      longint y;
      int idx [4];
      c1 = int'(mem[{REG_CAP1, DAC_BITS'(k)}]);
      if (c1 == 0 || c1 == NC - 1) continue;
      y = longint'(c1) * 256 + longint'(signed'(mem[{REG_INL, DAC_BITS'(c1)}])) + 128
          - longint'(k) * 64;
      idx = '{k / 512, 32 + (k / 16) % 32, 64 + (k / 4) % 4, NT - 1};
      foreach (idx[n]) begin
        sum[idx[n]] += y;
        cnt[idx[n]]++;
      end
    end
    for (int j = 0; j < NT; j++)
      mean[j] = (cnt[j] == 0) ? 0 : ((sum[j] < 0) ? -((-sum[j]) / cnt[j]) : sum[j] / cnt[j]);

    worst_raw = 0.0;
    worst_cal = 0.0;
    for (int k = 0; k < NS; k++) begin
      longint e, err;
      int p, got;
      real dr, dc, best;
      begin                      // p1, p2 by two steps, then the closest of 4
        int  c [4];
        real mbest;
        int  order [3] = '{2, 0, 3};              // p2, p2 - 1, p2 + 1
        c[0] = k;
        for (int n = 1; n < 3; n++) begin
          e    = emod(c[n-1]) + 32;
          err  = (e >= 0) ? e / 64 : -((-e + 63) / 64);     // floor division
          c[n] = k - int'(err);
          if (c[n] < 0) c[n] = 0;
          if (c[n] > NS - 1) c[n] = NS - 1;
        end
        c[0] = c[2] > 0 ? c[2] - 1 : c[2];
        c[3] = c[2] < NS - 1 ? c[2] + 1 : c[2];
        p     = c[1];
        mbest = model_miss(c[1], k);
        foreach (order[n])
          if (model_miss(c[order[n]], k) < mbest) begin
            mbest = model_miss(c[order[n]], k);
            p     = c[order[n]];
          end
      end
      got = int'(mem[{REG_PRED, DAC_BITS'(k)}]);
      check(got == p, $sformatf("k %0d pred %0d expected %0d", k, got, p));
      if (k >= 64 && k < NS - 64) begin
        dr = dac_v(k) - real'(k);
        dc = dac_v(got) - real'(k);
        if (dr < 0) dr = -dr;
        if (dc < 0) dc = -dc;
        if (dr > worst_raw) worst_raw = dr;
        if (dc > worst_cal) worst_cal = dc;
        // the best any code can do: the DAC has gaps wider than 1 LSB
        best = 1.0e9;
        for (int q = k - 40; q <= k + 40; q++) begin
          real d;
          d = dac_v(q) - real'(k);
          if (d < 0) d = -d;
          if (d < best) best = d;
        end
        check(dc <= best + 2.5, $sformatf("k %0d: predistorted error %f, best possible %f", k, dc, best));
        if (dc > best + 1.25) n_off++;
      end
    end
    $display("DAC error: raw %f, predistorted %f DAC LSB", worst_raw, worst_cal);
    check(n_off <= 16, $sformatf("%0d codes more than 1.25 LSB above the best possible", n_off));
    check(worst_cal < worst_raw / 3.0, "predistortion removes most of the DAC error");
    check(worst_raw > 5.0, "raw DAC visibly non-linear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
