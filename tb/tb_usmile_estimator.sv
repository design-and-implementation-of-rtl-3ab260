// tb_usmile_estimator: checks that the segment estimator recovers a known ADC
// INL from two offset-shifted captures of a non-linear ramp.
//
// The testbench models the BIST memory itself. It fills region REG_CAP1 and
// REG_CAP2 with the codes a SAR ADC with known capacitor errors would give for
// a deliberately bowed 14-bit ramp, without and with a shift alpha of 41.37 LSB.
// After `done` it rebuilds INL(C) from the three tables, removes the end-point
// line, and compares it code by code with the true end-point INL of the model
// ADC. The tolerance, 0.5 LSB per code and 0.15 LSB on average, is set by what an
// exact least-squares fit of the segmented model achieves on this data (about
// 0.34 LSB worst, 0.11 LSB mean): the captured codes carry quantisation error.
// It also checks the identified alpha (within 1 LSB of the true shift: alpha is
// the mean code difference, which the ADC's own INL biases slightly) and that
// `done` arrives after the fixed run time given by the unit's LATENCY formula.
module tb_usmile_estimator;
  import bist_pkg::*;

  localparam int unsigned SWEEPS = 200;
  localparam int unsigned NU     = 48;
  localparam int unsigned NS     = 2 ** DAC_BITS;
  localparam int unsigned NC     = 2 ** ADC_BITS;
  localparam real         ALPHA  = 41.37;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic busy, done;
  mem_req_t req;
  logic [MEM_W-1:0] rdata;
  logic signed [ERR_W-1:0] e_msb [2**SEG_BITS];
  logic signed [ERR_W-1:0] e_isb [2**SEG_BITS];
  logic signed [ERR_W-1:0] e_lsb [2**SEG_BITS];
  logic signed [23:0] alpha;

  always #5 clk = ~clk;

  usmile_estimator dut (
    .clk, .rst_n, .start, .busy, .done, .mem_req(req), .mem_rdata(rdata),
    .e_msb, .e_isb, .e_lsb, .alpha
  );

  // memory model: read data one clock after the request
  logic [MEM_W-1:0] mem [2 ** (REGION_W + DAC_BITS)];
  always_ff @(posedge clk)
    if (req.en) begin
      if (req.we) mem[req.addr] <= req.wdata;
      else        rdata         <= mem[req.addr];
    end

  // model ADC: per-bit weight errors in LSB
  real bit_err [ADC_BITS];
  function automatic real trans(int c);        // transition level of code c, LSB
    real t;
    t = real'(c);
    for (int i = 0; i < ADC_BITS; i++) if (c[i]) t += bit_err[i];
    return t;
  endfunction
  function automatic int convert(real v);      // successive approximation
    int c;
    c = 0;
    for (int i = ADC_BITS - 1; i >= 0; i--)
      if (v >= trans(c | (1 << i))) c |= (1 << i);
    return c;
  endfunction
  function automatic real ramp(int k);          // bowed ramp, LSB
    return 0.3 + real'(k) / 4.0 + 6.0 * $sin(3.14159265 * real'(k) / real'(NS));
  endfunction

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (NU*NU + NS*39 + 50*49 + SWEEPS*NU*49 + 5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int  cyc;
    real true_inl [NC];
    real e0, span, worst;
    for (int i = 0; i < ADC_BITS; i++)
      bit_err[i] = 3.0 * $cos(1.3 * i + 0.7) * $sqrt(real'(1 << i) / real'(1 << (ADC_BITS - 1)));
    for (int k = 0; k < NS; k++) begin
      mem[{REG_CAP1, DAC_BITS'(k)}] = MEM_W'(convert(ramp(k)));
      mem[{REG_CAP2, DAC_BITS'(k)}] = MEM_W'(convert(ramp(k) + ALPHA));
    end
    // true end-point INL of the model
    e0   = trans(0) - 0.0;
    span = (trans(NC - 1) - real'(NC - 1)) - e0;
    for (int c = 0; c < NC; c++)
      true_inl[c] = (trans(c) - real'(c)) - e0 - span * real'(c) / real'(NC - 1);

    repeat (3) @(posedge clk);
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
    // independent count: clear, 39 clocks per pair, 49 dividers of 50 clocks,
    // 49 clocks per unknown per sweep
    check(cyc == 1 + NU*NU + NS*39 + 50*49 + SWEEPS*NU*49, $sformatf("latency %0d", cyc));
    check(!busy, "busy after done");

    begin
      real est [NC];
      real ee0, espan, mean;
      for (int c = 0; c < NC; c++)
        est[c] = real'(e_msb[c[11:8]] + e_isb[c[7:4]] + e_lsb[c[3:0]]) / 256.0;
      ee0   = est[0];
      espan = est[NC - 1] - ee0;
      worst = 0.0;
      mean  = 0.0;
      for (int c = 0; c < NC; c++) begin
        real v, err;
        v   = est[c] - ee0 - espan * real'(c) / real'(NC - 1);
        err = v - true_inl[c];
        if (err < 0) err = -err;
        if (err > worst) worst = err;
        mean += err;
        check(err < 0.5, $sformatf("INL code %0d est %f true %f", c, v, true_inl[c]));
      end
      mean = mean / real'(NC);
      $display("INL estimation error: worst %f LSB, mean %f LSB", worst, mean);
      check(mean < 0.15, "mean INL error");
    end
    check((real'(alpha) / 256.0 - ALPHA) < 1.0 && (real'(alpha) / 256.0 - ALPHA) > -1.0,
          $sformatf("alpha %f", real'(alpha) / 256.0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
