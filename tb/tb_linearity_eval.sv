// tb_linearity_eval: loads random segment tables, then checks every stored
// INL(C) against a best-fit-line INL computed here in floating point (normal
// equations over all codes), the worst |INL| and |DNL|, the pass/fail verdict
// for limits just above and just below the worst values, and the 2^N + 1 clock
// run time. Values may differ from the floating-point reference by 2/256 LSB
// (rounding to Q8).
module tb_linearity_eval;
  import bist_pkg::*;
  localparam int unsigned NC = 2 ** ADC_BITS;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic signed [ERR_W-1:0] e_msb [2**SEG_BITS];
  logic signed [ERR_W-1:0] e_isb [2**SEG_BITS];
  logic signed [ERR_W-1:0] e_lsb [2**SEG_BITS];
  logic [ERR_W-1:0] inl_limit, dnl_limit, max_inl, max_dnl;
  logic busy, done, pass;
  mem_req_t req;
  int checks = 0, failures = 0;
  real stored [NC];
  int  n_writes;

  always #5 clk = ~clk;
  linearity_eval dut (.clk, .rst_n, .start, .e_msb, .e_isb, .e_lsb, .inl_limit, .dnl_limit,
                      .busy, .done, .max_inl, .max_dnl, .pass, .mem_req(req));

  always @(posedge clk)
    if (req.en && req.we) begin
      n_writes++;
      if (req.addr[REGION_W+DAC_BITS-1 -: REGION_W] != REG_INL) begin
        failures++;
        $display("FAIL: write outside the INL region");
      end
      stored[req.addr[ADC_BITS-1:0]] = real'(signed'(req.wdata)) / 256.0;
    end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  function automatic bit near(real a, real b);
    return (a - b < 2.0 / 256.0) && (b - a < 2.0 / 256.0);
  endfunction

  initial begin : watchdog
    repeat (12 * (NC + 10)) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(logic [ERR_W-1:0] il, logic [ERR_W-1:0] dl, output int cyc);
    inl_limit = il;
    dnl_limit = dl;
    n_writes  = 0;
    @(posedge clk);
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    cyc = 0;
    do begin
      @(negedge clk);
      cyc++;
    end while (!done);
  endtask

  initial begin
    for (int trial = 0; trial < 3; trial++) begin
      real inl [NC];
      real e [NC];
      real wi, wd, e0, span;          // e0 + span * C: reference line
      int  cyc;
      for (int s = 0; s < 2 ** SEG_BITS; s++) begin
        e_msb[s] = ERR_W'($signed($urandom_range(1600)) - 800);
        e_isb[s] = ERR_W'($signed($urandom_range(400)) - 200);
        e_lsb[s] = ERR_W'($signed($urandom_range(100)) - 50);
      end
      for (int c = 0; c < NC; c++)
        e[c] = real'(e_msb[c[11:8]] + e_isb[c[7:4]] + e_lsb[c[3:0]]) / 256.0;
      // least-squares line through all codes, by the normal equations
      begin
        real sx, sy, sxx, sxy;
        sx = 0; sy = 0; sxx = 0; sxy = 0;
        for (int c = 0; c < NC; c++) begin
          sx += c; sy += e[c]; sxx += real'(c) * c; sxy += real'(c) * e[c];
        end
        span = (NC * sxy - sx * sy) / (NC * sxx - sx * sx);
        e0   = (sy - span * sx) / NC;
      end
      wi = 0.0;
      wd = 0.0;
      for (int c = 0; c < NC; c++) begin
        inl[c] = e[c] - e0 - span * real'(c);
        if (inl[c] > wi) wi = inl[c];
        if (-inl[c] > wi) wi = -inl[c];
        if (c > 0 && inl[c] - inl[c-1] > wd) wd = inl[c] - inl[c-1];
        if (c > 0 && inl[c-1] - inl[c] > wd) wd = inl[c-1] - inl[c];
      end
      if (trial == 0) rst_n = 1'b1;
      // limits 4/256 LSB above both worst values: pass
      run(ERR_W'(int'(wi * 256.0) + 4), ERR_W'(int'(wd * 256.0) + 4), cyc);
      check(cyc == NC + 1, $sformatf("latency %0d", cyc));
      check(n_writes == NC, $sformatf("writes %0d", n_writes));
      check(near(real'(max_inl) / 256.0, wi), $sformatf("max INL %f vs %f", real'(max_inl) / 256.0, wi));
      check(near(real'(max_dnl) / 256.0, wd), $sformatf("max DNL %f vs %f", real'(max_dnl) / 256.0, wd));
      check(pass, "pass with loose limits");
      for (int c = 0; c < NC; c++)
        check(near(stored[c], inl[c]), $sformatf("INL(%0d) %f vs %f", c, stored[c], inl[c]));
      // INL limit too tight: fail
      run(ERR_W'(int'(wi * 256.0) - 4), ERR_W'(int'(wd * 256.0) + 4), cyc);
      check(!pass, "fail on INL limit");
      // DNL limit too tight: fail
      run(ERR_W'(int'(wi * 256.0) + 4), ERR_W'(int'(wd * 256.0) - 4), cyc);
      check(!pass, "fail on DNL limit");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
