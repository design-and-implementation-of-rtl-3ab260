// tb_bist_fsm: runs one complete self-test through the controller with simple
// stand-ins around it: a counter, an ADC that answers ADC_BITS clocks after
// start with code = dac_code/4 + 3 (+10 with the offset on, clamped), and
// algorithm units that answer `done` a few clocks after start.
// Checks: every DAC code is converted once per sweep and written to the right
// region with the right data; the offset is on in the second sweep only; each
// code takes ADC_BITS + 2 clocks; the memory owner follows the phase; the units
// are started in order; offset and gain error; the limits are latched; the
// worst values and the verdict are locked at the end; test mode is required;
// the DAC source follows test_mode and cal_en.
module tb_bist_fsm;
  import bist_pkg::*;
  localparam int unsigned NS = 2 ** DAC_BITS;

  logic clk = 1'b0, rst_n = 1'b0;
  logic test_mode = 1'b0, cal_en = 1'b0, bist_start = 1'b0;
  logic [ERR_W-1:0] inl_limit, dnl_limit, inl_limit_q, dnl_limit_q, max_inl, max_dnl;
  logic cnt_clear, cnt_step, cnt_last;
  logic [DAC_BITS-1:0] cnt_code;
  dac_src_e dac_sel;
  logic offset_en, adc_start, adc_done;
  logic [ADC_BITS-1:0] adc_code;
  mem_owner_e owner;
  mem_req_t fsm_req;
  logic est_start, est_done, eval_start, eval_done, eval_pass, rome_start, rome_done;
  logic [ERR_W-1:0] eval_max_inl, eval_max_dnl;
  logic busy, done, pass, fail;
  logic signed [ADC_BITS:0] offset_err, gain_err;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  bist_fsm dut (.*);

  // stand-in counter
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) cnt_code <= '0;
    else if (cnt_clear) cnt_code <= '0;
    else if (cnt_step) cnt_code <= cnt_code + 1'b1;
  assign cnt_last = &cnt_code;

  // stand-in ADC
  int adc_cnt;
  logic adc_busy;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      adc_busy <= 1'b0; adc_done <= 1'b0; adc_cnt <= 0; adc_code <= '0;
    end else begin
      adc_done <= 1'b0;
      if (!adc_busy && adc_start) begin
        int c;
        c = int'(cnt_code) / 4 + 3 + (offset_en ? 10 : 0);
        if (c > 4095) c = 4095;
        adc_code <= ADC_BITS'(c);
        adc_busy <= 1'b1;
        adc_cnt  <= 1;
      end else if (adc_busy) begin
        adc_cnt <= adc_cnt + 1;
        if (adc_cnt == ADC_BITS) begin
          adc_busy <= 1'b0;
          adc_done <= 1'b1;
        end
      end
    end

  // stand-in algorithm units: done 5 clocks after start
  int est_t, eval_t, rome_t, order = 0, est_order, eval_order, rome_order;
  always_ff @(posedge clk) begin
    est_done  <= (est_t == 5);
    eval_done <= (eval_t == 5);
    rome_done <= (rome_t == 5);
    est_t  <= est_start  ? 1 : (est_t  > 0 && est_t  < 6) ? est_t + 1  : 0;
    eval_t <= eval_start ? 1 : (eval_t > 0 && eval_t < 6) ? eval_t + 1 : 0;
    rome_t <= rome_start ? 1 : (rome_t > 0 && rome_t < 6) ? rome_t + 1 : 0;
    if (est_start)  begin est_order  <= order; order <= order + 1; end
    if (eval_start) begin eval_order <= order; order <= order + 1; end
    if (rome_start) begin rome_order <= order; order <= order + 1; end
  end
  assign eval_max_inl = 16'd700;
  assign eval_max_dnl = 16'd300;

  // monitors
  int writes1 = 0, writes2 = 0, bad_data = 0, bad_owner = 0, starts_off = 0, starts_on = 0;
  always @(posedge clk) begin
    if (fsm_req.en && fsm_req.we) begin
      int exp;
      exp = int'(fsm_req.addr[DAC_BITS-1:0]) / 4 + 3;
      if (fsm_req.addr[REGION_W+DAC_BITS-1 -: REGION_W] == REG_CAP2) begin
        writes2++;
        exp += 10;
      end else if (fsm_req.addr[REGION_W+DAC_BITS-1 -: REGION_W] == REG_CAP1) writes1++;
      if (exp > 4095) exp = 4095;
      if (int'(fsm_req.wdata) != exp) bad_data++;
      if (owner != OWN_FSM) bad_owner++;
    end
    if (est_start && owner != OWN_EST) bad_owner++;
    if (eval_start && owner != OWN_EVAL) bad_owner++;
    if (rome_start && owner != OWN_ROME) bad_owner++;
    if (adc_start && !adc_busy) begin
      if (offset_en) starts_on++; else starts_off++;
    end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (2 * NS * (ADC_BITS + 2) + 2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc_cap;
    inl_limit = 16'd800;
    dnl_limit = 16'd250;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // not in test mode: start is ignored, DAC follows cal_en
    @(negedge clk);
    bist_start = 1'b1;
    @(negedge clk);
    bist_start = 1'b0;
    check(!busy, "start ignored outside test mode");
    check(dac_sel == DSRC_FUNC, "normal mode DAC source");
    cal_en = 1'b1;
    #1 check(dac_sel == DSRC_PRED, "calibrated DAC source");
    cal_en = 1'b0;
    test_mode = 1'b1;
    #1 check(dac_sel == DSRC_RAMP, "test mode DAC source");
    @(negedge clk);
    bist_start = 1'b1;
    @(negedge clk);
    bist_start = 1'b0;
    inl_limit = 16'd1;          // changes after start must not matter
    cyc_cap = 0;
    while (!est_start) begin
      @(negedge clk);
      cyc_cap++;
    end
    check(cyc_cap == 2 * NS * (ADC_BITS + 2), $sformatf("capture clocks %0d", cyc_cap));
    while (!done) @(negedge clk);
    check(writes1 == NS && writes2 == NS, $sformatf("writes %0d %0d", writes1, writes2));
    check(starts_off == NS && starts_on == NS, $sformatf("starts %0d %0d", starts_off, starts_on));
    check(bad_data == 0, $sformatf("%0d wrong capture words", bad_data));
    check(bad_owner == 0, $sformatf("%0d owner errors", bad_owner));
    check(est_order == 0 && eval_order == 1 && rome_order == 2, "unit order");
    check(inl_limit_q == 16'd800 && dnl_limit_q == 16'd250, "limits latched");
    check(offset_err == 3, $sformatf("offset error %0d", offset_err));
    // last code: min(16383/4 + 3, 4095) = 4095, ideal 4095, minus the offset
    check(gain_err == -3, $sformatf("gain error %0d", gain_err));
    // max INL 700 <= 800 but DNL 300 > 250: the locked verdict is the unit's
    check(max_inl == 700 && max_dnl == 300, "worst values locked");
    check(pass == eval_pass && fail == !eval_pass, "verdict locked");
    check(!busy, "not busy when done");
    repeat (10) @(negedge clk);
    check(done && max_inl == 700, "status holds");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  assign eval_pass = 1'b0;
endmodule
