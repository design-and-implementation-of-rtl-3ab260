// adc_bist: the ADC built-in self-test subsystem with its ramp DAC and the SAR
// ADC under test.
//
// In test mode the controller (bist_fsm) sweeps the 14-bit ramp counter through
// the R-2R DAC into the 12-bit SAR ADC twice, the second time with the constant
// offset enabled, and stores both captures in the BIST memory. The USER-SMILE
// estimator identifies the ADC's segmented INL from the two captures (the ramp's
// own non-linearity cancels), linearity_eval turns that into per-code INL/DNL,
// checks it against the limits and gives pass/fail, and the ROME unit writes a
// predistortion table for the DAC. In normal mode the ADC converts the external
// input `ain` on `func_adc_start` and the DAC converts `func_dac_code`, through
// the predistortion table when `cal_en` is set (one clock of lookup latency).
//
// The test/normal multiplexers: dac_mux picks the DAC code, the ADC input and
// start come from the BIST in test mode and from the pins in normal mode, and
// mem_mux gives the memory port to the active BIST unit, else to the host
// read-back port (`host_rd_en`, `host_addr`, `host_rdata` one clock later).
// The host port is unavailable while cal_en is set in normal mode, because the
// predistortion lookup then uses the memory every clock.
//
// The DAC and ADC are behavioural models (real-valued analog nets); all other
// blocks are synthesizable. Block structure and connections follow the source
// block diagram; interface details are this design's own.
module adc_bist
  import bist_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  // mode and test configuration
  input  logic                     test_mode,
  input  logic                     cal_en,
  input  logic                     bist_start,
  input  logic [ERR_W-1:0]         inl_limit,
  input  logic [ERR_W-1:0]         dnl_limit,
  // normal-mode DAC and ADC
  input  logic [DAC_BITS-1:0]      func_dac_code,
  output real                      dac_vout,
  input  real                      ain,
  input  logic                     func_adc_start,
  output logic                     adc_busy,
  output logic                     adc_done,
  output logic [ADC_BITS-1:0]      adc_code,
  // memory read-back
  input  logic                     host_rd_en,
  input  logic [REGION_W+DAC_BITS-1:0] host_addr,
  output logic [MEM_W-1:0]         host_rdata,
  // status registers
  output logic                     bist_busy,
  output logic                     bist_done,
  output logic                     bist_pass,
  output logic                     bist_fail,
  output logic [ERR_W-1:0]         max_inl,
  output logic [ERR_W-1:0]         max_dnl,
  output logic signed [ADC_BITS:0] offset_err,
  output logic signed [ADC_BITS:0] gain_err,
  output logic signed [23:0]       alpha_est   // identified offset, Q8 LSB
);

  // ---- controller wires ----
  logic                cnt_clear, cnt_step, cnt_last;
  logic [DAC_BITS-1:0] cnt_code, dac_code;
  dac_src_e            dac_sel;
  logic                offset_en, fsm_adc_start;
  mem_owner_e          owner;
  mem_req_t            host_req, fsm_req, est_req, eval_req, rome_req, mem_req;
  logic [MEM_W-1:0]    mem_rdata;
  logic                est_start, est_done, est_busy;
  logic                eval_start, eval_done, eval_busy, eval_pass;
  logic [ERR_W-1:0]    eval_max_inl, eval_max_dnl, inl_limit_q, dnl_limit_q;
  logic                rome_start, rome_done, rome_busy;
  logic signed [ERR_W-1:0] e_msb [2**SEG_BITS];
  logic signed [ERR_W-1:0] e_isb [2**SEG_BITS];
  logic signed [ERR_W-1:0] e_lsb [2**SEG_BITS];
  real                 adc_vin;

  bist_fsm u_fsm (
    .clk, .rst_n, .test_mode, .cal_en, .bist_start, .inl_limit, .dnl_limit,
    .cnt_clear, .cnt_step, .cnt_code, .cnt_last,
    .dac_sel, .offset_en, .adc_start(fsm_adc_start), .adc_done, .adc_code,
    .owner, .fsm_req,
    .est_start, .est_done, .eval_start, .eval_done, .eval_pass,
    .eval_max_inl, .eval_max_dnl, .rome_start, .rome_done,
    .inl_limit_q, .dnl_limit_q,
    .busy(bist_busy), .done(bist_done), .pass(bist_pass), .fail(bist_fail),
    .max_inl, .max_dnl, .offset_err, .gain_err
  );

  ramp_counter u_counter (
    .clk, .rst_n, .clear(cnt_clear), .step(cnt_step), .code(cnt_code), .last(cnt_last)
  );

  // Normal mode with predistortion: look the functional code up every clock.
  always_comb begin
    host_req = MEM_IDLE;
    if (!test_mode && cal_en) begin
      host_req.en   = 1'b1;
      host_req.addr = mem_addr(REG_PRED, func_dac_code);
    end else if (host_rd_en) begin
      host_req.en   = 1'b1;
      host_req.addr = host_addr;
    end
  end
  assign host_rdata = mem_rdata;

  dac_mux u_dac_mux (
    .sel(dac_sel), .func_code(func_dac_code), .ramp_code(cnt_code),
    .pred_code(mem_rdata[DAC_BITS-1:0]), .dac_code
  );

  r2r_dac_model u_dac (.code(dac_code), .offset_en, .vout(dac_vout));

  // ADC input and start: BIST in test mode, pins in normal mode.
  assign adc_vin = test_mode ? dac_vout : ain;

  sar_adc_model u_adc (
    .clk, .rst_n, .start(test_mode ? fsm_adc_start : func_adc_start),
    .vin(adc_vin), .offset_en, .busy(adc_busy), .done(adc_done), .code(adc_code)
  );

  mem_mux u_mem_mux (
    .clk, .rst_n, .owner, .host_req, .fsm_req, .est_req, .eval_req, .rome_req, .mem_req
  );

  bist_memory u_mem (.clk, .req(mem_req), .rdata(mem_rdata));

  usmile_estimator u_est (
    .clk, .rst_n, .start(est_start), .busy(est_busy), .done(est_done),
    .mem_req(est_req), .mem_rdata, .e_msb, .e_isb, .e_lsb, .alpha(alpha_est)
  );

  linearity_eval u_eval (
    .clk, .rst_n, .start(eval_start), .e_msb, .e_isb, .e_lsb,
    .inl_limit(inl_limit_q), .dnl_limit(dnl_limit_q),
    .busy(eval_busy), .done(eval_done), .max_inl(eval_max_inl),
    .max_dnl(eval_max_dnl), .pass(eval_pass), .mem_req(eval_req)
  );

  rome_unit u_rome (
    .clk, .rst_n, .start(rome_start), .busy(rome_busy), .done(rome_done),
    .mem_req(rome_req), .mem_rdata
  );

  // At most one algorithm unit may be running at a time: they share the memory.
  a_one_unit: assert property (@(posedge clk) disable iff (!rst_n)
      $onehot0({est_busy, eval_busy, rome_busy}));

endmodule
