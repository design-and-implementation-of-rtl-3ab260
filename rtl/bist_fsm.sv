// bist_fsm: the BIST controller and its register set.
//
// A `bist_start` pulse while `test_mode` is high runs one complete self-test:
//   CAP1  the ramp counter sweeps every DAC code 0 .. 2^DAC_BITS-1 with the offset
//         off; for each code the ADC converts the DAC output once and the code is
//         written to memory region REG_CAP1. Offset and gain error are taken from
//         the first and last code of this sweep.
//   CAP2  the same sweep with `offset_en` high, into REG_CAP2.
//   EST   the USER-SMILE segment estimator runs on the two captures.
//   EVAL  INL/DNL are built per code, compared with the limits, stored in REG_INL.
//   ROME  the predistortion table REG_PRED is generated.
// The limits are latched at start. At the end the worst INL/DNL, offset and
// gain error and the pass/fail verdict are locked into the status registers and
// held until the next test; `done` is then high. The controller also gives the
// memory port to the unit of each phase and picks the DAC source.
//
// Timing: each capture step is one start clock plus the ADC conversion
// (ADC_BITS clocks) plus one clock to store, i.e. ADC_BITS + 2 clocks per code.
//
// Follows the source design: registers and an FSM that start the 14-bit counter
// in test mode, run the USER-SMILE unit after the ramp, compare with limits and
// lock the worst values and pass/fail status. This design's own choices: the
// phase order (two full captures, then estimation, evaluation, predistortion),
// one conversion per DAC code, and the offset/gain error definitions
// (offset = code at DAC code 0, gain = code at the last DAC code minus its ideal
// value minus the offset; both in whole ADC LSB).
module bist_fsm
  import bist_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  // configuration registers
  input  logic                 test_mode,
  input  logic                 cal_en,
  input  logic                 bist_start,
  input  logic [ERR_W-1:0]     inl_limit,
  input  logic [ERR_W-1:0]     dnl_limit,
  // ramp counter
  output logic                 cnt_clear,
  output logic                 cnt_step,
  input  logic [DAC_BITS-1:0]  cnt_code,
  input  logic                 cnt_last,
  // DAC / ADC control
  output dac_src_e             dac_sel,
  output logic                 offset_en,
  output logic                 adc_start,
  input  logic                 adc_done,
  input  logic [ADC_BITS-1:0]  adc_code,
  // memory
  output mem_owner_e           owner,
  output mem_req_t             fsm_req,
  // algorithm units
  output logic                 est_start,
  input  logic                 est_done,
  output logic                 eval_start,
  input  logic                 eval_done,
  input  logic                 eval_pass,
  input  logic [ERR_W-1:0]     eval_max_inl,
  input  logic [ERR_W-1:0]     eval_max_dnl,
  output logic                 rome_start,
  input  logic                 rome_done,
  // locked limits and status registers
  output logic [ERR_W-1:0]     inl_limit_q,
  output logic [ERR_W-1:0]     dnl_limit_q,
  output logic                 busy,
  output logic                 done,
  output logic                 pass,
  output logic                 fail,
  output logic [ERR_W-1:0]     max_inl,
  output logic [ERR_W-1:0]     max_dnl,
  output logic signed [ADC_BITS:0] offset_err,
  output logic signed [ADC_BITS:0] gain_err
);

  typedef enum logic [3:0] {
    S_IDLE, S_CONV, S_WAIT, S_EST, S_EST_W, S_EVAL, S_EVAL_W, S_ROME, S_ROME_W, S_DONE
  } state_e;

  localparam int unsigned IDEAL_LAST = (2**DAC_BITS - 1) >> (DAC_BITS - ADC_BITS);

  state_e state;
  logic   second;   // 0: CAP1 sweep, 1: CAP2 sweep (offset enabled)

  // ---- outputs decoded from the state ----
  always_comb begin
    cnt_clear  = 1'b0;
    cnt_step   = 1'b0;
    adc_start  = (state == S_CONV);
    est_start  = (state == S_EST);
    eval_start = (state == S_EVAL);
    rome_start = (state == S_ROME);
    offset_en  = (state == S_CONV || state == S_WAIT) && second;
    fsm_req    = MEM_IDLE;
    if ((state == S_IDLE || state == S_DONE) && test_mode && bist_start) cnt_clear = 1'b1;
    if (state == S_WAIT && adc_done) begin
      fsm_req.en    = 1'b1;
      fsm_req.we    = 1'b1;
      fsm_req.addr  = mem_addr(second ? REG_CAP2 : REG_CAP1, cnt_code);
      fsm_req.wdata = MEM_W'(adc_code);
      cnt_step      = 1'b1;
    end
    unique case (state)
      S_EST, S_EST_W:   owner = OWN_EST;
      S_EVAL, S_EVAL_W: owner = OWN_EVAL;
      S_ROME, S_ROME_W: owner = OWN_ROME;
      S_CONV, S_WAIT:   owner = OWN_FSM;
      default:          owner = OWN_HOST;
    endcase
    if (!test_mode)   dac_sel = cal_en ? DSRC_PRED : DSRC_FUNC;
    else              dac_sel = DSRC_RAMP;
  end

  assign busy = (state != S_IDLE) && (state != S_DONE);
  assign done = (state == S_DONE);
  assign fail = done && !pass;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      second      <= 1'b0;
      inl_limit_q <= '0;
      dnl_limit_q <= '0;
      pass        <= 1'b0;
      max_inl     <= '0;
      max_dnl     <= '0;
      offset_err  <= '0;
      gain_err    <= '0;
    end else begin
      unique case (state)
        S_IDLE, S_DONE: if (test_mode && bist_start) begin
          inl_limit_q <= inl_limit;
          dnl_limit_q <= dnl_limit;
          pass        <= 1'b0;
          second      <= 1'b0;
          state       <= S_CONV;
        end
        S_CONV: state <= S_WAIT;
        S_WAIT: if (adc_done) begin
          if (!second && cnt_code == '0)
            offset_err <= signed'({1'b0, adc_code});
          if (!second && cnt_last)
            gain_err <= signed'({1'b0, adc_code}) - (ADC_BITS+1)'(IDEAL_LAST) - offset_err;
          if (cnt_last) begin
            second <= !second;
            state  <= second ? S_EST : S_CONV;
          end else begin
            state <= S_CONV;
          end
        end
        S_EST:    state <= S_EST_W;
        S_EST_W:  if (est_done)  state <= S_EVAL;
        S_EVAL:   state <= S_EVAL_W;
        S_EVAL_W: if (eval_done) begin
          max_inl <= eval_max_inl;
          max_dnl <= eval_max_dnl;
          pass    <= eval_pass;
          state   <= S_ROME;
        end
        S_ROME:   state <= S_ROME_W;
        S_ROME_W: if (rome_done) state <= S_DONE;
        default:  state <= S_IDLE;
      endcase
    end
  end

  // The counter must have wrapped to zero when the second sweep starts.
  a_sweep_from_zero: assert property (@(posedge clk) disable iff (!rst_n)
      (state == S_WAIT && adc_done && cnt_last) |=> cnt_code == '0);

endmodule
