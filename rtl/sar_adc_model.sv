// sar_adc_model: BEHAVIOURAL MODEL (not synthesizable) of the 12-bit single-ended
// charge-redistribution SAR ADC that the BIST tests.
//
// A pulse on `start` samples `vin` (plus the constant OFFSET_V when `offset_en`
// is high). The model then decides one bit per clock, MSB first: the trial code
// is kept where the sampled voltage is at or above the capacitor-array voltage of
// the trial code. Each binary capacitor carries a fixed error, so the transfer
// curve has the code-dependent INL/DNL the BIST is meant to find; with
// MSB_ERR_LSB = 0 the model is an ideal floor(v / VLSB) quantiser.
//
// Timing: `start` is taken when `busy` is low; ADC_BITS clocks later `done` is
// high for one clock with the result on `code`, which holds until the next
// conversion ends. A conversion thus takes ADC_BITS + 1 clocks from start to the
// next possible start.
//
// Follows the source design: 12 bits, SAR, charge redistribution, single ended,
// offset-enable input. This model's own choices: VREF = 5 V, one bit per clock,
// and the capacitor error pattern (sine of the bit index, scaled so the MSB is
// off by MSB_ERR_LSB LSB and smaller capacitors proportionally to sqrt(weight)).
module sar_adc_model #(
  parameter int unsigned ADC_BITS    = bist_pkg::ADC_BITS,
  parameter real         VREF        = 5.0,
  parameter real         MSB_ERR_LSB = 4.0,   // error of the MSB capacitor in LSB
  parameter real         OFFSET_V    = 0.02   // input shift applied when offset_en = 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  real                 vin,
  input  logic                offset_en,
  output logic                busy,
  output logic                done,
  output logic [ADC_BITS-1:0] code
);

  localparam real VLSB = VREF / (2.0 ** ADC_BITS);

  // Actual weight of capacitor i in volts.
  function automatic real cap_weight(int unsigned i);
    real err_lsb;
    err_lsb = MSB_ERR_LSB * $sin(2.3 * i + 1.1)
              * $sqrt((2.0 ** i) / (2.0 ** (ADC_BITS - 1)));
    return VLSB * ((2.0 ** i) + err_lsb);
  endfunction

  // Capacitor-array voltage of a trial code.
  function automatic real array_v(logic [ADC_BITS-1:0] c);
    real acc;
    acc = 0.0;
    for (int unsigned i = 0; i < ADC_BITS; i++)
      if (c[i]) acc = acc + cap_weight(i);
    return acc;
  endfunction

  real                       v_held;
  logic [ADC_BITS-1:0]       sar;
  logic [$clog2(ADC_BITS)-1:0] bit_idx;  // bit being decided, counts down

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      done    <= 1'b0;
      code    <= '0;
      sar     <= '0;
      bit_idx <= '0;
      v_held  <= 0.0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          v_held  <= vin + (offset_en ? OFFSET_V : 0.0);
          sar     <= '0;
          bit_idx <= $clog2(ADC_BITS)'(ADC_BITS - 1);
          busy    <= 1'b1;
        end
      end else begin
        logic [ADC_BITS-1:0] trial;
        trial          = sar;
        trial[bit_idx] = 1'b1;
        if (v_held >= array_v(trial)) sar[bit_idx] <= 1'b1;
        if (bit_idx == 0) begin
          busy <= 1'b0;
          done <= 1'b1;
          code <= (v_held >= array_v(trial)) ? trial : sar;
        end else begin
          bit_idx <= bit_idx - 1'b1;
        end
      end
    end
  end

endmodule
