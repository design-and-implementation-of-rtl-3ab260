// r2r_dac_model: BEHAVIOURAL MODEL (not synthesizable) of the 14-bit R-2R ladder
// DAC that generates the on-chip ramp for the ADC BIST.
//
// The output voltage is the sum of the binary bit weights of `code`, each weight
// carrying a fixed relative error so that the ramp is not perfectly linear (the
// BIST algorithm is meant to work with such a stimulus). Raising `offset_en`
// adds the constant shift OFFSET_V (the "alpha" of the two-ramp method) to the
// output. The model is purely combinational: `vout` follows `code` at once.
//
// Follows the source design: 14 bits, R-2R ladder, offset-enable input.
// This model's own choices: full scale VREF = 5 V (the plotted ramp ends near 5 V),
// the bit-weight error pattern (a sine of the bit index scaled by MISMATCH),
// and the offset value.
module r2r_dac_model #(
  parameter int unsigned DAC_BITS = bist_pkg::DAC_BITS,
  parameter real         VREF     = 5.0,    // full-scale range in volts
  parameter real         MISMATCH = 2.0e-3, // relative error of the MSB weight
  parameter real         OFFSET_V = 0.03    // shift applied when offset_en = 1
) (
  input  logic [DAC_BITS-1:0] code,
  input  logic                offset_en,
  output real                 vout
);

  // Relative error of bit i's weight; larger bits get larger errors, as in a
  // real ladder where the MSB resistors dominate the mismatch.
  function automatic real weight(int unsigned i);
    real ideal;
    ideal = VREF * (2.0 ** i) / (2.0 ** DAC_BITS);
    return ideal * (1.0 + MISMATCH * $sin(1.7 * i + 0.4) * (real'(i + 1) / real'(DAC_BITS)));
  endfunction

  always_comb begin
    real acc;
    acc = 0.0;
    for (int unsigned i = 0; i < DAC_BITS; i++)
      if (code[i]) acc = acc + weight(i);
    vout = acc + (offset_en ? OFFSET_V : 0.0);
  end

endmodule
