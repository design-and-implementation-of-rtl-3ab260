// dac_mux: selects what the DAC converts.
//
// In test mode the BIST ramp counter owns the DAC (DSRC_RAMP). In normal mode
// the DAC converts either the functional code as it is (DSRC_FUNC) or, with
// predistortion switched on, the predistortion code looked up for that
// functional code in the BIST memory (DSRC_PRED). Purely combinational.
//
// Follows the source design: a multiplexer in front of the DAC choosing between
// the counter and the predistortion code, and the test/normal mode selection
// that lets the BIST bypass the DAC's usual control path. The three-way encoding
// is this design's own.
module dac_mux
  import bist_pkg::*;
(
  input  dac_src_e             sel,
  input  logic [DAC_BITS-1:0]  func_code,
  input  logic [DAC_BITS-1:0]  ramp_code,
  input  logic [DAC_BITS-1:0]  pred_code,
  output logic [DAC_BITS-1:0]  dac_code
);

  always_comb begin
    unique case (sel)
      DSRC_RAMP: dac_code = ramp_code;
      DSRC_PRED: dac_code = pred_code;
      default:   dac_code = func_code;
    endcase
  end

endmodule
