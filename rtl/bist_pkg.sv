// bist_pkg: shared sizes, fixed-point formats and types of the ADC BIST subsystem.
//
// The ADC under test has 12 bits and the on-chip ramp DAC 14 bits, as in the
// source design. Everything else here is this implementation's own choice:
//  * linearity errors are carried in signed fixed point with ERR_FRAC fraction
//    bits (Q8: 256 = 1 ADC LSB) in ERR_W bits, enough for +/-128 LSB;
//  * the 12-bit ADC code is cut into three 4-bit segments (MSB / ISB / LSB);
//  * the BIST memory is one synchronous single-port RAM of 16-bit words split
//    into four regions of 2^DAC_BITS words each (see mem_region_e).
package bist_pkg;

  localparam int unsigned ADC_BITS  = 12;
  localparam int unsigned DAC_BITS  = 14;
  localparam int unsigned SEG_BITS  = 4;    // width of one code segment
  localparam int unsigned ERR_FRAC  = 8;    // fraction bits of an error value
  localparam int unsigned ERR_W     = 16;   // width of an error value
  localparam int unsigned MEM_W     = 16;   // memory word width
  localparam int unsigned REGION_W  = 2;    // region select bits of a memory address

  // Memory regions; the word address inside a region is a DAC or ADC code.
  typedef enum logic [REGION_W-1:0] {
    REG_CAP1 = 2'd0,   // ADC code for each DAC code, offset disabled
    REG_CAP2 = 2'd1,   // ADC code for each DAC code, offset enabled
    REG_PRED = 2'd2,   // predistortion DAC code for each wanted DAC code
    REG_INL  = 2'd3    // identified INL(C) in Q8 LSB for each ADC code
  } mem_region_e;

  // Owner of the single memory port.
  typedef enum logic [2:0] {
    OWN_HOST = 3'd0,   // host read-back / normal-mode predistortion lookup
    OWN_FSM  = 3'd1,   // ramp capture
    OWN_EST  = 3'd2,   // segment estimator
    OWN_EVAL = 3'd3,   // INL/DNL evaluation
    OWN_ROME = 3'd4    // predistortion generation
  } mem_owner_e;

  // Source of the DAC input code.
  typedef enum logic [1:0] {
    DSRC_FUNC = 2'd0,  // functional code straight through
    DSRC_RAMP = 2'd1,  // BIST ramp counter
    DSRC_PRED = 2'd2   // predistortion code read from memory
  } dac_src_e;

  // Request on the memory port: read data returns one cycle after en & !we.
  typedef struct packed {
    logic                          en;
    logic                          we;
    logic [REGION_W+DAC_BITS-1:0]  addr;
    logic [MEM_W-1:0]              wdata;
  } mem_req_t;

  localparam mem_req_t MEM_IDLE = '{en: 1'b0, we: 1'b0, addr: '0, wdata: '0};

  // Word address of code `code` in region `r`.
  function automatic logic [REGION_W+DAC_BITS-1:0] mem_addr(mem_region_e r,
                                                           logic [DAC_BITS-1:0] code);
    return {r, code};
  endfunction

endpackage
