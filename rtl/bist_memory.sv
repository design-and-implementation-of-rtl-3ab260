// bist_memory: the BIST's static RAM, one synchronous single-port array.
//
// A request with en & we writes wdata at addr; a request with en & !we returns
// the word at addr on rdata one clock later (rdata holds otherwise). The address
// is {region, code} (see bist_pkg::mem_region_e): the two captured ramps, the
// predistortion table and the per-code INL results each take one region of
// 2^DAC_BITS words.
//
// Follows the source design: a small SRAM that holds the ADC codes, data and the
// results that can be read back for plotting. Its organisation (one port,
// 16-bit words, four regions) is this design's own.
module bist_memory
  import bist_pkg::*;
#(
  parameter int unsigned DEPTH = 2 ** (REGION_W + DAC_BITS)
) (
  input  logic             clk,
  input  mem_req_t         req,
  output logic [MEM_W-1:0] rdata
);

  logic [MEM_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (req.en) begin
      if (req.we) mem[req.addr] <= req.wdata;
      else        rdata         <= mem[req.addr];
    end
  end

endmodule
