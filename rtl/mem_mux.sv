// mem_mux: gives the one port of the BIST memory to the unit that owns the
// current phase.
//
// `owner` (driven by the controller) picks one of five request structs (host,
// capture controller, segment estimator, INL/DNL evaluator, predistortion
// generator) and forwards it to the memory. Read data goes back to every unit;
// only the owner looks at it. Requests of units that do not own the port are
// dropped, and an assertion flags a non-owner that tries to write (checked
// only out of reset, as the units' requests are meaningful only then).
//
// Follows the source design: a multiplexer in front of the memory that passes
// intermediate data, results and calibration data from several units. The
// owner encoding and the single shared port are this design's own.
module mem_mux
  import bist_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  mem_owner_e owner,
  input  mem_req_t   host_req,
  input  mem_req_t   fsm_req,
  input  mem_req_t   est_req,
  input  mem_req_t   eval_req,
  input  mem_req_t   rome_req,
  output mem_req_t   mem_req
);

  always_comb begin
    unique case (owner)
      OWN_FSM:  mem_req = fsm_req;
      OWN_EST:  mem_req = est_req;
      OWN_EVAL: mem_req = eval_req;
      OWN_ROME: mem_req = rome_req;
      default:  mem_req = host_req;
    endcase
  end

  // A unit that does not own the port must not write: its data would be lost.
  a_no_foreign_write: assert property (@(posedge clk) disable iff (!rst_n)
      !((owner != OWN_EST  && est_req.en  && est_req.we)  ||
        (owner != OWN_EVAL && eval_req.en && eval_req.we) ||
        (owner != OWN_ROME && rome_req.en && rome_req.we)));

endmodule
