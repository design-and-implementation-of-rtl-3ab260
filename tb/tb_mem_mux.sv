// tb_mem_mux: gives each owner a distinct random request and checks that the
// memory sees exactly the owner's request.
module tb_mem_mux;
  import bist_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;       // out of reset: the write assertion is armed
  mem_owner_e owner = OWN_HOST;
  mem_req_t host_req = MEM_IDLE, fsm_req = MEM_IDLE, est_req = MEM_IDLE;
  mem_req_t eval_req = MEM_IDLE, rome_req = MEM_IDLE, mem_req;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  mem_mux dut (.clk, .rst_n, .owner, .host_req, .fsm_req, .est_req, .eval_req, .rome_req, .mem_req);

  function automatic mem_req_t rnd_read();
    mem_req_t r;
    r.en    = 1'b1;
    r.we    = 1'b0;          // non-owners only read, as the assertion demands
    r.addr  = ($bits(r.addr))'($urandom);
    r.wdata = MEM_W'($urandom);
    return r;
  endfunction

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 250; n++) begin
      mem_req_t exp;
      @(negedge clk);
      host_req = rnd_read(); fsm_req = rnd_read(); est_req = rnd_read();
      eval_req = rnd_read(); rome_req = rnd_read();
      case (n % 5)
        0: begin owner = OWN_HOST; exp = host_req; end
        1: begin owner = OWN_FSM;  fsm_req.we  = 1'b1; exp = fsm_req;  end
        2: begin owner = OWN_EST;  exp = est_req;  end
        3: begin owner = OWN_EVAL; eval_req.we = 1'b1; exp = eval_req; end
        default: begin owner = OWN_ROME; rome_req.we = 1'b1; exp = rome_req; end
      endcase
      #1;
      checks++;
      if (mem_req != exp) begin
        failures++;
        $display("FAIL: owner %0d", owner);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
