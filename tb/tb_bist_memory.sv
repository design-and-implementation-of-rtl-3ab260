// tb_bist_memory: writes random words to random addresses, keeps its own copy,
// and checks every read one clock after the request, and that rdata holds while
// no read is requested and while other words are written.
module tb_bist_memory;
  import bist_pkg::*;
  logic clk = 1'b0;
  mem_req_t req;
  logic [MEM_W-1:0] rdata;
  logic [MEM_W-1:0] model [int];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  bist_memory dut (.clk, .req, .rdata);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int addrs [200];
    logic [MEM_W-1:0] rd;
    req = MEM_IDLE;
    for (int n = 0; n < 200; n++) begin
      addrs[n] = int'($urandom_range(2 ** (REGION_W + DAC_BITS) - 1));
      @(negedge clk);
      req.en = 1'b1; req.we = 1'b1;
      req.addr = ($bits(req.addr))'(addrs[n]);
      req.wdata = MEM_W'($urandom);
      model[addrs[n]] = req.wdata;
    end
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      req.en = 1'b1; req.we = 1'b0;
      req.addr = ($bits(req.addr))'(addrs[n]);
      @(negedge clk);
      req.en = 1'b0;
      check(rdata == model[addrs[n]], $sformatf("addr %0d", addrs[n]));
      @(negedge clk);
      check(rdata == model[addrs[n]], "rdata holds");
      rd = model[addrs[n]];
      req.en = 1'b1; req.we = 1'b1;                 // write another word
      req.addr = ($bits(req.addr))'(addrs[(n + 1) % 200] ^ 1);
      req.wdata = ~rd;
      model[int'(req.addr)] = req.wdata;
      @(negedge clk);
      req.en = 1'b0;
      check(rdata == rd, "rdata holds during a write");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
