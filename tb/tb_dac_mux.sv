// tb_dac_mux: drives random codes on the three inputs and checks that each
// select value passes the right one.
module tb_dac_mux;
  import bist_pkg::*;
  dac_src_e sel;
  logic [DAC_BITS-1:0] func_code, ramp_code, pred_code, dac_code;
  int checks = 0, failures = 0;

  dac_mux dut (.sel, .func_code, .ramp_code, .pred_code, .dac_code);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 300; n++) begin
      logic [DAC_BITS-1:0] exp;
      func_code = DAC_BITS'($urandom);
      ramp_code = DAC_BITS'($urandom);
      pred_code = DAC_BITS'($urandom);
      case (n % 3)
        0:       begin sel = DSRC_FUNC; exp = func_code; end
        1:       begin sel = DSRC_RAMP; exp = ramp_code; end
        default: begin sel = DSRC_PRED; exp = pred_code; end
      endcase
      #1;
      checks++;
      if (dac_code != exp) begin
        failures++;
        $display("FAIL: sel %0d got %h expected %h", sel, dac_code, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
