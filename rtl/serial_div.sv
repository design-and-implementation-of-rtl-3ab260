// serial_div: unsigned restoring divider, one quotient bit per clock.
//
// Pulse `start` with `dividend` and `divisor`; WN clocks later `done` pulses and
// `quotient` = dividend / divisor (rounded down) is valid and holds. A zero
// divisor gives an all-ones quotient. Used by the segment estimator for the
// offset average and the reciprocals of the normal-matrix diagonal.
module serial_div #(
  parameter int unsigned WN = 48,   // dividend / quotient width
  parameter int unsigned WD = 32    // divisor width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [WN-1:0] dividend,
  input  logic [WD-1:0] divisor,
  output logic          busy,
  output logic          done,
  output logic [WN-1:0] quotient
);

  logic [WD:0]             rem;
  logic [WD-1:0]           dvs;
  logic [$clog2(WN+1)-1:0] cnt;

  logic [WD:0] trial;
  assign trial = {rem[WD-1:0], quotient[WN-1]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      done     <= 1'b0;
      rem      <= '0;
      dvs      <= '0;
      cnt      <= '0;
      quotient <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy     <= 1'b1;
          rem      <= '0;
          dvs      <= divisor;
          quotient <= dividend;   // shifted out MSB first, quotient bits shift in
          cnt      <= $clog2(WN+1)'(WN);
        end
      end else begin
        if (trial >= {1'b0, dvs}) begin
          rem      <= trial - {1'b0, dvs};
          quotient <= {quotient[WN-2:0], 1'b1};
        end else begin
          rem      <= trial;
          quotient <= {quotient[WN-2:0], 1'b0};
        end
        cnt <= cnt - 1'b1;
        if (cnt == 1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

endmodule
