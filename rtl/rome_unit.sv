// rome_unit: measures the ramp DAC through the ADC with the ADC's own error
// removed, fits a segmented error model to the DAC, and writes a predistortion
// code for every DAC code.
//
// Measurement: for DAC code k it reads the first-capture ADC code C1(k) (region
// REG_CAP1) and the identified INL of that code (region REG_INL, written by
// linearity_eval). The DAC output, in Q8 ADC LSB, is taken as
//   m(k) = C1(k)*256 + INL(C1(k)) + 128          (+128: middle of the code bin)
// and its error against the ideal ramp is y(k) = m(k) - k*2^XSH, where one DAC
// LSB is 2^XSH = 64 units. Samples with a clipped code (0 or full scale) are
// left out.
// Model: y(k) = mu + a[k_M] + b[k_I] + c[k_L] with k_M = k[13:9],
// k_I = k[8:4] and k_L = k[3:2] (68 terms). The error of an R-2R ladder is a
// sum of bit-weight errors, so it is additive over any split of the code bits.
// The two lowest bits lie below the ADC's resolution (4 DAC codes per ADC code)
// and cannot be identified without dither; leaving them out of the model lets
// each segment mean average the ADC's quantisation error out. On a
// complete sweep the least-squares fit of this model is given by the segment
// means, so the unit accumulates per-segment sums and counts in one pass and
// divides them with a serial divider. The fitted error
//   err(k) = mean_M[k_M] + mean_I[k_I] + mean_L[k_L] - 2*mean_all
// is rounded to whole DAC LSB. The predistortion code is found by two
// fixed-point steps, p1 = k - err(k) and p2 = k - err(p1) (clamped to the DAC
// range); of p1, p2, p2 - 1 and p2 + 1 the one whose modelled output
// c + err(c) is closest to k is written to region REG_PRED at k. The model's
// error at the code actually used is thus the one removed, also where the code
// crosses a segment boundary or a gap of the transfer curve. Inside a wide ADC code the
// measurement is flat; the segmented fit averages over all codes of a segment
// and so still follows the DAC between ADC transitions.
//
// Interface: pulse `start`; `done` pulses once all 2^DAC_BITS codes are
// written. Timing: 3 clocks per DAC code to measure, 34 clocks for each of the
// 69 divisions, 1 clock per code to write; done comes
// 4 * 2^DAC_BITS + 69 * 34 + 1 clocks after the start clock.
//
// Follows the source design: a ROME unit next to the USER-SMILE unit that uses
// the ADC as the digitiser for the DAC, removes the ADC's measurement error
// with the identified ADC INL, works with a segmented model, and produces the
// predistortion code fed to the DAC multiplexer. The source names this unit and
// its outputs but not its arithmetic: the segment split, the mean-based fit and
// the inversion step are this design's own.
module rome_unit
  import bist_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  output logic             busy,
  output logic             done,
  output mem_req_t         mem_req,
  input  logic [MEM_W-1:0] mem_rdata
);

  // One DAC LSB is 2^XSH units of Q8 ADC LSB.
  localparam int unsigned XSH = ERR_FRAC - (DAC_BITS - ADC_BITS);
  localparam int unsigned W   = 32;
  localparam int unsigned LS  = DAC_BITS - ADC_BITS;  // unmodelled low bits
  localparam int unsigned BM  = 5, BI = 5, BL = DAC_BITS - BM - BI - LS;
  localparam int unsigned NM  = 2 ** BM, NI = 2 ** BI, NL = 2 ** BL;
  localparam int unsigned NT  = NM + NI + NL + 1;   // terms incl. the grand mean
  localparam int unsigned TW  = $clog2(NT);
  localparam int unsigned DW  = 32;
  localparam logic [ADC_BITS-1:0] CODE_MAX = '1;

  typedef enum logic [2:0] {S_IDLE, S_RD1, S_RD2, S_ACC, S_DIV, S_DIV_W, S_WR} state_e;

  state_e              state;
  logic [DAC_BITS-1:0] k;
  logic [ADC_BITS-1:0] c1;
  logic [TW-1:0]       t;

  // Per-term sums, counts and means: [0, NM) MSB segment, [NM, NM+NI) ISB,
  // [NM+NI, NT-1) LSB, NT-1 all samples.
  logic signed [W-1:0] sum  [NT];
  logic [15:0]         cnt  [NT];
  logic signed [W-1:0] mean [NT];

  logic [TW-1:0] tm, ti, tl;
  assign tm = seg_m(k);
  assign ti = seg_i(k);
  assign tl = seg_l(k);

  function automatic logic [TW-1:0] seg_m(logic [DAC_BITS-1:0] c);
    return TW'(c[DAC_BITS-1 -: BM]);
  endfunction
  function automatic logic [TW-1:0] seg_i(logic [DAC_BITS-1:0] c);
    return TW'(NM) + TW'(c[BI+BL+LS-1 -: BI]);
  endfunction
  function automatic logic [TW-1:0] seg_l(logic [DAC_BITS-1:0] c);
    return TW'(NM + NI) + TW'(c[BL+LS-1:LS]);
  endfunction

  // error sample of the current k (valid in S_ACC, mem_rdata = INL(C1))
  logic signed [W-1:0] y;
  logic                usable;
  always_comb begin
    logic signed [W-1:0] m;
    m      = (W'(signed'({1'b0, c1})) <<< ERR_FRAC) + W'(signed'(mem_rdata))
             + W'(1 << (ERR_FRAC - 1));
    y      = m - (W'(signed'({1'b0, k})) <<< XSH);
    usable = (c1 != '0) && (c1 != CODE_MAX);
  end

  // Predistortion code of the current k (valid in S_WR). err_of(c) is the
  // fitted DAC error at code c in Q8 ADC LSB; step(e) = k - e rounded to DAC
  // LSB and clamped. Two fixed-point steps give p1 = step(err_of(k)) and
  // p2 = step(err_of(p1)); at a gap in the DAC transfer curve the steps jump
  // across the gap, so the neighbours p2 - 1 and p2 + 1 are candidates too. Of
  // the four, the code whose modelled output c*2^XSH + err_of(c) is closest to
  // the target k*2^XSH is used.
  function automatic logic signed [W-1:0] err_of(logic [DAC_BITS-1:0] c);
    return mean[seg_m(c)] + mean[seg_i(c)] + mean[seg_l(c)] - (mean[NT-1] <<< 1);
  endfunction
  function automatic logic [DAC_BITS-1:0] step(logic signed [W-1:0] e);
    logic signed [W-1:0] p;
    p = W'(signed'({1'b0, k})) - ((e + W'(1 << (XSH - 1))) >>> XSH);
    if (p < 0)                   return '0;
    if (p > W'(2**DAC_BITS - 1)) return '1;
    return DAC_BITS'(p);
  endfunction
  function automatic logic [W-1:0] miss(logic [DAC_BITS-1:0] c);
    logic signed [W-1:0] d;
    d = (W'(signed'({1'b0, c})) <<< XSH) + err_of(c) - (W'(signed'({1'b0, k})) <<< XSH);
    return (d < 0) ? -d : d;
  endfunction

  logic [DAC_BITS-1:0] p1, p2, pred;
  logic [DAC_BITS-1:0] cand [4];
  assign p1 = step(err_of(k));
  assign p2 = step(err_of(p1));
  always_comb begin
    logic [W-1:0] best;
    cand[0] = p1;
    cand[1] = p2;
    cand[2] = (p2 == '0) ? p2 : p2 - 1'b1;
    cand[3] = (&p2) ? p2 : p2 + 1'b1;
    pred    = p1;
    best    = miss(p1);
    for (int n = 1; n < 4; n++)
      if (miss(cand[n]) < best) begin
        best = miss(cand[n]);
        pred = cand[n];
      end
  end

  // divider for the segment means (sign handled outside)
  logic          div_start, div_busy, div_done;
  logic [DW-1:0] div_q;
  logic          sum_neg;
  assign div_start = (state == S_DIV);
  assign sum_neg   = sum[t] < 0;
  serial_div #(.WN(DW), .WD(16)) u_div (
    .clk, .rst_n, .start(div_start), .dividend(DW'(sum_neg ? -sum[t] : sum[t])),
    .divisor(cnt[t]), .busy(div_busy), .done(div_done), .quotient(div_q)
  );

  always_comb begin
    mem_req = MEM_IDLE;
    unique case (state)
      S_RD1: begin
        mem_req.en   = 1'b1;
        mem_req.addr = mem_addr(REG_CAP1, k);
      end
      S_RD2: begin
        mem_req.en   = 1'b1;
        mem_req.addr = mem_addr(REG_INL, DAC_BITS'(mem_rdata[ADC_BITS-1:0]));
      end
      S_WR: begin
        mem_req.en    = 1'b1;
        mem_req.we    = 1'b1;
        mem_req.addr  = mem_addr(REG_PRED, k);
        mem_req.wdata = MEM_W'(pred);
      end
      default: ;
    endcase
  end

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      k     <= '0;
      c1    <= '0;
      t     <= '0;
      done  <= 1'b0;
      for (int j = 0; j < NT; j++) begin
        sum[j]  <= '0;
        cnt[j]  <= '0;
        mean[j] <= '0;
      end
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          k     <= '0;
          state <= S_RD1;
          for (int j = 0; j < NT; j++) begin
            sum[j] <= '0;
            cnt[j] <= '0;
          end
        end
        S_RD1: state <= S_RD2;
        S_RD2: begin
          c1    <= mem_rdata[ADC_BITS-1:0];
          state <= S_ACC;
        end
        S_ACC: begin
          if (usable) begin
            sum[tm]   <= sum[tm] + y;
            sum[ti]   <= sum[ti] + y;
            sum[tl]   <= sum[tl] + y;
            sum[NT-1] <= sum[NT-1] + y;
            cnt[tm]   <= cnt[tm] + 1'b1;
            cnt[ti]   <= cnt[ti] + 1'b1;
            cnt[tl]   <= cnt[tl] + 1'b1;
            cnt[NT-1] <= cnt[NT-1] + 1'b1;
          end
          k <= k + 1'b1;
          if (&k) begin
            t     <= '0;
            state <= S_DIV;
          end else begin
            state <= S_RD1;
          end
        end
        S_DIV: state <= S_DIV_W;
        S_DIV_W: if (div_done) begin
          // a term with no usable sample gets mean 0
          mean[t] <= (cnt[t] == '0) ? '0 : (sum_neg ? -W'(div_q) : W'(div_q));
          if (32'(t) == NT - 1) begin
            k     <= '0;
            state <= S_WR;
          end else begin
            t     <= t + 1'b1;
            state <= S_DIV;
          end
        end
        S_WR: begin
          k <= k + 1'b1;
          if (&k) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
