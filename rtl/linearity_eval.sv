// linearity_eval: turns the identified segment errors into per-code INL and DNL,
// finds their worst values, checks them against the limits and gives the BIST
// pass/fail verdict.
//
// For every ADC code C, one per clock from 0 to full scale, it forms
//   E(C)   = e_M[C_MSB] + e_I[C_ISB] + e_L[C_LSB]
//   INL(C) = E(C) - (a + b * (C - (2^N - 1) / 2))
// where a + b*x is the least-squares (best-fit) line through E over all codes,
// so the result no longer depends on the constant and the straight line the
// two-ramp identification cannot see (offset and gain are reported separately
// by the controller). Because E is a sum of segment terms, the line follows in
// closed form from the 48 table entries: with K = 2^SEG_BITS, the mean a is the
// sum of all entries over K, and sum((2C - 2^N + 1) * E(C)) is a fixed weighted
// sum of the entries, turned into the slope by a multiplication with the
// constant RECIP = round(3 * 2^(F + 3N) / (2^N (2^(2N) - 1))). Both are taken
// with F = 24 fraction bits when `start` is seen; INL is rounded to Q8.
// DNL(C-1) = INL(C) - INL(C-1). It tracks max |INL| and max |DNL| and writes
// INL(C) (Q8 LSB, saturated to 16 bits) to region REG_INL of the BIST memory so
// the full curve can be read back and plotted.
//
// Interface: pulse `start` with the tables stable; `done` pulses 2^N + 1 clocks
// later with `max_inl`, `max_dnl` (unsigned Q8 LSB) and `pass` valid, where
// pass = max_inl <= inl_limit and max_dnl <= dnl_limit. They hold until the next
// start. The line is computed combinationally from the tables in the start
// cycle.
//
// Follows the source design: INL as the sum of the MSB, ISB and LSB segment
// errors, taken against the best-fit line, DNL from adjacent codes, limits
// compared on chip, worst values and pass/fail kept, data points stored in
// memory. This design's own choices: the closed-form line, the fixed-point
// formats and one code per clock.
module linearity_eval
  import bist_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic signed [ERR_W-1:0] e_msb [2**SEG_BITS],
  input  logic signed [ERR_W-1:0] e_isb [2**SEG_BITS],
  input  logic signed [ERR_W-1:0] e_lsb [2**SEG_BITS],
  input  logic [ERR_W-1:0]        inl_limit,
  input  logic [ERR_W-1:0]        dnl_limit,
  output logic                    busy,
  output logic                    done,
  output logic [ERR_W-1:0]        max_inl,
  output logic [ERR_W-1:0]        max_dnl,
  output logic                    pass,
  output mem_req_t                mem_req
);

  localparam int unsigned N     = ADC_BITS;
  localparam longint      K     = 2 ** SEG_BITS;
  localparam int unsigned F     = 24;          // fraction bits of the line
  localparam int unsigned PW    = 96;
  localparam longint      DEN   = longint'(2**N) * (longint'(2**N) * longint'(2**N) - 1);
  localparam longint      RECIP = ((64'sd3 <<< (F + 3*N)) + DEN / 2) / DEN;
  localparam longint      HALF  = K * (K - 1) / 2;
  localparam longint      WSUM  = K * K + K + 1;
  localparam int unsigned EW    = ERR_W + 4;   // width of a summed error

  logic                   running;
  logic [N-1:0]           c;
  logic signed [63:0]     mean_r, slope_r;     // line: Q8 with F fraction bits
  logic signed [EW-1:0]   inl_prev;

  // weight of entry idx of the segment with code weight w in sum(C * E(C))
  function automatic longint coef(longint w, int idx);
    return longint'(K) * K * w * idx + (WSUM - w) * K * HALF;
  endfunction

  // best-fit line from the tables
  logic signed [63:0] mean_n, slope_n;
  always_comb begin
    logic signed [63:0] s_all, s_ce, x2;
    logic signed [PW-1:0] prod;
    s_all = '0;
    s_ce  = '0;
    for (int j = 0; j < int'(K); j++) begin
      s_all += 64'(e_msb[j]) + 64'(e_isb[j]) + 64'(e_lsb[j]);
      s_ce  += 64'(e_msb[j]) * coef(K * K, j) + 64'(e_isb[j]) * coef(K, j)
             + 64'(e_lsb[j]) * coef(1, j);
    end
    // sum over C of (2C - 2^N + 1) * E(C); each entry occurs 2^N / K times
    x2      = 2 * s_ce - (longint'(2**N) - 1) * (s_all * (longint'(2**N) / K));
    prod    = PW'(x2) * PW'(RECIP);
    slope_n = 64'(prod >>> (3*N));
    mean_n  = s_all <<< (F - SEG_BITS);
  end

  function automatic logic signed [EW-1:0] seg_sum(logic [N-1:0] code,
      logic signed [ERR_W-1:0] tm [2**SEG_BITS],
      logic signed [ERR_W-1:0] ti [2**SEG_BITS],
      logic signed [ERR_W-1:0] tl [2**SEG_BITS]);
    return EW'(tm[code[N-1 -: SEG_BITS]]) + EW'(ti[code[2*SEG_BITS-1 -: SEG_BITS]])
         + EW'(tl[code[SEG_BITS-1:0]]);
  endfunction

  function automatic logic [EW-1:0] abs_v(logic signed [EW-1:0] v);
    return (v < 0) ? EW'(-v) : EW'(v);
  endfunction

  // INL and DNL of the current code
  logic signed [EW-1:0] inl_c, dnl_c;
  logic [EW-1:0]        inl_abs, dnl_abs;
  always_comb begin
    logic signed [PW-1:0] line;
    line    = PW'(mean_r) + PW'(slope_r) * PW'(2 * signed'({1'b0, c}) - (2**N - 1))
            + (PW'(1) <<< (F - 1));
    inl_c   = seg_sum(c, e_msb, e_isb, e_lsb) - EW'(line >>> F);
    dnl_c   = inl_c - inl_prev;
    inl_abs = abs_v(inl_c);
    dnl_abs = abs_v(dnl_c);
  end

  // Store INL(C), saturated to the memory word.
  localparam logic signed [EW-1:0] WMAX = EW'(2**(MEM_W-1) - 1);
  localparam logic signed [EW-1:0] WMIN = -EW'(2**(MEM_W-1));
  always_comb begin
    mem_req = MEM_IDLE;
    if (running) begin
      mem_req.en    = 1'b1;
      mem_req.we    = 1'b1;
      mem_req.addr  = mem_addr(REG_INL, DAC_BITS'(c));
      mem_req.wdata = (inl_c > WMAX) ? MEM_W'(WMAX) :
                      (inl_c < WMIN) ? MEM_W'(WMIN) : MEM_W'(inl_c);
    end
  end

  assign busy = running;

  logic [EW-1:0] max_inl_w, max_dnl_w;
  assign max_inl = (max_inl_w > EW'(2**ERR_W - 1)) ? '1 : ERR_W'(max_inl_w);
  assign max_dnl = (max_dnl_w > EW'(2**ERR_W - 1)) ? '1 : ERR_W'(max_dnl_w);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running   <= 1'b0;
      c         <= '0;
      mean_r    <= '0;
      slope_r   <= '0;
      inl_prev  <= '0;
      max_inl_w <= '0;
      max_dnl_w <= '0;
      pass      <= 1'b0;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!running) begin
        if (start) begin
          running   <= 1'b1;
          c         <= '0;
          mean_r    <= mean_n;
          slope_r   <= slope_n;
          max_inl_w <= '0;
          max_dnl_w <= '0;
          pass      <= 1'b0;
        end
      end else begin
        logic [EW-1:0] mi, md;
        mi = (inl_abs > max_inl_w) ? inl_abs : max_inl_w;
        md = (c != '0 && dnl_abs > max_dnl_w) ? dnl_abs : max_dnl_w;
        max_inl_w <= mi;
        max_dnl_w <= md;
        inl_prev  <= inl_c;
        c         <= c + 1'b1;
        if (&c) begin
          running <= 1'b0;
          done    <= 1'b1;
          pass    <= (mi <= EW'(inl_limit)) && (md <= EW'(dnl_limit));
        end
      end
    end
  end

endmodule
