// usmile_estimator: identifies the segmented INL model of the ADC from two ramp
// captures that differ by a constant input shift (the USER-SMILE idea), as a
// hardware least-squares solver.
//
// Model: the transition level of code C, in LSB, is C + E(C) with
//   E(C) = e_M[C_MSB] + e_I[C_ISB] + e_L[C_LSB]
// where C_MSB, C_ISB, C_LSB are the three 4-bit segments of the 12-bit code,
// 48 unknowns in all (index u = 16*level + segment, level 0 = MSB). The same
// non-linear ramp is converted twice, the second time shifted by a constant
// alpha. For DAC code k the two codes C1, C2 then satisfy
//   E(C2) - E(C1) = alpha - (C2 - C1) + noise,
// which no longer contains the ramp: its non-linearity drops out. Each usable
// pair (no code at 0 or full scale) is one row of a linear system with +1 at
// the segments of C2 and -1 at those of C1 (terms shared by both cancel).
//
// Phases after `start`:
//   CLR   zero the 48x48 normal matrix A (one entry per clock).
//   ACC   one pass over the stored pairs: A += r r^T (36 clocks per pair, one
//         entry per clock), s1 += r, s2 += r*(C2-C1), and sum/count of C2-C1.
//   ADIV  alpha = mean(C2 - C1) in Q16, by serial division.
//   RDIV  reciprocal 2^24 / A[u][u] of every diagonal entry (0 if the segment
//         was never seen), by serial division.
//   GS    GS_SWEEPS Gauss-Seidel sweeps on A x = b, b = alpha*s1 - s2:
//         x[u] += (b[u] - sum_i A[u][i] x[i]) * recip[u], 48+1 clocks per u.
// alpha only needs to be close: an error in it is equivalent to a straight line
// in E, which linearity_eval removes with the best-fit line, as it removes the
// per-table constants the data cannot determine.
//
// Interface: pulse `start`; the unit reads regions REG_CAP1 and REG_CAP2 of the
// BIST memory through `mem_req` (read data one clock later on `mem_rdata`) and
// pulses `done` when e_msb, e_isb, e_lsb (signed Q8 LSB) and `alpha` (Q8 LSB)
// are final; they hold until the next start. The run takes a fixed number of
// clocks: LATENCY below.
//
// Follows the source design: the segmented MSB/ISB/LSB error model, the two
// constant-offset inputs, and identification of the INL from the difference of
// the two code sets. This design's own choices: 4/4/4 segmentation, alpha as the
// mean code difference, the normal-equation / Gauss-Seidel solver, fixed point.
module usmile_estimator
  import bist_pkg::*;
#(
  parameter int unsigned N_SAMPLES = 2 ** DAC_BITS, // pairs stored per capture
  parameter int unsigned GS_SWEEPS = 200            // Gauss-Seidel sweeps
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  output logic                    busy,
  output logic                    done,
  output mem_req_t                mem_req,
  input  logic [MEM_W-1:0]        mem_rdata,
  output logic signed [ERR_W-1:0] e_msb [2**SEG_BITS],
  output logic signed [ERR_W-1:0] e_isb [2**SEG_BITS],
  output logic signed [ERR_W-1:0] e_lsb [2**SEG_BITS],
  output logic signed [23:0]      alpha
);

  localparam int unsigned NSEG = 2 ** SEG_BITS;
  localparam int unsigned NU   = 3 * NSEG;      // unknowns
  localparam int unsigned UW   = $clog2(NU);
  localparam int unsigned AW   = 16;            // normal-matrix entry
  localparam int unsigned XW   = 32;            // unknown, Q16
  localparam int unsigned XF   = 16;            // fraction bits of x and alpha
  localparam int unsigned RCW  = 26;            // reciprocal width
  localparam int unsigned RCSH = 24;            // reciprocal = 2^RCSH / A[u][u]
  localparam int unsigned DW   = 48;            // divider width
  localparam logic [ADC_BITS-1:0] CODE_MAX = '1;

  // Clocks from the start pulse to done (for testbenches and documentation).
  localparam longint LATENCY = 1 + NU*NU + longint'(N_SAMPLES) * 39
                             + (DW + 2) * (NU + 1) + longint'(GS_SWEEPS) * NU * (NU + 1);

  typedef enum logic [3:0] {
    S_IDLE, S_CLR, S_RD1, S_RD2, S_LOAD, S_ACC, S_ADIV, S_ADIV_W, S_RDIV, S_RDIV_W,
    S_GS_ACC, S_GS_UPD
  } state_e;

  state_e state;

  // ---- storage ----
  logic signed [AW-1:0] amat [NU*NU];           // normal matrix A
  logic signed [15:0]   s1   [NU];              // sum of row entries
  logic signed [31:0]   s2   [NU];              // sum of row entries * (C2-C1)
  logic signed [XW-1:0] x    [NU];              // solution, Q16 LSB
  logic [RCW-1:0]       recip[NU];
  logic signed [31:0]   sum_d;
  logic [15:0]          n_used;
  logic signed [XW-1:0] alpha_q;                // Q16

  // ---- counters ----
  logic [DAC_BITS-1:0]        k;
  logic [$clog2(NU*NU)-1:0]   clr_idx;
  logic [2:0]                 p, q;
  logic [UW-1:0]              u, i;
  logic [$clog2(GS_SWEEPS+1)-1:0] sweep;
  logic signed [63:0]         acc;

  // ---- current pair ----
  logic [ADC_BITS-1:0] c1, c2;
  logic                usable;
  logic [UW-1:0]       nz_idx [6];
  logic                nz_neg [6];
  logic                nz_val [6];
  logic [UW-1:0]       ld_idx [6];
  logic                ld_neg [6];
  logic                ld_val [6];

  assign c2     = mem_rdata[ADC_BITS-1:0];
  assign usable = (c1 != '0) && (c2 != '0) && (c1 != CODE_MAX) && (c2 != CODE_MAX);

  // Non-zero entries of the row for (c1, c2): +1 at C2's segment, -1 at C1's.
  always_comb begin
    for (int l = 0; l < 3; l++) begin
      logic [SEG_BITS-1:0] g1, g2;
      g1 = c1[ADC_BITS-1-SEG_BITS*l -: SEG_BITS];
      g2 = c2[ADC_BITS-1-SEG_BITS*l -: SEG_BITS];
      ld_idx[2*l]   = UW'(NSEG*l) + UW'(g2);
      ld_neg[2*l]   = 1'b0;
      ld_val[2*l]   = usable && (g1 != g2);
      ld_idx[2*l+1] = UW'(NSEG*l) + UW'(g1);
      ld_neg[2*l+1] = 1'b1;
      ld_val[2*l+1] = usable && (g1 != g2);
    end
  end

  // ---- divider (alpha average and diagonal reciprocals) ----
  logic          div_start, div_busy, div_done;
  logic [DW-1:0] div_n, div_q;
  logic [31:0]   div_d;
  logic          sum_neg;
  assign sum_neg = sum_d < 0;

  always_comb begin
    div_start = (state == S_ADIV) || (state == S_RDIV);
    if (state == S_ADIV) begin
      div_n = DW'(sum_neg ? -sum_d : sum_d) << XF;
      div_d = 32'(n_used);
    end else begin
      div_n = DW'(1) << RCSH;
      div_d = 32'(unsigned'(amat[u*NU + u]));
    end
  end

  serial_div #(.WN(DW), .WD(32)) u_div (
    .clk, .rst_n, .start(div_start), .dividend(div_n), .divisor(div_d),
    .busy(div_busy), .done(div_done), .quotient(div_q)
  );

  // ---- Gauss-Seidel arithmetic ----
  logic signed [63:0]  b_u, res;
  logic signed [95:0]  upd;
  always_comb begin
    b_u = 64'(alpha_q) * 64'(s1[u]) - (64'(s2[u]) <<< XF);
    res = b_u - acc;
    upd = (96'(res) * 96'(signed'({1'b0, recip[u]}))) >>> RCSH;
  end

  // ---- memory requests ----
  always_comb begin
    mem_req = MEM_IDLE;
    if (state == S_RD1) begin
      mem_req.en   = 1'b1;
      mem_req.addr = mem_addr(REG_CAP1, k);
    end else if (state == S_RD2) begin
      mem_req.en   = 1'b1;
      mem_req.addr = mem_addr(REG_CAP2, k);
    end
  end

  assign busy  = (state != S_IDLE);
  assign alpha = 24'(alpha_q >>> (XF - ERR_FRAC));
  always_comb
    for (int s = 0; s < NSEG; s++) begin
      e_msb[s] = ERR_W'(x[s]          >>> (XF - ERR_FRAC));
      e_isb[s] = ERR_W'(x[NSEG + s]   >>> (XF - ERR_FRAC));
      e_lsb[s] = ERR_W'(x[2*NSEG + s] >>> (XF - ERR_FRAC));
    end

  // normal matrix: one entry written per clock
  always_ff @(posedge clk) begin
    if (state == S_CLR)
      amat[clr_idx] <= '0;
    else if (state == S_ACC && nz_val[p] && nz_val[q])
      amat[nz_idx[p]*NU + nz_idx[q]] <= amat[nz_idx[p]*NU + nz_idx[q]]
                                        + ((nz_neg[p] == nz_neg[q]) ? AW'(1) : -AW'(1));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      done    <= 1'b0;
      k       <= '0;
      clr_idx <= '0;
      p       <= '0;
      q       <= '0;
      u       <= '0;
      i       <= '0;
      sweep   <= '0;
      acc     <= '0;
      c1      <= '0;
      sum_d   <= '0;
      n_used  <= '0;
      alpha_q <= '0;
      for (int j = 0; j < 6; j++) begin
        nz_idx[j] <= '0;
        nz_neg[j] <= 1'b0;
        nz_val[j] <= 1'b0;
      end
      for (int j = 0; j < NU; j++) begin
        s1[j]    <= '0;
        s2[j]    <= '0;
        x[j]     <= '0;
        recip[j] <= '0;
      end
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          state   <= S_CLR;
          clr_idx <= '0;
          k       <= '0;
          sum_d   <= '0;
          n_used  <= '0;
          for (int j = 0; j < NU; j++) begin
            s1[j] <= '0;
            s2[j] <= '0;
            x[j]  <= '0;
          end
        end
        S_CLR: begin
          clr_idx <= clr_idx + 1'b1;
          if (32'(clr_idx) == NU*NU - 1) state <= S_RD1;
        end
        S_RD1: state <= S_RD2;
        S_RD2: begin
          c1    <= mem_rdata[ADC_BITS-1:0];
          state <= S_LOAD;
        end
        S_LOAD: begin
          logic signed [15:0] d;
          d = 16'(c2) - 16'(c1);
          if (usable) begin
            sum_d  <= sum_d + 32'(d);
            n_used <= n_used + 1'b1;
          end
          for (int j = 0; j < 6; j++) begin
            nz_idx[j] <= ld_idx[j];
            nz_neg[j] <= ld_neg[j];
            nz_val[j] <= ld_val[j];
            if (ld_val[j]) begin
              s1[ld_idx[j]] <= s1[ld_idx[j]] + (ld_neg[j] ? -16'sd1 : 16'sd1);
              s2[ld_idx[j]] <= s2[ld_idx[j]] + (ld_neg[j] ? -32'(d) : 32'(d));
            end
          end
          p     <= '0;
          q     <= '0;
          state <= S_ACC;
        end
        S_ACC: begin
          if (q == 3'd5) begin
            q <= '0;
            if (p == 3'd5) begin
              p <= '0;
              if (32'(k) == N_SAMPLES - 1) begin
                k     <= '0;
                state <= S_ADIV;
              end else begin
                k     <= k + 1'b1;
                state <= S_RD1;
              end
            end else begin
              p <= p + 1'b1;
            end
          end else begin
            q <= q + 1'b1;
          end
        end
        S_ADIV: state <= S_ADIV_W;
        S_ADIV_W: if (div_done) begin
          alpha_q <= sum_neg ? -XW'(div_q) : XW'(div_q);
          u       <= '0;
          state   <= S_RDIV;
        end
        S_RDIV: state <= S_RDIV_W;
        S_RDIV_W: if (div_done) begin
          recip[u] <= (amat[u*NU + u] == '0) ? '0 : RCW'(div_q);
          if (32'(u) == NU - 1) begin
            u     <= '0;
            i     <= '0;
            acc   <= '0;
            sweep <= '0;
            state <= S_GS_ACC;
          end else begin
            u     <= u + 1'b1;
            state <= S_RDIV;
          end
        end
        S_GS_ACC: begin
          acc <= acc + 64'(amat[u*NU + i]) * 64'(x[i]);
          if (32'(i) == NU - 1) begin
            i     <= '0;
            state <= S_GS_UPD;
          end else begin
            i <= i + 1'b1;
          end
        end
        S_GS_UPD: begin
          x[u]  <= x[u] + XW'(upd);
          acc   <= '0;
          state <= S_GS_ACC;
          if (32'(u) == NU - 1) begin
            u <= '0;
            if (32'(sweep) == GS_SWEEPS - 1) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end else begin
              sweep <= sweep + 1'b1;
            end
          end else begin
            u <= u + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
