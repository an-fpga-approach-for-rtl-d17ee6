// fx_exp: sequential fixed-point exponential, the "Exponential" block of the
// EXP-rule datapath.
//
// Range reduction: x = k*ln2 + r with k = floor(x / ln2), found by multiplying
// with the constant 1/ln2, and 0 <= r < ln2. exp(r) is then evaluated as a
// Taylor series of N_TERMS terms in Horner form, one term per clock:
//   p <- 1 + (r * p) * (1/n),   n = N_TERMS down to 1, starting from p = 1,
// where the constants 1/n are formed at elaboration as floor(2^FX_F / n).
// Finally exp(x) = p * 2^k by shifting (a right shift rounds to nearest). An
// x so large that the result leaves the fx_t range saturates to FX_MAX and
// raises ovf; a very negative x gives 0.
//
// Timing: in_valid is accepted when busy is low; the result appears
// N_TERMS + 3 clocks after in_valid with a one-cycle out_valid pulse and held until the
// next operation. The function is the source model's; the method, the number
// of terms and the latency are this design's choices.
module fx_exp
  import fx_pkg::*;
#(
  parameter int unsigned N_TERMS = 12
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  fx_t  x,
  output logic busy,
  output logic out_valid,
  output fx_t  y,
  output logic ovf
);

  localparam fx_t INV_LN2 = fx_from_real(1.4426950408889634);
  localparam fx_t LN2     = fx_from_real(0.6931471805599453);
  localparam int  K_MAX   = int'(FX_W - FX_F) - 2;   // largest k with p * 2^k in range
  localparam int  K_MIN   = -int'(FX_F) - 2;         // below this the result rounds to 0
  localparam int  CW      = $clog2(N_TERMS + 1);

  typedef enum logic [1:0] {S_IDLE, S_REDUCE, S_SERIES, S_SCALE} state_e;

  // 1/n for n = 1 .. N_TERMS, fixed at elaboration.
  fx_t inv_n [1:N_TERMS];
  for (genvar n = 1; n <= N_TERMS; n++) begin : g_inv
    assign inv_n[n] = fx_t'((64'sd1 <<< FX_F) / n);
  end

  state_e        state;
  fx_t           xq, r, p;
  int            k;
  logic [CW-1:0] n_q;

  fx_wide_t t_full, k_ln2, r_full, rp, term, p_next;
  int       k_next;
  fx_t      p_scaled;
  int       sh;

  always_comb begin
    // Range reduction.
    t_full = fx_wide_t'(xq) * fx_wide_t'(INV_LN2);
    k_next = int'(t_full >>> (2 * FX_F));
    k_ln2  = fx_wide_t'(k_next) * fx_wide_t'(LN2);
    r_full = fx_wide_t'(xq) - k_ln2;
    // One Horner step.
    rp     = (fx_wide_t'(r) * fx_wide_t'(p) + (fx_wide_t'(1) <<< (FX_F - 1))) >>> FX_F;
    term   = (rp * fx_wide_t'(inv_n[n_q]) + (fx_wide_t'(1) <<< (FX_F - 1))) >>> FX_F;
    p_next = fx_wide_t'(FX_ONE) + term;
    // Scaling by 2^k.
    sh = 0;
    if (k >= 0) begin
      p_scaled = p <<< k;
    end else begin
      sh       = -k;
      p_scaled = fx_t'((fx_wide_t'(p) + (fx_wide_t'(1) <<< (sh - 1))) >>> sh);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      busy      <= 1'b0;
      out_valid <= 1'b0;
      y         <= FX_ZERO;
      ovf       <= 1'b0;
      xq        <= FX_ZERO;
      r         <= FX_ZERO;
      p         <= FX_ZERO;
      k         <= 0;
      n_q       <= '0;
    end else begin
      out_valid <= 1'b0;
      unique case (state)
        S_IDLE: if (in_valid) begin
          xq    <= x;
          busy  <= 1'b1;
          state <= S_REDUCE;
        end
        S_REDUCE: begin
          k     <= k_next;
          r     <= fx_t'(r_full);
          p     <= FX_ONE;
          n_q   <= CW'(N_TERMS);
          state <= S_SERIES;
        end
        S_SERIES: begin
          p   <= fx_sat(p_next);
          n_q <= n_q - 1'b1;
          if (n_q == CW'(1)) state <= S_SCALE;
        end
        S_SCALE: begin
          if (k > K_MAX) begin
            y   <= FX_MAX;
            ovf <= 1'b1;
          end else if (k < K_MIN) begin
            y   <= FX_ZERO;
            ovf <= 1'b0;
          end else begin
            y   <= p_scaled;
            ovf <= 1'b0;
          end
          busy      <= 1'b0;
          out_valid <= 1'b1;
          state     <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
