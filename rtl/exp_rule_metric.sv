// exp_rule_metric: Exponential-rule (EXP) part of the EXP-BET scheduling metric
//   m_exp = G * exp( a * D / (1 + sqrt(Dsum / N_RT)) ),   a = C2 / (C3 * tau)
// with G the user's spectral efficiency on the resource block, D its
// head-of-line (HoL) delay, tau its maximum allowable delay, Dsum the sum of
// the HoL delays of the N_RT active real-time flows (Dsum / N_RT is their
// average) and C2 = 5, C3 = 0.99 the two constants of the source model.
//
// The datapath follows the source model block by block:
//   Mult3   = C3 * tau              Divide1 = 1 / N_RT
//   Divide2 = C2 / Mult3            Mult2   = Divide1 * Dsum   (average HoL delay)
//   Mult    = Divide2 * D           SquareRoot of Mult2
//                                   AddSub  = SquareRoot + 1
//   Divide      = Mult / AddSub     (joined with fx_join2)
//   Exponential = exp(Divide)
//   Mult1       = Exponential * G = m_exp
// The two branches run concurrently; each block starts on its operands' valid
// pulses.
//
// Interface and timing: start is accepted when busy is low and samples the
// five inputs; done pulses for one clock when m_exp is valid, and m_exp, avg_hol
// and exp_arg are held until the next start. The longest path is
// Divide1 -> Mult2 -> SquareRoot -> AddSub -> Divide -> Exponential -> Mult1,
// and done rises 2 * (FX_W + FX_F + 3) + (FX_W + FX_F + 1) / 2 + N_TERMS + 9
// clocks after the start cycle (227 at the default format). div_by_zero reports a zero divisor in any of the
// three dividers, exp_ovf a saturated exponential. The handshake, the latency
// and the number format are this design's choices.
module exp_rule_metric
  import fx_pkg::*;
#(
  parameter real C2 = 5.0,    // "Constant2", numerator of a
  parameter real C3 = 0.99    // "Constant3", scales the maximum allowable delay
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  fx_t  max_delay,     // tau
  input  fx_t  hol_delay,     // D, head-of-line delay of this user
  input  fx_t  rt_flows,      // N_RT, active real-time flows
  input  fx_t  sum_hol,       // sum of the HoL delays of the N_RT flows
  input  fx_t  spec_eff,      // G, spectral efficiency
  output logic busy,
  output logic done,
  output fx_t  m_exp,
  output fx_t  avg_hol,       // Dsum / N_RT
  output fx_t  exp_arg,       // argument of the exponential
  output logic div_by_zero,
  output logic exp_ovf
);

  localparam fx_t C2_FX = fx_from_real(C2);
  localparam fx_t C3_FX = fx_from_real(C3);

  fx_t  tau_q, hol_q, nrt_q, sum_q, g_q;
  logic go;
  logic busy_q;

  fx_t  mult3_p, div2_q, mult_p, div1_q, sqrt_r, addsub_s, exp_y;
  logic mult3_v, div2_v, mult_v, div1_v, mult2_v, sqrt_v, addsub_v, div_go, div_v, exp_v;
  logic div1_z, div2_z, div_z;
  logic div1_b, div2_b, div_b, sqrt_b, exp_b, sqrt_neg;

  // busy drops in the cycle done is high, so a new start may follow at once.
  assign busy = busy_q && !done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tau_q <= FX_ZERO;
      hol_q <= FX_ZERO;
      nrt_q <= FX_ZERO;
      sum_q <= FX_ZERO;
      g_q   <= FX_ZERO;
      go    <= 1'b0;
      busy_q <= 1'b0;
    end else begin
      go <= start && !busy;
      if (start && !busy) begin
        tau_q <= max_delay;
        hol_q <= hol_delay;
        nrt_q <= rt_flows;
        sum_q <= sum_hol;
        g_q   <= spec_eff;
        busy_q <= 1'b1;
      end else if (done) begin
        busy_q <= 1'b0;
      end
    end
  end

  // Weight branch: a * D.
  fx_mult u_mult3 (
    .clk(clk), .rst_n(rst_n), .in_valid(go),
    .a(C3_FX), .b(tau_q), .out_valid(mult3_v), .p(mult3_p)
  );

  fx_div u_divide2 (
    .clk(clk), .rst_n(rst_n), .in_valid(mult3_v), .a(C2_FX), .b(mult3_p),
    .busy(div2_b), .out_valid(div2_v), .q(div2_q), .div_by_zero(div2_z)
  );

  fx_mult u_mult (
    .clk(clk), .rst_n(rst_n), .in_valid(div2_v),
    .a(div2_q), .b(hol_q), .out_valid(mult_v), .p(mult_p)
  );

  // Denominator branch: 1 + sqrt(Dsum / N_RT).
  fx_div u_divide1 (
    .clk(clk), .rst_n(rst_n), .in_valid(go), .a(FX_ONE), .b(nrt_q),
    .busy(div1_b), .out_valid(div1_v), .q(div1_q), .div_by_zero(div1_z)
  );

  fx_mult u_mult2 (
    .clk(clk), .rst_n(rst_n), .in_valid(div1_v),
    .a(div1_q), .b(sum_q), .out_valid(mult2_v), .p(avg_hol)
  );

  fx_sqrt u_sqrt (
    .clk(clk), .rst_n(rst_n), .in_valid(mult2_v), .a(avg_hol),
    .busy(sqrt_b), .out_valid(sqrt_v), .r(sqrt_r), .neg_in(sqrt_neg)
  );

  fx_addsub u_addsub (
    .clk(clk), .rst_n(rst_n), .in_valid(sqrt_v), .op(OP_ADD),
    .a(sqrt_r), .b(FX_ONE), .out_valid(addsub_v), .s(addsub_s)
  );

  // Merge and exponential.
  fx_join2 u_join_div (
    .clk(clk), .rst_n(rst_n), .clear(go),
    .a_valid(mult_v), .b_valid(addsub_v), .fire(div_go)
  );

  fx_div u_divide (
    .clk(clk), .rst_n(rst_n), .in_valid(div_go), .a(mult_p), .b(addsub_s),
    .busy(div_b), .out_valid(div_v), .q(exp_arg), .div_by_zero(div_z)
  );

  fx_exp u_exp (
    .clk(clk), .rst_n(rst_n), .in_valid(div_v), .x(exp_arg),
    .busy(exp_b), .out_valid(exp_v), .y(exp_y), .ovf(exp_ovf)
  );

  fx_mult u_mult1 (
    .clk(clk), .rst_n(rst_n), .in_valid(exp_v),
    .a(exp_y), .b(g_q), .out_valid(done), .p(m_exp)
  );

  assign div_by_zero = div1_z | div2_z | div_z;

  // Each sequential block is started once per computation and must be idle then.
  a_div2_free: assert property (@(posedge clk) disable iff (!rst_n) mult3_v |-> !div2_b);
  a_div1_free: assert property (@(posedge clk) disable iff (!rst_n) go |-> !div1_b);
  a_sqrt_free: assert property (@(posedge clk) disable iff (!rst_n) mult2_v |-> !sqrt_b);
  a_div_free:  assert property (@(posedge clk) disable iff (!rst_n) div_go |-> !div_b);
  a_exp_free:  assert property (@(posedge clk) disable iff (!rst_n) div_v |-> !exp_b);
  // The average of non-negative delays cannot be negative.
  a_avg_nonneg: assert property (@(posedge clk) disable iff (!rst_n) sqrt_v |-> !sqrt_neg);

endmodule
