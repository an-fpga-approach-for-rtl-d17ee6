// exp_bet_top: EXP-BET scheduling-metric engine.
//
// An LTE downlink scheduler ranks users per resource block by a metric. The
// EXP-BET scheduler combines the exponential rule (EXP), which favours
// real-time flows whose head-of-line delay approaches their deadline, and
// Blind Equal Throughput (BET), which favours users whose average throughput
// is low. This top computes both metrics for one user from its parameters:
//   m_exp = G * exp( a * D / (1 + sqrt(Dsum / N_RT)) ),   a = 5 / (0.99 * tau)
//   m_bet = 1 / (beta * R(t-1) + (1 - beta) * r(t))
// Every parameter enters as an IEEE-754 double through a Gateway In block
// (gateway_in: rounding, saturation) into the Q15.32 fixed-point datapaths
// exp_rule_metric and bet_metric, which run side by side; both metrics leave
// through Gateway Out blocks (gateway_out) as doubles again, and are also
// available in fixed point.
//
// Interface and timing: start (accepted when busy is low) samples all eight
// inputs. The two metrics are computed concurrently; done pulses for one clock
// once both are valid (the EXP side is the longer one, about 225 clocks at the
// default format) and the outputs hold until the next start. in_sat flags,
// per input, a value clipped by its gateway (bit order: max_delay, hol_delay,
// sum_hol, rt_flows, spec_eff, beta, user_rate, past_tput from bit 0 up).
// The block structure and the constants follow the source model; the number
// format, the handshake and the latencies are this design's choices.
module exp_bet_top
  import fx_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  // EXP rule parameters (IEEE-754 doubles)
  input  logic [63:0] max_delay,    // tau, maximum allowable delay
  input  logic [63:0] hol_delay,    // D, head-of-line delay
  input  logic [63:0] sum_hol,      // sum of HoL delays of the real-time flows
  input  logic [63:0] rt_flows,     // N_RT, active real-time flows
  input  logic [63:0] spec_eff,     // G, spectral efficiency
  // BET parameters (IEEE-754 doubles)
  input  logic [63:0] beta,         // averaging weight
  input  logic [63:0] user_rate,    // r(t), achievable data rate
  input  logic [63:0] past_tput,    // R(t-1), past average throughput
  // results
  output logic        busy,
  output logic        done,
  output logic [63:0] m_exp,        // EXP metric, double
  output logic [63:0] m_bet,        // BET metric, double
  output fx_t         m_exp_fx,
  output fx_t         m_bet_fx,
  output fx_t         avg_hol_fx,   // average HoL delay Dsum / N_RT
  output fx_t         exp_arg_fx,   // argument of the exponential
  output fx_t         r_avg_fx,     // new average throughput R(t)
  output logic [7:0]  in_sat,
  output logic        div_by_zero,
  output logic        exp_ovf
);

  typedef enum int {
    IN_MAX_DELAY, IN_HOL_DELAY, IN_SUM_HOL, IN_RT_FLOWS,
    IN_SPEC_EFF, IN_BETA, IN_USER_RATE, IN_PAST_TPUT, IN_COUNT
  } in_idx_e;

  logic [63:0] dbl_in [IN_COUNT];
  fx_t         fx_in  [IN_COUNT];

  assign dbl_in[IN_MAX_DELAY] = max_delay;
  assign dbl_in[IN_HOL_DELAY] = hol_delay;
  assign dbl_in[IN_SUM_HOL]   = sum_hol;
  assign dbl_in[IN_RT_FLOWS]  = rt_flows;
  assign dbl_in[IN_SPEC_EFF]  = spec_eff;
  assign dbl_in[IN_BETA]      = beta;
  assign dbl_in[IN_USER_RATE] = user_rate;
  assign dbl_in[IN_PAST_TPUT] = past_tput;

  logic [7:0] sat_now;

  for (genvar i = 0; i < IN_COUNT; i++) begin : g_gw_in
    gateway_in u_gw_in (.d(dbl_in[i]), .q(fx_in[i]), .sat(sat_now[i]));
  end

  logic exp_busy, exp_done, bet_busy, bet_done, exp_dz, bet_dz, both_done;
  logic go;

  assign go = start && !busy;

  exp_rule_metric u_exp (
    .clk(clk), .rst_n(rst_n), .start(go),
    .max_delay(fx_in[IN_MAX_DELAY]), .hol_delay(fx_in[IN_HOL_DELAY]),
    .rt_flows(fx_in[IN_RT_FLOWS]), .sum_hol(fx_in[IN_SUM_HOL]),
    .spec_eff(fx_in[IN_SPEC_EFF]),
    .busy(exp_busy), .done(exp_done), .m_exp(m_exp_fx),
    .avg_hol(avg_hol_fx), .exp_arg(exp_arg_fx), .div_by_zero(exp_dz), .exp_ovf(exp_ovf)
  );

  bet_metric u_bet (
    .clk(clk), .rst_n(rst_n), .start(go),
    .user_rate(fx_in[IN_USER_RATE]), .beta(fx_in[IN_BETA]),
    .past_tput(fx_in[IN_PAST_TPUT]),
    .busy(bet_busy), .done(bet_done), .m_bet(m_bet_fx),
    .r_avg(r_avg_fx), .div_by_zero(bet_dz)
  );

  fx_join2 u_join_done (
    .clk(clk), .rst_n(rst_n), .clear(go),
    .a_valid(exp_done), .b_valid(bet_done), .fire(both_done)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      done   <= 1'b0;
      in_sat <= '0;
    end else begin
      done <= both_done;
      if (go) begin
        busy   <= 1'b1;
        in_sat <= sat_now;
      end else if (both_done) begin
        busy <= 1'b0;
      end
    end
  end

  assign div_by_zero = exp_dz | bet_dz;

  gateway_out u_gw_exp (.q(m_exp_fx), .d(m_exp));
  gateway_out u_gw_bet (.q(m_bet_fx), .d(m_bet));

  a_units_idle: assert property (@(posedge clk) disable iff (!rst_n)
                                 go |-> !exp_busy && !bet_busy);

endmodule
