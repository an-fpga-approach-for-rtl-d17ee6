// tb_exp_bet_top: end-to-end testbench of exp_bet_top at its default
// parameters. Parameters go in as IEEE-754 doubles and both metrics come back
// as doubles. It runs the worked example (expecting 12.62 and 0.1053), random
// user parameter sets against the two formulas in real arithmetic, and cases
// that exercise each mechanism of the design: gateway rounding of inexact
// inputs, gateway saturation of an out-of-range input, a division by zero, an
// overflowing exponential and back-to-back operations (start in the cycle
// after done). Each mechanism is counted and must occur at least once. The
// latency from start to done (228 clocks at the default format) is checked.
module tb_exp_bet_top;
  import fx_pkg::*;
  import tb_pkg::*;

  localparam int LAT = 2 * (FX_W + FX_F + 3) + (FX_W + FX_F + 1) / 2 + 12 + 9 + 1;

  logic        clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [63:0] max_delay, hol_delay, sum_hol, rt_flows, spec_eff, beta, user_rate, past_tput;
  logic        busy, done, div_by_zero, exp_ovf;
  logic [63:0] m_exp, m_bet;
  fx_t         m_exp_fx, m_bet_fx, avg_hol_fx, exp_arg_fx, r_avg_fx;
  logic [7:0]  in_sat;
  int          checks = 0, failures = 0;
  int          n_round = 0, n_sat = 0, n_dz = 0, n_ovf = 0, n_b2b = 0, n_ops = 0;

  always #5 clk = ~clk;

  exp_bet_top dut (.*);

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Value that the gateway should deliver for a double: nearest fx_t, clipped.
  function automatic real gw(real v);
    if (v >= fx2r(FX_MAX)) return fx2r(FX_MAX);
    if (v <= fx2r(FX_MIN)) return fx2r(FX_MIN);
    return fx2r(r2fx(v));
  endfunction

  function automatic bit inexact(real v);
    return gw(v) != v;
  endfunction

  task automatic check_close(string what, real got, real want, real rel, real abs_tol);
    checks++;
    if (rabs(got - want) > rel * rabs(want) + abs_tol) begin
      failures++;
      $display("FAIL %s = %.10f, expected %.10f", what, got, want);
    end
  endtask

  // One operation. b2b: start right after the previous done, without idling.
  task automatic run(real tau, real d, real dsum, real nrt, real g,
                     real b, real r, real past, bit b2b,
                     output real me, output real mb);
    int  lat;
    real qt, qd, qs, qn, qg, qb, qr, qp, e_arg, e_exp, e_bet;
    bit  expect_dz, expect_ovf;
    max_delay = $realtobits(tau); hol_delay = $realtobits(d); sum_hol = $realtobits(dsum);
    rt_flows = $realtobits(nrt); spec_eff = $realtobits(g); beta = $realtobits(b);
    user_rate = $realtobits(r); past_tput = $realtobits(past);
    qt = gw(tau); qd = gw(d); qs = gw(dsum); qn = gw(nrt); qg = gw(g);
    qb = gw(b); qr = gw(r); qp = gw(past);
    if (inexact(tau) || inexact(d) || inexact(dsum) || inexact(b)) n_round++;
    if (!b2b) begin @(posedge clk); #1; end
    else n_b2b++;
    checks++;
    if (busy) begin failures++; $display("FAIL top busy before start"); end
    start = 1'b1;
    @(posedge clk); #1;
    start = 1'b0;
    lat = 1;
    while (!done) begin @(posedge clk); #1; lat++; end
    n_ops++;
    me = $bitstoreal(m_exp);
    mb = $bitstoreal(m_bet);
    // The double outputs must equal the fixed-point results.
    checks++;
    if (me != fx2r(m_exp_fx) || mb != fx2r(m_bet_fx)) begin
      failures++; $display("FAIL top gateway out mismatch");
    end
    expect_dz  = (qn == 0.0) || (qt == 0.0) || (qb * qp + (1.0 - qb) * qr == 0.0);
    if (!expect_dz) begin
      // A zero divisor answers early, so the latency is checked only without one.
      checks++;
      if (lat != LAT) begin failures++; $display("FAIL top latency %0d expected %0d", lat, LAT); end
      e_arg = (5.0 / (0.99 * qt)) * qd / (1.0 + $sqrt(qs / qn));
      e_exp = qg * $exp(e_arg);
      expect_ovf = e_arg > (FX_W - FX_F - 1) * 0.6931471805599453;
      e_bet = 1.0 / (qb * qp + (1.0 - qb) * qr);
      if (!expect_ovf) check_close("m_exp", me, e_exp, 1e-6, 32.0 * LSB);
      else begin
        checks++;
        if (!exp_ovf || m_exp_fx != FX_MAX) begin failures++; $display("FAIL top exp overflow"); end
      end
      check_close("m_bet", mb, e_bet, 1e-7, 4.0 * LSB);
    end else begin
      checks++;
      if (!div_by_zero) begin failures++; $display("FAIL top div_by_zero not raised"); end
    end
    if (div_by_zero) n_dz++;
    if (exp_ovf) n_ovf++;
    if (in_sat != '0) n_sat++;
  endtask

  initial begin
    real me, mb;
    max_delay = '0; hol_delay = '0; sum_hol = '0; rt_flows = '0;
    spec_eff = '0; beta = '0; user_rate = '0; past_tput = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;

    // Worked example of the EXP-BET parameter table.
    run(0.01, 0.003, 0.03, 10.0, 3.0, 0.1, 10.0, 5.0, 0, me, mb);
    check_close("example m_exp", me, 12.62, 0.0, 0.005);
    check_close("example m_bet", mb, 0.1053, 0.0, 0.00005);
    checks++;
    if (in_sat != '0 || div_by_zero || exp_ovf) begin failures++; $display("FAIL example flags"); end

    // Random users, some started back to back.
    for (int i = 0; i < 12; i++) begin
      real tau, n;
      tau = urand(0.005, 0.5);
      n   = real'($urandom_range(1, 50));
      run(tau, urand(0.0, tau), n * urand(0.0, tau), n, urand(0.1, 6.0),
          urand(0.0, 1.0), urand(0.1, 1000.0), urand(0.1, 1000.0), i % 3 == 2, me, mb);
    end

    // Gateway saturation: a data rate beyond the fixed-point range.
    run(0.01, 0.003, 0.03, 10.0, 3.0, 0.1, 1.0e6, 5.0, 0, me, mb);
    checks++;
    if (in_sat != 8'b0100_0000) begin failures++; $display("FAIL top in_sat %b", in_sat); end

    // Division by zero: no real-time flows.
    run(0.01, 0.003, 0.03, 0.0, 3.0, 0.1, 10.0, 5.0, 1, me, mb);

    // Exponential overflow: HoL delay three times the allowed delay.
    run(0.01, 0.03, 0.03, 10.0, 3.0, 0.1, 10.0, 5.0, 0, me, mb);

    $display("mechanisms: rounding=%0d saturation=%0d div_by_zero=%0d exp_overflow=%0d back_to_back=%0d ops=%0d",
             n_round, n_sat, n_dz, n_ovf, n_b2b, n_ops);
    checks++; if (n_round == 0) begin failures++; $display("FAIL no gateway rounding seen"); end
    checks++; if (n_sat == 0)   begin failures++; $display("FAIL no gateway saturation seen"); end
    checks++; if (n_dz == 0)    begin failures++; $display("FAIL no division by zero seen"); end
    checks++; if (n_ovf == 0)   begin failures++; $display("FAIL no exponential overflow seen"); end
    checks++; if (n_b2b == 0)   begin failures++; $display("FAIL no back-to-back operation seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
