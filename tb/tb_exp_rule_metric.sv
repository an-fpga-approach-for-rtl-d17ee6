// tb_exp_rule_metric: self-checking testbench of exp_rule_metric. Runs the
// worked example (tau = 0.01, D = 0.003, Dsum = 0.03, N_RT = 10, G = 3,
// giving m_exp = 12.62), then random parameter sets compared with the EXP
// formula evaluated in real arithmetic on the same quantized inputs, and the
// latency of 227 clocks at the default format.
module tb_exp_rule_metric;
  import fx_pkg::*;
  import tb_pkg::*;

  localparam int unsigned N_TERMS = 12;
  localparam int LAT = 2 * (FX_W + FX_F + 3) + (FX_W + FX_F + 1) / 2 + N_TERMS + 9;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, busy, done, div_by_zero, exp_ovf;
  fx_t  max_delay, hol_delay, rt_flows, sum_hol, spec_eff, m_exp, avg_hol, exp_arg;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  exp_rule_metric dut (.*);

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(real tau, real d, real dsum, real nrt, real g, output real m);
    int lat;
    real qt, qd, qs, qn, qg, e_avg, e_arg, e_m;
    max_delay = r2fx(tau); hol_delay = r2fx(d); sum_hol = r2fx(dsum);
    rt_flows = r2fx(nrt); spec_eff = r2fx(g);
    qt = fx2r(max_delay); qd = fx2r(hol_delay); qs = fx2r(sum_hol);
    qn = fx2r(rt_flows); qg = fx2r(spec_eff);
    e_avg = qs / qn;
    e_arg = (5.0 / (0.99 * qt)) * qd / (1.0 + $sqrt(e_avg));
    e_m   = qg * $exp(e_arg);
    start = 1'b1;
    @(posedge clk); #1;
    start = 1'b0;
    lat = 1;
    while (!done) begin @(posedge clk); #1; lat++; end
    m = fx2r(m_exp);
    checks++;
    if (rabs(fx2r(avg_hol) - e_avg) > 1e-7 * e_avg + 4.0 * LSB) begin
      failures++; $display("FAIL exp avg %.10f expected %.10f", fx2r(avg_hol), e_avg);
    end
    checks++;
    if (rabs(fx2r(exp_arg) - e_arg) > 1e-6 * e_arg + 16.0 * LSB) begin
      failures++; $display("FAIL exp arg %.10f expected %.10f", fx2r(exp_arg), e_arg);
    end
    checks++;
    if (rabs(m - e_m) > 1e-6 * e_m + 16.0 * LSB) begin
      failures++; $display("FAIL exp m %.10f expected %.10f", m, e_m);
    end
    checks++;
    if (lat != LAT) begin failures++; $display("FAIL exp latency %0d expected %0d", lat, LAT); end
    checks++;
    if (div_by_zero || exp_ovf) begin failures++; $display("FAIL exp unexpected flag"); end
  endtask

  initial begin
    real m;
    max_delay = '0; hol_delay = '0; rt_flows = '0; sum_hol = '0; spec_eff = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    // Worked example: the model shows 12.62.
    run(0.01, 0.003, 0.03, 10.0, 3.0, m);
    checks++;
    if (rabs(m - 12.62) > 0.005) begin failures++; $display("FAIL exp example %.6f", m); end
    for (int i = 0; i < 25; i++) begin
      real tau, n;
      tau = urand(0.005, 0.5);
      n   = real'($urandom_range(1, 50));
      run(tau, urand(0.0, tau), n * urand(0.0, tau), n, urand(0.1, 6.0), m);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
