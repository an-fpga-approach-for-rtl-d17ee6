// tb_bet_metric: self-checking testbench of bet_metric. Runs the worked example
// (beta = 0.1, r(t) = 10, R(t-1) = 5, giving R(t) = 9.5 and m_bet = 0.1053),
// then random parameter sets compared with the BET formula evaluated in real
// arithmetic on the same quantized inputs, a zero average throughput, and the
// 4 + FX_W + FX_F + 3 clock latency.
module tb_bet_metric;
  import fx_pkg::*;
  import tb_pkg::*;

  localparam int LAT = 4 + FX_W + FX_F + 3;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, busy, done, div_by_zero;
  fx_t  user_rate, beta, past_tput, m_bet, r_avg;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  bet_metric dut (.*);

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(real r, real b, real past, output real m, output real ravg);
    int lat;
    real exp_ravg, exp_m, qr, qb, qp;
    user_rate = r2fx(r); beta = r2fx(b); past_tput = r2fx(past);
    qr = fx2r(user_rate); qb = fx2r(beta); qp = fx2r(past_tput);
    exp_ravg = qb * qp + (1.0 - qb) * qr;
    exp_m    = 1.0 / exp_ravg;
    start = 1'b1;
    @(posedge clk); #1;
    start = 1'b0;
    lat = 1;
    while (!done) begin @(posedge clk); #1; lat++; end
    m = fx2r(m_bet); ravg = fx2r(r_avg);
    checks++;
    if (rabs(ravg - exp_ravg) > 4.0 * LSB) begin
      failures++; $display("FAIL bet R(t) %.10f expected %.10f", ravg, exp_ravg);
    end
    checks++;
    if (rabs(m - exp_m) > 1e-7 * rabs(exp_m) + 4.0 * LSB) begin
      failures++; $display("FAIL bet m %.10f expected %.10f", m, exp_m);
    end
    checks++;
    if (lat != LAT) begin failures++; $display("FAIL bet latency %0d expected %0d", lat, LAT); end
    checks++;
    if (div_by_zero) begin failures++; $display("FAIL bet unexpected div_by_zero"); end
  endtask

  initial begin
    real m, ravg;
    user_rate = '0; beta = '0; past_tput = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    // Worked example: the model shows 0.1053.
    run(10.0, 0.1, 5.0, m, ravg);
    checks++;
    if (rabs(m - 0.1053) > 0.00005) begin failures++; $display("FAIL bet example %.6f", m); end
    for (int i = 0; i < 40; i++) begin
      run(urand(0.1, 100.0), urand(0.0, 1.0), urand(0.1, 100.0), m, ravg);
    end
    // Zero throughput history and rate: division by zero is flagged.
    user_rate = '0; beta = r2fx(0.5); past_tput = '0;
    start = 1'b1;
    @(posedge clk); #1;
    start = 1'b0;
    while (!done) begin @(posedge clk); #1; end
    checks++;
    if (!div_by_zero || m_bet != FX_MAX) begin failures++; $display("FAIL bet zero average"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
