// tb_fx_div: self-checking testbench of fx_div. Random signed quotients
// compared with real arithmetic to within one LSB, the divisions of the EXP
// datapath, saturation, the zero-divisor rule and the latency of
// FX_W + FX_F + 3 clocks checked.
module tb_fx_div;
  import fx_pkg::*;
  import tb_pkg::*;

  localparam int LAT = FX_W + FX_F + 3;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, busy, out_valid, div_by_zero;
  fx_t  a, b, q;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  fx_div dut (.*);

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(real ra, real rb, real expect_r, int expect_lat, bit expect_dz);
    int lat;
    a = r2fx(ra); b = r2fx(rb);
    in_valid = 1'b1;
    @(posedge clk); #1;
    in_valid = 1'b0;
    lat = 1;
    while (!out_valid) begin @(posedge clk); #1; lat++; end
    checks++;
    if (rabs(fx2r(q) - expect_r) > 1.01 * LSB + rabs(expect_r) * 1e-12) begin
      failures++;
      $display("FAIL div %f / %f = %.12f, expected %.12f", ra, rb, fx2r(q), expect_r);
    end
    checks++;
    if (lat != expect_lat) begin failures++; $display("FAIL div latency %0d", lat); end
    checks++;
    if (div_by_zero != expect_dz) begin failures++; $display("FAIL div_by_zero flag"); end
  endtask

  initial begin
    a = '0; b = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    run(1.0, 10.0, 0.1, LAT, 0);
    run(5.0, fx2r(r2fx(0.0099)), 5.0 / fx2r(r2fx(0.0099)), LAT, 0);
    run(-7.0, 2.0, -3.5, LAT, 0);
    run(7.0, -0.25, -28.0, LAT, 0);
    for (int i = 0; i < 60; i++) begin
      real x, y;
      x = fx2r(r2fx(urand(-500.0, 500.0)));
      y = fx2r(r2fx(urand(0.05, 200.0)));
      if (i % 3 == 1) y = -y;
      run(x, y, x / y, LAT, 0);
    end
    run(20000.0, 0.001, fx2r(FX_MAX), LAT, 0);
    run(-20000.0, 0.001, fx2r(FX_MIN), LAT, 0);
    run(3.0, 0.0, fx2r(FX_MAX), 1, 1);
    run(-3.0, 0.0, fx2r(FX_MIN), 1, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
