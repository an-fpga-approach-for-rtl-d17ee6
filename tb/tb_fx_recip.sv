// tb_fx_recip: self-checking testbench of fx_recip. Reciprocals, including the
// BET value 1/9.5, compared with real arithmetic to within one LSB; zero
// operand and latency checked.
module tb_fx_recip;
  import fx_pkg::*;
  import tb_pkg::*;

  localparam int LAT = FX_W + FX_F + 3;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, busy, out_valid, div_by_zero;
  fx_t  a, r;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  fx_recip dut (.*);

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(real ra, real expect_r, int expect_lat, bit expect_dz);
    int lat;
    a = r2fx(ra);
    in_valid = 1'b1;
    @(posedge clk); #1;
    in_valid = 1'b0;
    lat = 1;
    while (!out_valid) begin @(posedge clk); #1; lat++; end
    checks++;
    if (rabs(fx2r(r) - expect_r) > 1.01 * LSB + rabs(expect_r) * 1e-12) begin
      failures++;
      $display("FAIL recip 1/%f = %.12f, expected %.12f", ra, fx2r(r), expect_r);
    end
    checks++;
    if (lat != expect_lat) begin failures++; $display("FAIL recip latency %0d", lat); end
    checks++;
    if (div_by_zero != expect_dz) begin failures++; $display("FAIL recip div_by_zero flag"); end
  endtask

  initial begin
    a = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    run(9.5, 1.0 / 9.5, LAT, 0);
    run(-4.0, -0.25, LAT, 0);
    for (int i = 0; i < 40; i++) begin
      real x;
      x = fx2r(r2fx(urand(0.01, 1000.0)));
      if (i % 2 == 1) x = -x;
      run(x, 1.0 / x, LAT, 0);
    end
    run(0.0, fx2r(FX_MAX), 1, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
