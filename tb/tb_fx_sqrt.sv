// tb_fx_sqrt: self-checking testbench of fx_sqrt. Roots, including the
// average HoL delay 0.003 of the EXP example, compared with $sqrt to within
// one LSB; negative operands and the (FX_W + FX_F) / 2 + 2 clock latency
// checked.
module tb_fx_sqrt;
  import fx_pkg::*;
  import tb_pkg::*;

  localparam int LAT = (FX_W + FX_F + 1) / 2 + 2;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, busy, out_valid, neg_in;
  fx_t  a, r;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  fx_sqrt dut (.*);

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(real ra, real expect_r, int expect_lat, bit expect_neg);
    int lat;
    a = r2fx(ra);
    in_valid = 1'b1;
    @(posedge clk); #1;
    in_valid = 1'b0;
    lat = 1;
    while (!out_valid) begin @(posedge clk); #1; lat++; end
    checks++;
    if (rabs(fx2r(r) - expect_r) > 1.01 * LSB) begin
      failures++;
      $display("FAIL sqrt(%f) = %.12f, expected %.12f", ra, fx2r(r), expect_r);
    end
    checks++;
    if (lat != expect_lat) begin failures++; $display("FAIL sqrt latency %0d", lat); end
    checks++;
    if (neg_in != expect_neg) begin failures++; $display("FAIL sqrt neg_in flag"); end
  endtask

  initial begin
    a = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    run(fx2r(r2fx(0.003)), $sqrt(fx2r(r2fx(0.003))), LAT, 0);
    run(4.0, 2.0, LAT, 0);
    run(0.0, 0.0, LAT, 0);
    run(30000.0, $sqrt(30000.0), LAT, 0);
    for (int i = 0; i < 60; i++) begin
      real x;
      x = fx2r(r2fx(urand(0.0, 2000.0)));
      run(x, $sqrt(x), LAT, 0);
    end
    run(-2.0, 0.0, 1, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
