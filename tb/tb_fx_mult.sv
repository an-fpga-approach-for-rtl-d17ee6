// tb_fx_mult: self-checking testbench of fx_mult. Random operands, products
// compared with real arithmetic to within one LSB, saturation at both ends
// and the one-clock latency checked.
module tb_fx_mult;
  import fx_pkg::*;
  import tb_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, out_valid;
  fx_t  a, b, p;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  fx_mult dut (.*);

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(real ra, real rb, real expect_r);
    int lat;
    a = r2fx(ra); b = r2fx(rb);
    in_valid = 1'b1;
    @(posedge clk); #1;
    in_valid = 1'b0;
    lat = 1;
    while (!out_valid) begin @(posedge clk); #1; lat++; end
    checks++;
    if (rabs(fx2r(p) - expect_r) > 1.5 * LSB + rabs(expect_r) * 1e-12) begin
      failures++;
      $display("FAIL mult %f * %f = %f, expected %f", ra, rb, fx2r(p), expect_r);
    end
    checks++;
    if (lat != 1) begin failures++; $display("FAIL mult latency %0d", lat); end
  endtask

  initial begin
    a = '0; b = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    run(0.9, 0.01, 0.009);
    run(10.0, 0.9, 10.0 * fx2r(r2fx(0.9)));
    run(0.1, 5.0, fx2r(r2fx(0.1)) * 5.0);
    run(-3.25, 2.5, -8.125);
    for (int i = 0; i < 200; i++) begin
      real x, y;
      x = urand(-150.0, 150.0);
      y = urand(-150.0, 150.0);
      run(fx2r(r2fx(x)), fx2r(r2fx(y)), fx2r(r2fx(x)) * fx2r(r2fx(y)));
    end
    // Saturation
    run(1000.0, 1000.0, fx2r(FX_MAX));
    run(-1000.0, 1000.0, fx2r(FX_MIN));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
