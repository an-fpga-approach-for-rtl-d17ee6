// tb_fx_exp: self-checking testbench of fx_exp. exp(x) over positive and
// negative arguments, including the EXP example's argument near 1.4365,
// compared with $exp to a relative error of 1e-8 (absolute a few LSB for small
// results); overflow saturation, underflow to zero and the N_TERMS + 3 clock
// latency checked.
module tb_fx_exp;
  import fx_pkg::*;
  import tb_pkg::*;

  localparam int unsigned N_TERMS = 12;   // fx_exp default
  localparam int LAT = N_TERMS + 3;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, busy, out_valid, ovf;
  fx_t  x, y;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  fx_exp dut (.*);

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(real rx, real expect_r, bit expect_ovf);
    int lat;
    x = r2fx(rx);
    in_valid = 1'b1;
    @(posedge clk); #1;
    in_valid = 1'b0;
    lat = 1;
    while (!out_valid) begin @(posedge clk); #1; lat++; end
    checks++;
    if (rabs(fx2r(y) - expect_r) > 1e-8 * rabs(expect_r) + 8.0 * LSB) begin
      failures++;
      $display("FAIL exp(%f) = %.12f, expected %.12f", rx, fx2r(y), expect_r);
    end
    checks++;
    if (lat != LAT) begin failures++; $display("FAIL exp latency %0d", lat); end
    checks++;
    if (ovf != expect_ovf) begin failures++; $display("FAIL exp ovf flag"); end
  endtask

  initial begin
    x = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    run(0.0, 1.0, 0);
    run(1.0, 2.718281828459045, 0);
    run(1.43647, $exp(fx2r(r2fx(1.43647))), 0);
    run(-1.0, $exp(-1.0), 0);
    run(10.0, $exp(10.0), 0);
    for (int i = 0; i < 60; i++) begin
      real v;
      v = fx2r(r2fx(urand(-20.0, 10.3)));
      run(v, $exp(v), 0);
    end
    run(11.0, fx2r(FX_MAX), 1);
    run(-40.0, 0.0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
