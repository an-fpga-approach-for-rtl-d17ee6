// tb_gateway_out: self-checking testbench of gateway_out. Random fixed-point
// words of every magnitude, and the extremes, are converted and the double is
// compared exactly with the word's value computed in real arithmetic.
module tb_gateway_out;
  import fx_pkg::*;
  import tb_pkg::*;

  fx_t         q;
  logic [63:0] d;
  int          checks = 0, failures = 0;

  gateway_out dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(fx_t v);
    q = v;
    #1;
    checks++;
    if ($bitstoreal(d) != fx2r(v) || (v == FX_ZERO && d != 64'd0)) begin
      failures++;
      $display("FAIL gateway_out %h -> %g, expected %g", v, $bitstoreal(d), fx2r(v));
    end
  endtask

  initial begin
    run(FX_ZERO); run(FX_ONE); run(-FX_ONE); run(FX_MAX); run(FX_MIN);
    run(fx_t'(1)); run(fx_t'(-1));
    run(r2fx(12.62)); run(r2fx(0.1053));
    for (int i = 0; i < 400; i++) begin
      fx_t v;
      v = fx_t'({$urandom, $urandom}) >>> $urandom_range(0, FX_W - 1);
      run(v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
