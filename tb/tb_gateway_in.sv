// tb_gateway_in: self-checking testbench of gateway_in. Random doubles over
// many magnitudes are converted and compared bit-exactly with the simulator's
// real-to-integer conversion (round to nearest, ties away from zero);
// saturation of large values and infinities, NaN, zero and tiny values are
// checked with the sat flag.
module tb_gateway_in;
  import fx_pkg::*;
  import tb_pkg::*;

  logic [63:0] d;
  fx_t         q;
  logic        sat;
  int          checks = 0, failures = 0;

  gateway_in dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_bits(logic [63:0] bits, fx_t expect_q, bit expect_sat);
    d = bits;
    #1;
    checks++;
    if (q !== expect_q || sat !== expect_sat) begin
      failures++;
      $display("FAIL gateway_in %h -> %h sat=%b, expected %h sat=%b", bits, q, sat, expect_q, expect_sat);
    end
  endtask

  task automatic run(real v);
    run_bits($realtobits(v), r2fx(v), 1'b0);
  endtask

  initial begin
    run(10.0); run(0.1); run(0.01); run(0.003); run(0.03); run(3.0); run(5.0);
    run(-0.1); run(0.0); run(1.0e-12); run(-1.0e-12);
    run(0.5 * LSB); run(-0.5 * LSB); run(1.5 * LSB); run(2.5 * LSB);
    for (int i = 0; i < 400; i++) begin
      real v, scale;
      int  e;
      e = int'($urandom_range(0, 50)) - 36;
      scale = 1.0;
      while (e > 0) begin scale = scale * 2.0; e--; end
      while (e < 0) begin scale = scale / 2.0; e++; end
      v = urand(-1.0, 1.0) * scale;
      run(v);
    end
    run(32767.99);
    run_bits($realtobits(40000.0), FX_MAX, 1'b1);
    run_bits($realtobits(-40000.0), FX_MIN, 1'b1);
    run_bits($realtobits(-32768.0), FX_MIN, 1'b0);
    run_bits($realtobits(1.0e300), FX_MAX, 1'b1);
    run_bits(64'h7FF0_0000_0000_0000, FX_MAX, 1'b1);   // +inf
    run_bits(64'hFFF0_0000_0000_0000, FX_MIN, 1'b1);   // -inf
    run_bits(64'h7FF8_0000_0000_0000, FX_ZERO, 1'b1);  // NaN
    run_bits(64'h0000_0000_0000_0001, FX_ZERO, 1'b0);  // subnormal
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
