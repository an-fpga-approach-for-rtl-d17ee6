// tb_fx_addsub: self-checking testbench of fx_addsub. Random sums and
// differences compared exactly with real arithmetic, saturation at both ends
// and the one-clock latency checked.
module tb_fx_addsub;
  import fx_pkg::*;
  import tb_pkg::*;

  logic       clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, out_valid;
  addsub_op_e op;
  fx_t        a, b, s;
  int         checks = 0, failures = 0;

  always #5 clk = ~clk;

  fx_addsub dut (.*);

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(addsub_op_e o, real ra, real rb, real expect_r);
    int lat;
    op = o; a = r2fx(ra); b = r2fx(rb);
    in_valid = 1'b1;
    @(posedge clk); #1;
    in_valid = 1'b0;
    lat = 1;
    while (!out_valid) begin @(posedge clk); #1; lat++; end
    checks++;
    if (rabs(fx2r(s) - expect_r) > 0.5 * LSB) begin
      failures++;
      $display("FAIL addsub op=%0d %f, %f -> %f, expected %f", o, ra, rb, fx2r(s), expect_r);
    end
    checks++;
    if (lat != 1) begin failures++; $display("FAIL addsub latency %0d", lat); end
  endtask

  initial begin
    op = OP_ADD; a = '0; b = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    run(OP_SUB, 1.0, 0.1, fx2r(r2fx(1.0)) - fx2r(r2fx(0.1)));
    run(OP_ADD, 9.0, 0.5, 9.5);
    for (int i = 0; i < 200; i++) begin
      real x, y;
      x = fx2r(r2fx(urand(-10000.0, 10000.0)));
      y = fx2r(r2fx(urand(-10000.0, 10000.0)));
      if (i % 2 == 0) run(OP_ADD, x, y, x + y);
      else            run(OP_SUB, x, y, x - y);
    end
    run(OP_ADD, 30000.0, 30000.0, fx2r(FX_MAX));
    run(OP_SUB, -30000.0, 30000.0, fx2r(FX_MIN));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
