// fx_recip: fixed-point reciprocal, the "Reciprocal" block (1 / a) at the end
// of the BET datapath.
//
// Divides the constant 1.0 by the operand with the sequential divider fx_div,
// so it has the divider's rounding, saturation and timing: the result follows
// in_valid by FX_W + FX_F + 3 clocks with a one-cycle out_valid pulse. A zero
// operand gives FX_MAX and raises div_by_zero. Building the reciprocal from the
// general divider is this design's choice.
module fx_recip
  import fx_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  fx_t  a,
  output logic busy,
  output logic out_valid,
  output fx_t  r,
  output logic div_by_zero
);

  fx_div u_div (
    .clk        (clk),
    .rst_n      (rst_n),
    .in_valid   (in_valid),
    .a          (FX_ONE),
    .b          (a),
    .busy       (busy),
    .out_valid  (out_valid),
    .q          (r),
    .div_by_zero(div_by_zero)
  );

endmodule
