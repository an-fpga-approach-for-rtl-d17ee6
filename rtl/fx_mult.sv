// fx_mult: fixed-point multiplier, the "Mult" block (a x b) of the metric
// datapaths.
//
// Multiplies two fx_t operands into the full double-width product, rounds it
// back to FX_F fraction bits (round half up: add half an LSB, then shift
// arithmetically) and saturates to the fx_t range. The result is registered:
// it appears one clock after in_valid together with a one-cycle out_valid pulse
// and is held until the next in_valid. The operation is the source model's;
// the single-cycle latency, the rounding and the saturation are this design's
// choices (the model's latency setting cannot be read).
module fx_mult
  import fx_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  fx_t  a,
  input  fx_t  b,
  output logic out_valid,
  output fx_t  p
);

  fx_wide_t full, rounded;

  always_comb begin
    full    = fx_wide_t'(a) * fx_wide_t'(b);
    rounded = (full + (fx_wide_t'(1) <<< (FX_F - 1))) >>> FX_F;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      p         <= FX_ZERO;
    end else begin
      out_valid <= in_valid;
      if (in_valid) p <= fx_sat(rounded);
    end
  end

endmodule
