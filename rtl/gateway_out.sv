// gateway_out: the "Gateway Out" boundary block, converting a fixed-point fx_t
// value back into an IEEE-754 double.
//
// Takes the magnitude, finds its leading one at bit position lead, and builds
// the double with exponent 1023 + lead - FX_F and the bits below the leading one
// as significand. Because FX_W is at most 53 the conversion is exact. Zero
// gives +0.0.
//
// Purely combinational. The conversion is the source model's gateway; the
// method is this design's.
module gateway_out
  import fx_pkg::*;
(
  input  fx_t         q,
  output logic [63:0] d      // IEEE-754 binary64
);

  typedef logic [FX_W-1:0] mag_t;

  logic        sign;
  mag_t        mag;
  int          lead;
  logic [63:0] sig_sh;

  always_comb begin
    sign = q[FX_W-1];
    mag  = sign ? mag_t'(-q) : mag_t'(q);
    lead = 0;
    for (int i = 0; i < int'(FX_W); i++) begin
      if (mag[i]) lead = i;
    end
    sig_sh = 64'(mag) << (52 - lead);
    if (mag == '0) d = 64'd0;
    else d = {sign, 11'(1023 + lead - int'(FX_F)), sig_sh[51:0]};
  end

  if (FX_W > 53) begin : g_width_check
    $error("gateway_out: FX_W must not exceed 53 for an exact conversion");
  end

endmodule
