// gateway_in: the "Gateway In" boundary block, converting an IEEE-754 double
// into the datapath's fixed-point format fx_t.
//
// The double's significand 1.m (53 bits) is shifted by e - 1075 + FX_F places:
// left when the value has fewer than FX_F fraction bits, right otherwise. A
// right shift rounds to nearest, ties away from zero. Magnitudes that do not fit
// saturate to FX_MAX / FX_MIN and raise sat; infinities saturate the same way;
// NaN gives 0 and raises sat; zero and subnormal inputs give 0. The result is
// negated for a negative sign.
//
// Purely combinational. Conversion with rounding and saturation follows the
// source model's gateway; the rounding rule and the NaN/subnormal handling are
// this design's choices.
module gateway_in
  import fx_pkg::*;
(
  input  logic [63:0] d,     // IEEE-754 binary64
  output fx_t         q,
  output logic        sat    // input was outside the fx_t range (or NaN)
);

  localparam int MAG_W = FX_W + 54;   // room for the significand shifted left by up to FX_W

  typedef logic [MAG_W-1:0] mag_t;

  logic        sign;
  logic [10:0] e;
  logic [51:0] m;
  logic [52:0] sig;
  int          s;
  int          rs;
  mag_t        mag;
  mag_t        lim;
  mag_t        half;

  always_comb begin
    sign = d[63];
    e    = d[62:52];
    m    = d[51:0];
    sig  = {1'b1, m};
    s    = int'(e) - 1075 + int'(FX_F);
    rs   = 0;
    mag  = '0;
    half = '0;
    q    = FX_ZERO;
    sat  = 1'b0;
    // Largest magnitude that fits: 2^(FX_W-1) - 1 positive, 2^(FX_W-1) negative.
    lim  = sign ? (mag_t'(1) << (FX_W - 1)) : mag_t'(FX_MAX);

    if (e == 11'd0) begin
      q = FX_ZERO;
    end else if (e == 11'h7FF) begin
      sat = 1'b1;
      q   = (m != '0) ? FX_ZERO : (sign ? FX_MIN : FX_MAX);
    end else begin
      if (s >= int'(FX_W)) begin
        sat = 1'b1;
      end else if (s >= 0) begin
        mag = mag_t'(sig) << s;
      end else begin
        rs   = (-s > 60) ? 60 : -s;
        half = mag_t'(1) << (rs - 1);
        mag  = (mag_t'(sig) + half) >> rs;
      end
      if (!sat && mag > lim) sat = 1'b1;
      if (sat) q = sign ? FX_MIN : FX_MAX;
      else     q = sign ? -fx_t'(mag) : fx_t'(mag);
    end
  end

endmodule
