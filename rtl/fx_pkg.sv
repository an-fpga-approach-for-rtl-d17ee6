// fx_pkg: number format and shared constants of the EXP-BET metric datapath.
//
// Every arithmetic block of the datapath works on one signed two's-complement
// fixed-point format, fx_t, with FX_W bits in total of which FX_F are fraction
// bits (Q15.32 by default: range about +/-32768, resolution 2^-32). The format
// itself is this design's choice; the source model only says that the gateways
// turn floating-point values into "a fixed point format" with rounding and
// saturation. FX_W must stay at or below 53 so that Gateway Out can convert a
// fixed-point word to an IEEE-754 double without rounding.
package fx_pkg;

  parameter int unsigned FX_W = 48;   // total word width
  parameter int unsigned FX_F = 32;   // fraction bits

  typedef logic signed [FX_W-1:0] fx_t;

  localparam fx_t FX_MAX  = {1'b0, {(FX_W-1){1'b1}}};
  localparam fx_t FX_MIN  = {1'b1, {(FX_W-1){1'b0}}};
  localparam fx_t FX_ZERO = '0;
  localparam fx_t FX_ONE  = fx_t'(64'sd1 <<< FX_F);

  // Operation select of the add/subtract block.
  typedef enum logic {
    OP_ADD = 1'b0,   // a + b
    OP_SUB = 1'b1    // a - b
  } addsub_op_e;

  // Elaboration-time conversion of a real constant to fx_t (round to nearest).
  function automatic fx_t fx_from_real(real v);
    return fx_t'(longint'(v * (2.0 ** FX_F)));
  endfunction

  // Double-width signed intermediate (full product, widened sums).
  typedef logic signed [2*FX_W-1:0] fx_wide_t;

  // Clamp a double-width signed intermediate into fx_t.
  function automatic fx_t fx_sat(fx_wide_t v);
    if (v > fx_wide_t'(FX_MAX)) return FX_MAX;
    if (v < fx_wide_t'(FX_MIN)) return FX_MIN;
    return fx_t'(v);
  endfunction

endpackage
