// fx_div: sequential fixed-point divider, the "Divide" block (a / b) of the
// EXP-rule datapath and the engine of the reciprocal.
//
// Works on magnitudes with a restoring shift-subtract loop that produces one
// quotient bit per clock. The dividend |a| is extended by FX_F + 1 zero bits,
// so the loop yields the quotient with one bit below the fx_t LSB; that bit
// rounds the result to nearest (ties away from zero). The sign is applied
// afterwards and the result saturates to the fx_t range. A zero divisor gives
// FX_MAX (or FX_MIN for a negative dividend) and raises div_by_zero.
//
// Timing: in_valid is accepted when busy is low. The quotient appears
// QBITS + 2 clocks after in_valid (QBITS = FX_W + FX_F + 1, so 83 clocks at
// the default format; a zero divisor answers after 1 clock) with a one-cycle
// out_valid pulse and held until the next operation. The division itself is the source
// model's; the algorithm, latency, rounding and zero-divisor rule are this
// design's choices.
module fx_div
  import fx_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  fx_t  a,
  input  fx_t  b,
  output logic busy,
  output logic out_valid,
  output fx_t  q,
  output logic div_by_zero
);

  localparam int unsigned QBITS = FX_W + FX_F + 1;
  localparam int unsigned CW    = $clog2(QBITS + 1);

  typedef logic [FX_W-1:0] mag_t;

  logic [QBITS-1:0] dvd;      // dividend bits shift out at the top, quotient bits in at the bottom
  logic [FX_W:0]    rem;
  mag_t             dsr;
  logic             neg;
  logic [CW-1:0]    cnt;

  logic [FX_W:0]    rem_sh;
  logic             qbit;
  logic [QBITS:0]   q_round;
  logic             q_ovf;

  function automatic mag_t mag(fx_t v);
    return v[FX_W-1] ? mag_t'(-v) : mag_t'(v);
  endfunction

  always_comb begin
    rem_sh = {rem[FX_W-1:0], dvd[QBITS-1]};
    qbit   = (rem_sh >= {1'b0, dsr});
    // Final rounding, done on the complete quotient held in dvd.
    q_round = ({1'b0, dvd} + 1'b1) >> 1;
    q_ovf   = neg ? (q_round > (QBITS+1)'({1'b1, {(FX_W-1){1'b0}}}))
                  : (q_round > (QBITS+1)'(FX_MAX));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy        <= 1'b0;
      out_valid   <= 1'b0;
      q           <= FX_ZERO;
      div_by_zero <= 1'b0;
      dvd         <= '0;
      rem         <= '0;
      dsr         <= '0;
      neg         <= 1'b0;
      cnt         <= '0;
    end else begin
      out_valid <= 1'b0;
      if (!busy) begin
        if (in_valid) begin
          if (b == FX_ZERO) begin
            q           <= a[FX_W-1] ? FX_MIN : FX_MAX;
            div_by_zero <= 1'b1;
            out_valid   <= 1'b1;
          end else begin
            busy        <= 1'b1;
            div_by_zero <= 1'b0;
            dvd         <= {mag(a), (FX_F + 1)'(0)};
            rem         <= '0;
            dsr         <= mag(b);
            neg         <= a[FX_W-1] ^ b[FX_W-1];
            cnt         <= CW'(QBITS);
          end
        end
      end else if (cnt != '0) begin
        rem <= qbit ? (rem_sh - {1'b0, dsr}) : rem_sh;
        dvd <= {dvd[QBITS-2:0], qbit};
        cnt <= cnt - 1'b1;
      end else begin
        busy      <= 1'b0;
        out_valid <= 1'b1;
        if (q_ovf) q <= neg ? FX_MIN : FX_MAX;
        else       q <= neg ? -fx_t'(q_round) : fx_t'(q_round);
      end
    end
  end

endmodule
