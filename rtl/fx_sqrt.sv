// fx_sqrt: sequential fixed-point square root, the "SquareRoot" block that
// takes the root of the average head-of-line delay in the EXP-rule datapath.
//
// The operand, scaled by 2^FX_F, is fed to the binary digit-by-digit integer
// square-root loop (two radicand bits consumed per step), which produces one
// result bit per clock; the integer root of a * 2^FX_F is sqrt(a) with
// FX_F fraction bits. The last remainder rounds the root to nearest. A
// negative operand gives 0 and raises neg_in.
//
// Timing: in_valid is accepted when busy is low; the root appears
// RBITS + 2 clocks after in_valid (RBITS = (FX_W + FX_F) / 2, so 42 clocks at
// the default format) with a one-cycle out_valid
// pulse and held until the next operation. The function is the source model's;
// algorithm, latency and rounding are this design's choices.
module fx_sqrt
  import fx_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  fx_t  a,
  output logic busy,
  output logic out_valid,
  output fx_t  r,
  output logic neg_in
);

  localparam int unsigned NB    = ((FX_W + FX_F + 1) / 2) * 2;  // radicand width, even
  localparam int unsigned RBITS = NB / 2;
  localparam int unsigned CW    = $clog2(RBITS + 1);

  typedef logic [NB-1:0] rad_t;

  rad_t          op, res, bit_q;
  logic [CW-1:0] cnt;
  rad_t          trial;
  rad_t          res_round;

  always_comb begin
    trial     = res + bit_q;
    res_round = (op > res) ? res + 1'b1 : res;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      out_valid <= 1'b0;
      r         <= FX_ZERO;
      neg_in    <= 1'b0;
      op        <= '0;
      res       <= '0;
      bit_q     <= '0;
      cnt       <= '0;
    end else begin
      out_valid <= 1'b0;
      if (!busy) begin
        if (in_valid) begin
          if (a[FX_W-1]) begin
            r         <= FX_ZERO;
            neg_in    <= 1'b1;
            out_valid <= 1'b1;
          end else begin
            neg_in <= 1'b0;
            busy   <= 1'b1;
            op     <= rad_t'(a) << FX_F;
            res    <= '0;
            bit_q  <= rad_t'(1) << (NB - 2);
            cnt    <= CW'(RBITS);
          end
        end
      end else if (cnt != '0) begin
        if (op >= trial) begin
          op  <= op - trial;
          res <= (res >> 1) + bit_q;
        end else begin
          res <= res >> 1;
        end
        bit_q <= bit_q >> 2;
        cnt   <= cnt - 1'b1;
      end else begin
        busy      <= 1'b0;
        out_valid <= 1'b1;
        r         <= fx_t'(res_round);
      end
    end
  end

endmodule
