// bet_metric: Blind Equal Throughput (BET) scheduling metric
//   m_bet = 1 / R(t),   R(t) = beta * R(t-1) + (1 - beta) * r(t)
// where r(t) is the user's achievable data rate, R(t-1) its past average
// throughput and beta the averaging weight.
//
// The datapath follows the source model block by block:
//   SUB        = 1 - beta                 (fx_addsub)
//   Mult       = r(t) * SUB               (fx_mult)
//   Mult1      = beta * R(t-1)            (fx_mult)
//   ADD        = Mult + Mult1 = R(t)      (fx_addsub)
//   Reciprocal = 1 / ADD = m_bet          (fx_recip)
// Each block starts when its operands are valid (fx_join2 where two paths
// meet); the new average R(t) is also brought out.
//
// Interface and timing: start is accepted when busy is low and samples the
// three inputs. done pulses for one clock when m_bet and r_avg are valid; they
// are held until the next start. done rises 4 + FX_W + FX_F + 3 clocks after
// the start cycle (87 at the default format). div_by_zero reports a zero R(t). The
// valid/join handshake, the latency and the number format are this design's
// choices.
module bet_metric
  import fx_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  fx_t  user_rate,    // r(t)
  input  fx_t  beta,         // averaging weight
  input  fx_t  past_tput,    // R(t-1)
  output logic busy,
  output logic done,
  output fx_t  m_bet,
  output fx_t  r_avg,        // R(t)
  output logic div_by_zero
);

  fx_t  rate_q, beta_q, past_q;
  logic go;
  logic busy_q;
  fx_t  sub_s, mult_p, mult1_p;
  logic sub_v, mult_v, mult1_v, add_v, add_go;
  logic recip_busy;

  // busy drops in the cycle done is high, so a new start may follow at once.
  assign busy = busy_q && !done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rate_q <= FX_ZERO;
      beta_q <= FX_ZERO;
      past_q <= FX_ZERO;
      go     <= 1'b0;
      busy_q <= 1'b0;
    end else begin
      go <= start && !busy;
      if (start && !busy) begin
        rate_q <= user_rate;
        beta_q <= beta;
        past_q <= past_tput;
        busy_q <= 1'b1;
      end else if (done) begin
        busy_q <= 1'b0;
      end
    end
  end

  fx_addsub u_sub (
    .clk(clk), .rst_n(rst_n), .in_valid(go), .op(OP_SUB),
    .a(FX_ONE), .b(beta_q), .out_valid(sub_v), .s(sub_s)
  );

  fx_mult u_mult (
    .clk(clk), .rst_n(rst_n), .in_valid(sub_v),
    .a(rate_q), .b(sub_s), .out_valid(mult_v), .p(mult_p)
  );

  fx_mult u_mult1 (
    .clk(clk), .rst_n(rst_n), .in_valid(go),
    .a(beta_q), .b(past_q), .out_valid(mult1_v), .p(mult1_p)
  );

  fx_join2 u_join_add (
    .clk(clk), .rst_n(rst_n), .clear(go),
    .a_valid(mult_v), .b_valid(mult1_v), .fire(add_go)
  );

  fx_addsub u_add (
    .clk(clk), .rst_n(rst_n), .in_valid(add_go), .op(OP_ADD),
    .a(mult_p), .b(mult1_p), .out_valid(add_v), .s(r_avg)
  );

  fx_recip u_recip (
    .clk(clk), .rst_n(rst_n), .in_valid(add_v), .a(r_avg),
    .busy(recip_busy), .out_valid(done), .r(m_bet), .div_by_zero(div_by_zero)
  );

  // The reciprocal is only started once per computation, so it is never busy
  // when its operand arrives.
  a_recip_free: assert property (@(posedge clk) disable iff (!rst_n) add_v |-> !recip_busy);

endmodule
