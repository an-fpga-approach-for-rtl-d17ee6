// fx_addsub: fixed-point adder/subtractor, the "AddSub", "ADD" and "SUB"
// blocks of the metric datapaths.
//
// Computes a + b (op = OP_ADD) or a - b (op = OP_SUB) one bit wider than fx_t
// and saturates the result to the fx_t range. The result is registered: it
// appears one clock after in_valid with a one-cycle out_valid pulse and is held
// until the next in_valid. The operation comes from the source model; the
// latency and the saturation are this design's choices.
module fx_addsub
  import fx_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  addsub_op_e op,
  input  fx_t        a,
  input  fx_t        b,
  output logic       out_valid,
  output fx_t        s
);

  fx_wide_t sum;

  always_comb begin
    if (op == OP_SUB) sum = fx_wide_t'(a) - fx_wide_t'(b);
    else              sum = fx_wide_t'(a) + fx_wide_t'(b);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      s         <= FX_ZERO;
    end else begin
      out_valid <= in_valid;
      if (in_valid) s <= fx_sat(sum);
    end
  end

endmodule
