// fx_join2: two-input join of the dataflow control.
//
// Each arithmetic block of the metric datapaths signals a finished result with
// a one-cycle valid pulse and then holds the result. A block with two operands
// produced by different upstream blocks must start only when both have
// arrived. fx_join2 remembers which of the two pulses it has seen since the
// last clear and raises fire, combinationally, in the cycle where the second
// one arrives (or in the cycle both arrive together); it then forgets both.
// This handshake is this design's choice; the source model is a Simulink
// diagram without explicit control.
module fx_join2 (
  input  logic clk,
  input  logic rst_n,
  input  logic clear,      // start of a new computation
  input  logic a_valid,
  input  logic b_valid,
  output logic fire
);

  logic got_a, got_b;

  assign fire = (got_a | a_valid) & (got_b | b_valid);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      got_a <= 1'b0;
      got_b <= 1'b0;
    end else if (clear || fire) begin
      got_a <= 1'b0;
      got_b <= 1'b0;
    end else begin
      got_a <= got_a | a_valid;
      got_b <= got_b | b_valid;
    end
  end

endmodule
