// coin_class_sum: discriminator score of one class.
//
// The score of class k is the sum, over all RAM nodes, of the node's vote for k, minus the
// class offset BIAS. The offset is the batch-normalization term of the trained network
// summed over all minterms (the model subtracts a per-class constant from every minterm's
// contribution, which adds up to one constant per class); it is computed offline and
// supplied as an integer. The sum itself follows the published score equation; writing it as
// a single adder chain that synthesis may rebalance is this design's choice.
//
// Interface: vote[RAMS] (signed, VW bits) in, score (signed, SW bits) out. Purely
// combinational. SW must hold RAMS*(2^(VW-1)-1) + |BIAS|.
module coin_class_sum #(
  parameter int unsigned RAMS = coin_pkg::PIXELS * coin_pkg::THERM / coin_pkg::ADDR_BITS,
  parameter int unsigned VW   = coin_pkg::vote_width(coin_pkg::MINTERMS),
  parameter int unsigned SW   = coin_pkg::score_width(RAMS, coin_pkg::MINTERMS),
  parameter int          BIAS = 0
) (
  input  logic signed [VW-1:0] vote [RAMS],
  output logic signed [SW-1:0] score
);

  always_comb begin
    score = -SW'(BIAS);
    for (int r = 0; r < RAMS; r++) begin
      score = score + SW'(vote[r]);
    end
  end

endmodule
