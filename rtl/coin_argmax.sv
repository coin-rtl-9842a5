// coin_argmax: index of the highest of CLASSES signed scores.
//
// The predicted class is the argmax of the class scores, as in the published classifier.
// On a tie the lowest index wins (this design's choice; not specified). Scores are compared
// one after another, keeping the running maximum and its index.
//
// Interface: score[CLASSES] (signed, SW bits) in; cls (index of the winner) and best (its
// score) out. Purely combinational.
module coin_argmax #(
  parameter int unsigned CLASSES = coin_pkg::CLASSES,
  parameter int unsigned SW      = coin_pkg::score_width(
                                     coin_pkg::PIXELS * coin_pkg::THERM / coin_pkg::ADDR_BITS,
                                     coin_pkg::MINTERMS),
  localparam int unsigned CW     = (CLASSES > 1) ? $clog2(CLASSES) : 1
) (
  input  logic signed [SW-1:0] score [CLASSES],
  output logic [CW-1:0]        cls,
  output logic signed [SW-1:0] best
);

  always_comb begin
    best = score[0];
    cls  = '0;
    for (int k = 1; k < CLASSES; k++) begin
      if (score[k] > best) begin
        best = score[k];
        cls  = CW'(k);
      end
    end
  end

endmodule
