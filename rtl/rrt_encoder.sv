// rrt_encoder: reverse ripple thermometer (RRT) encoding of one input value.
//
// RRT suits inputs that are non-negative and mostly small (roughly exponential
// distribution): the THERM thresholds are powers of two, so code bit t is set when
// value >= 2^(IN_W - THERM + t), and the number of set bits grows with the binary logarithm
// of the value. With IN_W = THERM = 8 the thresholds are 1, 2, 4, ..., 128 and a value a > 0
// sets floor(log2(a)) + 1 bits; a = 0 sets none. The power-of-two thresholds and the
// logarithmic count follow the published description; the count for IN_W = THERM (one more
// than floor(log2(a)), so that all eight bits are used by 8-bit pixels) and the bit order
// (bit 0 is the lowest threshold) are this design's reading.
//
// How: value >= 2^s is the OR of the value bits at positions s and above, so the code is
// built by an OR chain that ripples from the most significant bit downwards (the "reverse
// ripple"): code[THERM-1] = value[IN_W-1], code[t] = code[t+1] | value[IN_W-THERM+t].
//
// Interface: value (IN_W bits) in, code (THERM bits) out. Purely combinational.
module rrt_encoder #(
  parameter int unsigned IN_W  = coin_pkg::IN_W,
  parameter int unsigned THERM = coin_pkg::THERM
) (
  input  logic [IN_W-1:0]  value,
  output logic [THERM-1:0] code
);

  if (THERM > IN_W) begin : g_bad
    $error("rrt_encoder: THERM (%0d) must not exceed IN_W (%0d)", THERM, IN_W);
  end

  always_comb begin
    code[THERM-1] = value[IN_W-1];
    for (int t = THERM - 2; t >= 0; t--) begin
      code[t] = code[t+1] | value[IN_W-THERM+t];
    end
  end

endmodule
