// coin_top: complete COIN (combinational intelligent network) classifier.
//
// A COIN network classifies a sample with logic only: no weight memory and no multiplier.
// The sample's PIXELS values are RRT-encoded and mapped onto RAMS addresses (coin_encoder).
// Each RAM node compares its address with its minterms and casts a vote of -1, 0 or +1 per
// class from the +/-1 weights of the matching minterm (coin_ram, RAMS instances). For every
// class the votes of all nodes are added and a constant offset is subtracted
// (coin_class_sum, CLASSES instances), and the highest score names the class (coin_argmax).
// This datapath is the published one. The trained model (minterms, weights, offsets) comes
// from coin_model_pkg, which here holds a synthetic stand-in model.
//
// Timing (this design's choice): the whole classifier is one combinational stage between
// the input port and a single output register, so it accepts one sample every clock cycle
// and delivers the result one cycle later. out_valid is in_valid delayed by one cycle;
// out_class and out_score are updated only in cycles where in_valid is high and hold
// otherwise. rst_n is an asynchronous, active-low reset of out_valid, out_class and
// out_score.
//
// Interface: in_pixel[PIXELS] (IN_W bits each) with in_valid; out_class (index of the
// predicted class), out_score[CLASSES] (signed class scores) with out_valid.
module coin_top #(
  parameter int unsigned PIXELS    = coin_pkg::PIXELS,
  parameter int unsigned IN_W      = coin_pkg::IN_W,
  parameter int unsigned THERM     = coin_pkg::THERM,
  parameter int unsigned ADDR_BITS = coin_pkg::ADDR_BITS,
  parameter int unsigned CLASSES   = coin_pkg::CLASSES,
  parameter int unsigned MINTERMS  = coin_pkg::MINTERMS,
  parameter int unsigned MAP_MUL   = coin_pkg::MAP_MUL,
  parameter int unsigned MAP_ADD   = coin_pkg::MAP_ADD,
  localparam int unsigned RAMS     = PIXELS * THERM / ADDR_BITS,
  localparam int unsigned VW       = coin_pkg::vote_width(MINTERMS),
  localparam int unsigned SW       = coin_pkg::score_width(RAMS, MINTERMS),
  localparam int unsigned CW       = (CLASSES > 1) ? $clog2(CLASSES) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [IN_W-1:0]      in_pixel  [PIXELS],
  output logic                 out_valid,
  output logic [CW-1:0]        out_class,
  output logic signed [SW-1:0] out_score [CLASSES]
);

  logic [ADDR_BITS-1:0] addr [RAMS];

  coin_encoder #(
    .PIXELS(PIXELS), .IN_W(IN_W), .THERM(THERM), .ADDR_BITS(ADDR_BITS),
    .MAP_MUL(MAP_MUL), .MAP_ADD(MAP_ADD)
  ) u_enc (
    .pixel (in_pixel),
    .addr  (addr)
  );

  // vote_by_class[k][r] is RAM node r's vote for class k.
  logic signed [VW-1:0] vote_by_class [CLASSES][RAMS];

  for (genvar r = 0; r < RAMS; r++) begin : g_ram
    logic signed [VW-1:0] vote [CLASSES];

    coin_ram #(
      .ADDR_BITS(ADDR_BITS), .CLASSES(CLASSES), .MINTERMS(MINTERMS), .RAM_INDEX(r),
      .PIXELS(PIXELS), .IN_W(IN_W), .THERM(THERM), .MAP_MUL(MAP_MUL), .MAP_ADD(MAP_ADD)
    ) u_ram (
      .addr (addr[r]),
      .vote (vote)
    );

    for (genvar k = 0; k < CLASSES; k++) begin : g_cls
      assign vote_by_class[k][r] = vote[k];
    end
  end

  logic signed [SW-1:0] score [CLASSES];

  for (genvar k = 0; k < CLASSES; k++) begin : g_sum
    coin_class_sum #(
      .RAMS(RAMS), .VW(VW), .SW(SW), .BIAS(coin_model_pkg::class_bias(k))
    ) u_sum (
      .vote  (vote_by_class[k]),
      .score (score[k])
    );
  end

  logic [CW-1:0]        cls;
  logic signed [SW-1:0] best;

  coin_argmax #(.CLASSES(CLASSES), .SW(SW)) u_argmax (
    .score (score),
    .cls   (cls),
    .best  (best)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_class <= '0;
      for (int k = 0; k < CLASSES; k++) out_score[k] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_class <= cls;
        out_score <= score;
      end
    end
  end

endmodule
