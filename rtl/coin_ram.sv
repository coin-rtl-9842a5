// coin_ram: one RAM node of a COIN network, realised as logic.
//
// A RAM node holds MINTERMS minterms m[n] of ADDR_BITS bits. Its address x matches minterm n
// when every bit agrees: q(m[n], x) = AND over the bits of XNOR(m[n], x). Each minterm carries
// one weight of +1 or -1 per class, and the node's vote for class k is the sum of the
// weights of the matching minterms. Minterm matching with AND-of-XNOR and +/-1 class weights
// follow the published model; a per-minterm enable (so that nodes with fewer entries than
// MINTERMS can be expressed) is this design's addition. With distinct minterms at most one
// matches, so a vote is -1, 0 or +1; duplicates are summed as the model's equation says.
//
// Parameters MT (minterm n in bits [n*ADDR_BITS +: ADDR_BITS]), WPOS (bit n*CLASSES + k set:
// weight +1, clear: weight -1) and EN (bit n set: minterm present) are the trained model of
// this node. Their defaults come from coin_model_pkg for node RAM_INDEX of the geometry
// given by PIXELS, IN_W, THERM, MAP_MUL and MAP_ADD, which are used for nothing else.
//
// Interface: addr in, vote[CLASSES] (signed, VW bits) out. Purely combinational.
module coin_ram #(
  parameter int unsigned ADDR_BITS = coin_pkg::ADDR_BITS,
  parameter int unsigned CLASSES   = coin_pkg::CLASSES,
  parameter int unsigned MINTERMS  = coin_pkg::MINTERMS,
  parameter int unsigned RAM_INDEX = 0,
  parameter int unsigned PIXELS    = coin_pkg::PIXELS,
  parameter int unsigned IN_W      = coin_pkg::IN_W,
  parameter int unsigned THERM     = coin_pkg::THERM,
  parameter int unsigned MAP_MUL   = coin_pkg::MAP_MUL,
  parameter int unsigned MAP_ADD   = coin_pkg::MAP_ADD,
  parameter logic [MINTERMS*ADDR_BITS-1:0] MT   = (MINTERMS*ADDR_BITS)'(
      coin_model_pkg::node_minterms(RAM_INDEX, MINTERMS, ADDR_BITS, CLASSES, PIXELS, IN_W,
                                    THERM, MAP_MUL, MAP_ADD)),
  parameter logic [MINTERMS*CLASSES-1:0]   WPOS = (MINTERMS*CLASSES)'(
      coin_model_pkg::node_weights(RAM_INDEX, MINTERMS, CLASSES)),
  parameter logic [MINTERMS-1:0]           EN   = MINTERMS'(
      coin_model_pkg::node_enables(RAM_INDEX, MINTERMS)),
  localparam int unsigned VW = coin_pkg::vote_width(MINTERMS)
) (
  input  logic [ADDR_BITS-1:0] addr,
  output logic signed [VW-1:0] vote [CLASSES]
);

  if (MINTERMS * ADDR_BITS > coin_model_pkg::MAX_NODE_BITS ||
      MINTERMS * CLASSES > coin_model_pkg::MAX_NODE_BITS) begin : g_bad_size
    $error("coin_ram: node too large for coin_model_pkg::MAX_NODE_BITS");
  end

  // q(m[n], addr) for every present minterm.
  logic [MINTERMS-1:0] hit;

  always_comb begin
    for (int n = 0; n < MINTERMS; n++) begin
      hit[n] = EN[n] & (&(~(MT[n*ADDR_BITS +: ADDR_BITS] ^ addr)));
    end
  end

  always_comb begin
    for (int k = 0; k < CLASSES; k++) begin
      vote[k] = '0;
      for (int n = 0; n < MINTERMS; n++) begin
        if (hit[n]) vote[k] = WPOS[n*CLASSES+k] ? vote[k] + VW'(1) : vote[k] - VW'(1);
      end
    end
  end

endmodule
