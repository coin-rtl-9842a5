// coin_encoder: turns one input sample into the R addresses of the RAM nodes.
//
// Every one of the PIXELS input values is RRT-encoded into THERM bits (rrt_encoder), giving
// PIXELS*THERM encoded bits. The mapping then deals these bits out to RAMS = PIXELS*THERM /
// ADDR_BITS addresses of ADDR_BITS bits each: address bit i of RAM node r takes encoded bit
// (MAP_MUL * (r*ADDR_BITS + i) + MAP_ADD) mod (PIXELS*THERM), where encoded bit p*THERM + t
// is thermometer bit t of value p. Encoding followed by mapping into R addresses is the
// published structure; the particular mapping (a fixed affine permutation, so that every
// encoded bit feeds exactly one address bit) is this design's choice. The mapping is pure
// wiring, so it costs no logic.
//
// Interface: pixel[PIXELS] (IN_W bits each) in, addr[RAMS] (ADDR_BITS bits each) out.
// Purely combinational.
module coin_encoder #(
  parameter int unsigned PIXELS    = coin_pkg::PIXELS,
  parameter int unsigned IN_W      = coin_pkg::IN_W,
  parameter int unsigned THERM     = coin_pkg::THERM,
  parameter int unsigned ADDR_BITS = coin_pkg::ADDR_BITS,
  parameter int unsigned MAP_MUL   = coin_pkg::MAP_MUL,
  parameter int unsigned MAP_ADD   = coin_pkg::MAP_ADD,
  localparam int unsigned NBITS    = PIXELS * THERM,
  localparam int unsigned RAMS     = NBITS / ADDR_BITS
) (
  input  logic [IN_W-1:0]      pixel [PIXELS],
  output logic [ADDR_BITS-1:0] addr  [RAMS]
);

  if (NBITS % ADDR_BITS != 0) begin : g_bad_size
    $error("coin_encoder: PIXELS*THERM (%0d) must be a multiple of ADDR_BITS (%0d)",
           NBITS, ADDR_BITS);
  end
  if (coin_pkg::gcd(MAP_MUL % NBITS, NBITS) != 1) begin : g_bad_map
    $error("coin_encoder: MAP_MUL (%0d) must be coprime with PIXELS*THERM (%0d)",
           MAP_MUL, NBITS);
  end

  logic [NBITS-1:0] enc;

  for (genvar p = 0; p < PIXELS; p++) begin : g_pix
    rrt_encoder #(.IN_W(IN_W), .THERM(THERM)) u_rrt (
      .value (pixel[p]),
      .code  (enc[p*THERM +: THERM])
    );
  end

  for (genvar r = 0; r < RAMS; r++) begin : g_ram
    for (genvar i = 0; i < ADDR_BITS; i++) begin : g_bit
      localparam int unsigned SRC = coin_pkg::map_src(r * ADDR_BITS + i, NBITS, MAP_MUL,
                                                      MAP_ADD);
      assign addr[r][i] = enc[SRC];
    end
  end

endmodule
