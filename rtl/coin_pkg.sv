// coin_pkg: sizes and helper functions shared by the COIN classifier.
//
// A COIN classifier turns an input sample (here a 28x28 image of 8-bit pixels) into R
// addresses of n bits, matches every address against the minterms of its RAM node and adds
// up +/-1 class weights of the matching minterms; the class with the highest sum, after a
// per-class offset, wins. This package holds the default geometry of that network and the
// input-bit mapping shared by the encoder, the model defaults and the testbenches.
//
// Geometry that follows the published configuration (COIN/small on MNIST): n = 16 address
// bits per RAM node, T = 8 thermometer bits per pixel, 784 pixels, 10 classes, hence
// R = 784*8/16 = 392 RAM nodes. The number of minterms per RAM node (10) and the mapping
// (an affine permutation of the input bits) are this design's own choices.
package coin_pkg;

  localparam int unsigned PIXELS    = 784;  // input values per sample (28x28 MNIST image)
  localparam int unsigned IN_W      = 8;    // bits per input value
  localparam int unsigned THERM     = 8;    // T: thermometer bits per input value
  localparam int unsigned ADDR_BITS = 16;   // n: address bits per RAM node
  localparam int unsigned CLASSES   = 10;   // K
  localparam int unsigned MINTERMS  = 10;   // minterms per RAM node (N^r, uniform here)

  // Input-bit mapping: address bit j (j = r*ADDR_BITS + i) takes encoded bit
  // (MAP_MUL * j + MAP_ADD) mod (PIXELS*THERM). MAP_MUL must be coprime with the bit count
  // so that the mapping is a permutation.
  localparam int unsigned MAP_MUL = 2027;
  localparam int unsigned MAP_ADD = 101;

  function automatic int unsigned map_src(int unsigned j, int unsigned nbits,
                                          int unsigned mul, int unsigned add);
    longint unsigned v;
    v = (longint'(mul) * longint'(j) + longint'(add)) % longint'(nbits);
    return v[31:0];
  endfunction

  function automatic int unsigned gcd(int unsigned a, int unsigned b);
    int unsigned x, y, t;
    x = a;
    y = b;
    while (y != 0) begin
      t = x % y;
      x = y;
      y = t;
    end
    return x;
  endfunction

  // Signed width that holds a per-RAM vote in [-minterms, +minterms].
  function automatic int unsigned vote_width(int unsigned minterms);
    return $clog2(minterms + 1) + 1;
  endfunction

  // Signed width that holds a class score: the sum of rams*minterms votes of +/-1 and an
  // offset of at most the same magnitude.
  function automatic int unsigned score_width(int unsigned rams, int unsigned minterms);
    return $clog2(rams * minterms + 1) + 2;
  endfunction

endpackage
