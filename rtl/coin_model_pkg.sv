// coin_model_pkg: the trained parameters of the COIN network, as constant functions.
//
// A trained COIN model consists of, for every RAM node r and minterm n, the minterm value
// m[r][n] (an n-bit address pattern), a +/-1 weight per class w[k][r][n], and per class an
// integer offset (the batch-normalization term summed over all minterms). Training happens
// offline; its results are not part of this RTL. The functions below therefore define a
// deterministic stand-in model so that the hardware elaborates and can be simulated: each
// minterm n of every RAM node is the address that a synthetic "prototype" image of class
// (n mod K) produces in that node, the weight is +1 for that class and -1 for the others,
// and a few minterms are switched off to model RAM nodes with fewer than MINTERMS entries.
// To deploy a trained network, replace the bodies of minterm_bit, weight_pos, minterm_en
// and class_bias with the trained values; nothing else changes.
package coin_model_pkg;

  // 32-bit integer hash (xorshift-multiply), used to make the synthetic prototype images.
  function automatic logic [31:0] mix32(logic [31:0] x);
    logic [31:0] h;
    h = x;
    h = h ^ (h >> 16);
    h = h * 32'h7feb352d;
    h = h ^ (h >> 15);
    h = h * 32'h846ca68b;
    h = h ^ (h >> 16);
    return h;
  endfunction

  // Pixel p of prototype image (cls, variant): about 40 % of the pixels are zero, the rest
  // spread over the full 0 .. 2^in_w-1 range.
  function automatic int unsigned proto_pixel(int unsigned cls, int unsigned variant,
                                              int unsigned p, int unsigned in_w);
    logic [31:0] h;
    h = mix32(32'(p) * 32'h9e3779b9 ^ 32'(cls) * 32'h85ebca6b ^ 32'(variant) * 32'hc2b2ae35);
    if (h[3:0] < 4'd6) return 0;
    return int'((h >> 8) & ((32'd1 << in_w) - 32'd1));
  endfunction

  // Thermometer bit t of value v: set when v >= 2^(in_w - therm + t).
  function automatic logic therm_bit(int unsigned v, int unsigned t, int unsigned in_w,
                                     int unsigned therm);
    return v >= (32'd1 << (in_w - therm + t));
  endfunction

  // Bit i of minterm n of RAM node r.
  function automatic logic minterm_bit(int unsigned r, int unsigned n, int unsigned i,
                                       int unsigned pixels, int unsigned in_w,
                                       int unsigned therm, int unsigned addr_bits,
                                       int unsigned classes, int unsigned map_mul,
                                       int unsigned map_add);
    int unsigned src;
    src = coin_pkg::map_src(r * addr_bits + i, pixels * therm, map_mul, map_add);
    return therm_bit(proto_pixel(n % classes, n / classes, src / therm, in_w), src % therm,
                     in_w, therm);
  endfunction

  // Weight of minterm n of RAM node r for class k: 1 means +1, 0 means -1.
  function automatic logic weight_pos(int unsigned r, int unsigned n, int unsigned k,
                                      int unsigned classes);
    if (r % 29 == 3) return k == (n + 1) % classes;  // a few nodes vote for another class
    return k == n % classes;
  endfunction

  // Minterm n of RAM node r is present (1) or absent (0).
  function automatic logic minterm_en(int unsigned r, int unsigned n, int unsigned minterms);
    return !(r % 13 == 5 && n == r % minterms);
  endfunction

  // Per-class offset subtracted from the class score.
  function automatic int class_bias(int unsigned k);
    return int'((k * 7 + 3) % 5) - 2;
  endfunction

  // Largest MINTERMS*ADDR_BITS and MINTERMS*CLASSES a node may have; the node_* functions
  // return vectors of this width, which coin_ram truncates to its own size.
  localparam int unsigned MAX_NODE_BITS = 8192;

  // All minterms of RAM node r, minterm n in bits [n*addr_bits +: addr_bits].
  function automatic logic [MAX_NODE_BITS-1:0] node_minterms(
      int unsigned r, int unsigned minterms, int unsigned addr_bits, int unsigned classes,
      int unsigned pixels, int unsigned in_w, int unsigned therm, int unsigned map_mul,
      int unsigned map_add);
    logic [MAX_NODE_BITS-1:0] v = '0;
    for (int unsigned n = 0; n < minterms; n++) begin
      for (int unsigned i = 0; i < addr_bits; i++) begin
        v[n*addr_bits+i] = minterm_bit(r, n, i, pixels, in_w, therm, addr_bits, classes,
                                       map_mul, map_add);
      end
    end
    return v;
  endfunction

  // All weights of RAM node r, weight of minterm n for class k in bit n*classes + k.
  function automatic logic [MAX_NODE_BITS-1:0] node_weights(
      int unsigned r, int unsigned minterms, int unsigned classes);
    logic [MAX_NODE_BITS-1:0] v = '0;
    for (int unsigned n = 0; n < minterms; n++) begin
      for (int unsigned k = 0; k < classes; k++) begin
        v[n*classes+k] = weight_pos(r, n, k, classes);
      end
    end
    return v;
  endfunction

  // Presence bits of the minterms of RAM node r.
  function automatic logic [MAX_NODE_BITS-1:0] node_enables(int unsigned r,
                                                            int unsigned minterms);
    logic [MAX_NODE_BITS-1:0] v = '0;
    for (int unsigned n = 0; n < minterms; n++) v[n] = minterm_en(r, n, minterms);
    return v;
  endfunction

endpackage
