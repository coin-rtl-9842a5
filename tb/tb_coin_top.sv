// tb_coin_top: end-to-end test of the complete classifier at its default size.
//
// coin_top is instantiated with no parameter overrides (784 8-bit values, T = 8, 16-bit
// addresses, 392 RAM nodes, 10 minterms per node, 10 classes). Samples are streamed in,
// one per cycle with occasional idle cycles: the prototype images behind the default model,
// noisy prototypes, blends of two prototypes, random sparse images, and the all-zero and
// all-255 images. A reference model in this file encodes and maps each sample from the
// definitions (threshold comparison, affine mapping), matches addresses against the model's
// minterms, adds +/-1 votes, subtracts the class offsets and takes the argmax (lowest index
// on ties). Each result must appear exactly one cycle after its sample, and outputs must
// hold during idle cycles. The test also counts how often each mechanism happened (minterm
// hit, node without a hit, +1 and -1 votes, a switched-off minterm that the address equals,
// a tie in the argmax, an offset that decides the winner, encoder saturation, idle hold,
// reset) and counts a failure for any that never occurred. Ends with the TB_RESULT line.
module tb_coin_top;
  import coin_pkg::*;
  localparam int R  = PIXELS * THERM / ADDR_BITS;
  localparam int SW = score_width(R, MINTERMS);
  localparam int NSAMPLES = 120;

  int checks = 0, failures = 0;
  int n_hit = 0, n_nohit = 0, n_pos = 0, n_neg = 0, n_disabled = 0, n_tie = 0;
  int n_bias_decides = 0, n_sat = 0, n_hold = 0, n_reset = 0, n_b2b = 0;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [IN_W-1:0] in_pixel [PIXELS];
  logic out_valid;
  logic [3:0] out_class;
  logic signed [SW-1:0] out_score [CLASSES];

  coin_top dut (.*);

  always #5 clk = ~clk;

  // model, read once from the model functions
  logic [ADDR_BITS-1:0] mt  [R][MINTERMS];
  logic                 en  [R][MINTERMS];
  logic                 wp  [R][MINTERMS][CLASSES];

  // expected results of the sample applied in the previous cycle
  int exp_class;
  int exp_score [CLASSES];

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void reference(output int cls, output int sc [CLASSES]);
    int raw [CLASSES];
    int raw_cls;
    for (int k = 0; k < CLASSES; k++) raw[k] = 0;
    for (int r = 0; r < R; r++) begin
      logic [ADDR_BITS-1:0] a;
      bit any = 0;
      for (int i = 0; i < ADDR_BITS; i++) begin
        int s = (MAP_MUL * (r * ADDR_BITS + i) + MAP_ADD) % (PIXELS * THERM);
        a[i] = int'(in_pixel[s / THERM]) >= (1 << (IN_W - THERM + s % THERM));
      end
      for (int n = 0; n < MINTERMS; n++) begin
        if (mt[r][n] == a) begin
          if (!en[r][n]) begin
            n_disabled++;
            continue;
          end
          any = 1;
          for (int k = 0; k < CLASSES; k++) begin
            raw[k] += wp[r][n][k] ? 1 : -1;
            if (wp[r][n][k]) n_pos++; else n_neg++;
          end
        end
      end
      if (any) n_hit++; else n_nohit++;
    end
    cls = 0;
    raw_cls = 0;
    for (int k = 0; k < CLASSES; k++) begin
      sc[k] = raw[k] - coin_model_pkg::class_bias(k);
      if (sc[k] > sc[cls]) cls = k;
      if (raw[k] > raw[raw_cls]) raw_cls = k;
    end
    for (int k = 0; k < CLASSES; k++) if (k != cls && sc[k] == sc[cls]) begin n_tie++; break; end
    if (raw_cls != cls) n_bias_decides++;
  endfunction

  task automatic make_sample(int idx);
    int kind = idx % 6;
    int c = (idx / 6) % CLASSES;
    int c2 = (c + 3) % CLASSES;
    for (int p = 0; p < PIXELS; p++) begin
      int v;
      case (kind)
        0: v = coin_model_pkg::proto_pixel(c, 0, p, IN_W);
        1: v = ($urandom_range(0, 99) < 3) ? $urandom_range(0, 255)
                                            : coin_model_pkg::proto_pixel(c, 0, p, IN_W);
        2: v = (p < PIXELS / 2) ? coin_model_pkg::proto_pixel(c, 0, p, IN_W)
                                : coin_model_pkg::proto_pixel(c2, 0, p, IN_W);
        3: v = ($urandom_range(0, 1) != 0) ? 0 : $urandom_range(0, 255);
        4: v = (idx % 12 == 4) ? 0 : 255;
        default: v = ((p * 7 + idx) % 5 < 2) ? coin_model_pkg::proto_pixel(c, 0, p, IN_W)
                                             : coin_model_pkg::proto_pixel(c2, 0, p, IN_W);
      endcase
      if (v == 255) n_sat++;
      in_pixel[p] = IN_W'(v);
    end
  endtask

  task automatic check_outputs(string what);
    checks++;
    if (!out_valid) begin
      failures++;
      $display("FAIL %s: out_valid low", what);
    end
    checks++;
    if (int'(out_class) != exp_class) begin
      failures++;
      $display("FAIL %s: class %0d expected %0d", what, out_class, exp_class);
    end
    for (int k = 0; k < CLASSES; k++) begin
      checks++;
      if (int'(out_score[k]) != exp_score[k]) begin
        failures++;
        $display("FAIL %s: score[%0d]=%0d expected %0d", what, k, out_score[k], exp_score[k]);
      end
    end
  endtask

  initial begin
    for (int r = 0; r < R; r++)
      for (int n = 0; n < MINTERMS; n++) begin
        for (int i = 0; i < ADDR_BITS; i++)
          mt[r][n][i] = coin_model_pkg::minterm_bit(r, n, i, PIXELS, IN_W, THERM, ADDR_BITS,
                                                    CLASSES, MAP_MUL, MAP_ADD);
        en[r][n] = coin_model_pkg::minterm_en(r, n, MINTERMS);
        for (int k = 0; k < CLASSES; k++) wp[r][n][k] = coin_model_pkg::weight_pos(r, n, k, CLASSES);
      end
    for (int p = 0; p < PIXELS; p++) in_pixel[p] = '0;

    // reset
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (out_valid !== 1'b0) begin
      failures++;
      $display("FAIL out_valid not cleared by reset");
    end else n_reset++;
    rst_n = 1;

    for (int idx = 0; idx < NSAMPLES; idx++) begin
      int cls;
      int sc [CLASSES];
      automatic bit prev_valid = in_valid;
      // apply a sample for one cycle
      make_sample(idx);
      in_valid = 1;
      reference(cls, sc);
      @(posedge clk);
      #1;
      exp_class = cls;
      exp_score = sc;
      check_outputs($sformatf("sample %0d", idx));
      if (prev_valid) n_b2b++;
      if (idx % 7 == 6) begin
        // idle cycle: inputs change, outputs must hold
        in_valid = 0;
        for (int p = 0; p < PIXELS; p++) in_pixel[p] = IN_W'($urandom);
        @(posedge clk);
        #1;
        checks++;
        if (out_valid !== 1'b0) begin
          failures++;
          $display("FAIL out_valid high in idle cycle");
        end
        checks++;
        if (int'(out_class) != exp_class || int'(out_score[0]) != exp_score[0]) begin
          failures++;
          $display("FAIL outputs changed in idle cycle");
        end else n_hold++;
      end
      // prototypes of the stand-in model must be recognised
      if (idx % 6 == 0) begin
        checks++;
        if (int'(out_class) != (idx / 6) % CLASSES) begin
          failures++;
          $display("FAIL prototype of class %0d classified as %0d", (idx / 6) % CLASSES, out_class);
        end
      end
    end

    $display("mechanisms: hit=%0d nohit=%0d +1=%0d -1=%0d disabled=%0d tie=%0d bias_decides=%0d",
             n_hit, n_nohit, n_pos, n_neg, n_disabled, n_tie, n_bias_decides);
    $display("            saturated_pixels=%0d idle_hold=%0d back_to_back=%0d reset=%0d",
             n_sat, n_hold, n_b2b, n_reset);
    begin
      int cnt [11];
      string nm [11];
      cnt = '{n_hit, n_nohit, n_pos, n_neg, n_disabled, n_tie, n_bias_decides, n_sat, n_hold,
              n_b2b, n_reset};
      nm = '{"hit", "nohit", "+1", "-1", "disabled", "tie", "bias_decides", "saturation",
             "idle_hold", "back_to_back", "reset"};
      for (int i = 0; i < 11; i++) begin
        checks++;
        if (cnt[i] == 0) begin
          failures++;
          $display("FAIL mechanism %s never happened", nm[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
