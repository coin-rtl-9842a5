// tb_coin_argmax: random and tie-heavy score vectors against a reference argmax.
//
// Drives the default 10-class argmax with random signed scores, some drawn from a tiny range
// so that ties are frequent, and checks the winner index (lowest index on ties) and the
// winning score. Ends with the TB_RESULT line.
module tb_coin_argmax;
  localparam int K  = coin_pkg::CLASSES;
  localparam int SW = coin_pkg::score_width(coin_pkg::PIXELS * coin_pkg::THERM /
                                            coin_pkg::ADDR_BITS, coin_pkg::MINTERMS);
  int checks = 0, failures = 0, ties = 0;

  logic signed [SW-1:0] score [K];
  logic [3:0]           cls;
  logic signed [SW-1:0] best;

  coin_argmax dut (.score(score), .cls(cls), .best(best));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 4000; it++) begin
      int exp_k, exp_s, nmax;
      for (int k = 0; k < K; k++) begin
        if (it % 2 == 0) score[k] = SW'($signed($urandom_range(0, 6)) - 3);
        else             score[k] = SW'($signed($urandom_range(0, 16000)) - 8000);
      end
      if (it == 0) for (int k = 0; k < K; k++) score[k] = SW'(-5);
      #1;
      exp_k = 0;
      exp_s = score[0];
      for (int k = 1; k < K; k++) if (int'(score[k]) > exp_s) begin exp_s = score[k]; exp_k = k; end
      nmax = 0;
      for (int k = 0; k < K; k++) if (int'(score[k]) == exp_s) nmax++;
      if (nmax > 1) ties++;
      checks++;
      if (int'(cls) != exp_k || int'(best) != exp_s) begin
        failures++;
        $display("FAIL it=%0d cls=%0d best=%0d expected %0d/%0d", it, cls, best, exp_k, exp_s);
      end
    end
    checks++;
    if (ties == 0) begin
      failures++;
      $display("FAIL no ties exercised");
    end
    $display("ties exercised: %0d", ties);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
