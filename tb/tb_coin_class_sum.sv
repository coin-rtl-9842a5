// tb_coin_class_sum: the per-class score adder at its default size (392 RAM nodes).
//
// Two instances with offsets +3 and -7 receive the same random votes (in [-10, 10], and
// in the range a node with distinct minterms produces, [-1, 1]), including the all-maximum
// and all-minimum extremes. The expected score is the plain integer sum minus the offset.
// Ends with the TB_RESULT line.
module tb_coin_class_sum;
  localparam int R  = coin_pkg::PIXELS * coin_pkg::THERM / coin_pkg::ADDR_BITS;
  localparam int VW = coin_pkg::vote_width(coin_pkg::MINTERMS);
  localparam int SW = coin_pkg::score_width(R, coin_pkg::MINTERMS);
  int checks = 0, failures = 0;

  logic signed [VW-1:0] vote [R];
  logic signed [SW-1:0] score_a, score_b;

  coin_class_sum #(.BIAS(3))  dut_a (.vote(vote), .score(score_a));
  coin_class_sum #(.BIAS(-7)) dut_b (.vote(vote), .score(score_b));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 600; it++) begin
      automatic int sum = 0;
      for (int r = 0; r < R; r++) begin
        automatic int v;
        case (it)
          0: v = 10;
          1: v = -10;
          2: v = 0;
          default: v = (it % 2) ? $signed($urandom_range(0, 20)) - 10
                                : $signed($urandom_range(0, 2)) - 1;
        endcase
        vote[r] = VW'(v);
        sum += v;
      end
      #1;
      checks += 2;
      if (int'(score_a) != sum - 3) begin
        failures++;
        $display("FAIL it=%0d score_a=%0d expected %0d", it, score_a, sum - 3);
      end
      if (int'(score_b) != sum + 7) begin
        failures++;
        $display("FAIL it=%0d score_b=%0d expected %0d", it, score_b, sum + 7);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
