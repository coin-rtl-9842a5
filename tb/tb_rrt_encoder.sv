// tb_rrt_encoder: exhaustive check of the RRT encoder.
//
// Two instances: the default 8-bit value / 8-bit code, and an 8-bit value / 4-bit code.
// For every input value the expected code is worked out from the threshold definition
// (count the powers of two 2^(IN_W-THERM+t) that the value reaches, set that many low bits)
// and compared with the encoder's output. Ends with the TB_RESULT line.
module tb_rrt_encoder;
  int checks = 0, failures = 0;

  logic [7:0] value;
  logic [7:0] code8;
  logic [3:0] code4;

  rrt_encoder dut8 (.value(value), .code(code8));
  rrt_encoder #(.IN_W(8), .THERM(4)) dut4 (.value(value), .code(code4));

  function automatic int count_thresholds(int v, int in_w, int therm);
    int c = 0;
    for (int t = 0; t < therm; t++) if (v >= (1 << (in_w - therm + t))) c++;
    return c;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      logic [7:0] exp8;
      logic [3:0] exp4;
      value = 8'(v);
      #1;
      exp8 = 8'((1 << count_thresholds(v, 8, 8)) - 1);
      exp4 = 4'((1 << count_thresholds(v, 8, 4)) - 1);
      checks += 2;
      if (code8 !== exp8) begin
        failures++;
        $display("FAIL value=%0d code8=%b expected %b", v, code8, exp8);
      end
      if (code4 !== exp4) begin
        failures++;
        $display("FAIL value=%0d code4=%b expected %b", v, code4, exp4);
      end
    end
    // log2 relation for the default size: a > 0 sets floor(log2(a)) + 1 bits
    for (int v = 1; v < 256; v++) begin
      value = 8'(v);
      #1;
      checks++;
      if ($countones(code8) != $clog2(v + 1)) begin
        failures++;
        $display("FAIL value=%0d ones=%0d", v, $countones(code8));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
