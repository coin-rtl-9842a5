// tb_coin_encoder: RRT encoding plus input-bit mapping, at the default size (784 values).
//
// Random samples (including all-zero and all-255 ones) are applied; the expected addresses
// are worked out bit by bit: address bit i of node r comes from encoded bit
// s = (MAP_MUL*(r*ADDR_BITS+i) + MAP_ADD) mod (PIXELS*THERM), which is set when value s/THERM
// reaches 2^(IN_W-THERM + s mod THERM). A second, small instance (16 values, 4-bit code,
// 8-bit addresses) is checked the same way. Ends with the TB_RESULT line.
module tb_coin_encoder;
  localparam int P = coin_pkg::PIXELS, W = coin_pkg::IN_W, T = coin_pkg::THERM;
  localparam int NB = coin_pkg::ADDR_BITS, R = P * T / NB;
  localparam int P2 = 16, T2 = 4, NB2 = 8, R2 = P2 * T2 / NB2, MUL2 = 13, ADD2 = 5;
  int checks = 0, failures = 0;

  logic [W-1:0]  pix  [P];
  logic [NB-1:0] addr [R];
  logic [W-1:0]  pix2 [P2];
  logic [NB2-1:0] addr2 [R2];

  coin_encoder dut (.pixel(pix), .addr(addr));
  coin_encoder #(.PIXELS(P2), .THERM(T2), .ADDR_BITS(NB2), .MAP_MUL(MUL2), .MAP_ADD(ADD2))
    dut2 (.pixel(pix2), .addr(addr2));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 60; it++) begin
      for (int p = 0; p < P; p++)
        pix[p] = (it == 0) ? '0 : (it == 1) ? '1 : W'($urandom >> ($urandom_range(0, 8) + 24));
      for (int p = 0; p < P2; p++) pix2[p] = W'($urandom);
      #1;
      for (int r = 0; r < R; r++) begin
        automatic logic [NB-1:0] e;
        for (int i = 0; i < NB; i++) begin
          automatic int s = (coin_pkg::MAP_MUL * (r * NB + i) + coin_pkg::MAP_ADD) % (P * T);
          e[i] = int'(pix[s / T]) >= (1 << (W - T + s % T));
        end
        checks++;
        if (addr[r] !== e) begin
          failures++;
          if (failures < 10) $display("FAIL it=%0d node %0d addr=%h expected %h", it, r, addr[r], e);
        end
      end
      for (int r = 0; r < R2; r++) begin
        automatic logic [NB2-1:0] e;
        for (int i = 0; i < NB2; i++) begin
          automatic int s = (MUL2 * (r * NB2 + i) + ADD2) % (P2 * T2);
          e[i] = int'(pix2[s / T2]) >= (1 << (W - T2 + s % T2));
        end
        checks++;
        if (addr2[r] !== e) begin
          failures++;
          if (failures < 10) $display("FAIL small it=%0d node %0d addr=%h expected %h", it, r, addr2[r], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
