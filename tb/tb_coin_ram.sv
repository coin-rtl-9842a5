// tb_coin_ram: minterm matching and +/-1 voting of one RAM node.
//
// Instance A is a small node (8-bit address, 3 classes, 4 minterms) with explicit
// parameters: minterms 0x3C, 0xA5, 0x3C (a duplicate, so votes of +/-2 occur) and 0x00,
// the last one switched off. All 256 addresses are applied and every class vote is compared
// with the sum of the weights of the minterms that equal the address.
// Instance B is a full-size node (16-bit address, 10 classes, 10 minterms, default model of
// node 3, whose weights are shifted by one class); each of its minterms is applied, plus its
// neighbours at Hamming distance one and random addresses.
// Ends with the TB_RESULT line.
module tb_coin_ram;
  int checks = 0, failures = 0, hits = 0, misses = 0;

  // ---------------- instance A ----------------
  localparam logic [31:0] MT_A   = 32'h00_3C_A5_3C;  // minterm n in bits [8n +: 8]
  localparam logic [11:0] WPOS_A = 12'b000_110_011_101; // bit 3n+k
  localparam logic [3:0]  EN_A   = 4'b0111;
  localparam int VWA = coin_pkg::vote_width(4);

  logic [7:0] addr_a;
  logic signed [VWA-1:0] vote_a [3];

  coin_ram #(.ADDR_BITS(8), .CLASSES(3), .MINTERMS(4), .MT(MT_A), .WPOS(WPOS_A), .EN(EN_A))
    dut_a (.addr(addr_a), .vote(vote_a));

  // ---------------- instance B ----------------
  localparam int NB = coin_pkg::ADDR_BITS, KB = coin_pkg::CLASSES, MB = coin_pkg::MINTERMS;
  localparam int VWB = coin_pkg::vote_width(MB);
  localparam int RI = 3;

  logic [NB-1:0] addr_b;
  logic signed [VWB-1:0] vote_b [KB];

  coin_ram #(.RAM_INDEX(RI)) dut_b (.addr(addr_b), .vote(vote_b));

  logic [NB-1:0] mt_b [MB];

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_b();
    for (int k = 0; k < KB; k++) begin
      automatic int e = 0;
      for (int n = 0; n < MB; n++)
        if (coin_model_pkg::minterm_en(RI, n, MB) && mt_b[n] == addr_b)
          e += coin_model_pkg::weight_pos(RI, n, k, KB) ? 1 : -1;
      if (k == 0) begin
        if (e != 0 || addr_b inside {mt_b}) hits++; else misses++;
      end
      checks++;
      if (int'(vote_b[k]) != e) begin
        failures++;
        $display("FAIL B addr=%h class %0d vote=%0d expected %0d", addr_b, k, vote_b[k], e);
      end
    end
  endtask

  initial begin
    for (int a = 0; a < 256; a++) begin
      addr_a = 8'(a);
      #1;
      for (int k = 0; k < 3; k++) begin
        automatic int e = 0;
        for (int n = 0; n < 4; n++)
          if (EN_A[n] && MT_A[8*n +: 8] == 8'(a)) e += WPOS_A[3*n+k] ? 1 : -1;
        checks++;
        if (int'(vote_a[k]) != e) begin
          failures++;
          $display("FAIL A addr=%h class %0d vote=%0d expected %0d", a, k, vote_a[k], e);
        end
      end
    end
    // spot value worked out by hand: 0x3C matches minterms 0 (+1,-1,+1) and 2 (-1,+1,+1)
    addr_a = 8'h3C;
    #1;
    checks++;
    if (!(vote_a[0] == 0 && vote_a[1] == 0 && vote_a[2] == 2)) begin
      failures++;
      $display("FAIL A 0x3C votes %0d %0d %0d", vote_a[0], vote_a[1], vote_a[2]);
    end

    for (int n = 0; n < MB; n++)
      for (int i = 0; i < NB; i++)
        mt_b[n][i] = coin_model_pkg::minterm_bit(RI, n, i, coin_pkg::PIXELS, coin_pkg::IN_W,
                                                 coin_pkg::THERM, NB, KB, coin_pkg::MAP_MUL,
                                                 coin_pkg::MAP_ADD);
    for (int n = 0; n < MB; n++) begin
      addr_b = mt_b[n];
      #1;
      check_b();
      for (int i = 0; i < NB; i++) begin
        addr_b = mt_b[n] ^ (NB'(1) << i);
        #1;
        check_b();
      end
    end
    for (int it = 0; it < 500; it++) begin
      addr_b = NB'($urandom);
      #1;
      check_b();
    end
    checks++;
    if (hits == 0 || misses == 0) begin
      failures++;
      $display("FAIL coverage hits=%0d misses=%0d", hits, misses);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
