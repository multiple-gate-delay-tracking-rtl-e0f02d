// tb_code_gen: self-checking test of the replica code generator.
//
// Reference model: the GPS C/A code written as G1(n) xor G2(n - delay_prn),
// with G1 and G2 produced from their recurrences
//   G1: s[n+10] = s[n+7] ^ s[n]
//   G2: s[n+10] = s[n+8] ^ s[n+7] ^ s[n+4] ^ s[n+2] ^ s[n+1] ^ s[n]
// from all-ones, and the published G2 delays per satellite. The first ten
// chips of every code are also compared with their published octal values.
// For each of the 32 codes a restart is followed by one full epoch plus a few
// chips with random chip strobes, half-chip flags and BOC enable; the chip,
// the BOC-modulated replica, the chip index and the epoch strobe are checked
// every cycle, and the epoch length must be 1023 chips.
module tb_code_gen;
  import mgd_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic restart, chip_stb, half, boc_en;
  logic [5:0] prn;
  logic ref_code, prn_chip, epoch_stb;
  logic [9:0] chip_idx;

  int checks = 0, failures = 0;

  code_gen dut (.clk, .rst_n, .restart, .prn, .chip_stb, .half, .boc_en,
                .ref_code_o(ref_code), .prn_chip_o(prn_chip), .epoch_stb,
                .chip_idx_o(chip_idx));

  always #5 clk = ~clk;

  bit g1[1023], g2[1023];
  int delays[32] = '{5, 6, 7, 8, 17, 18, 139, 140, 141, 251, 252, 254, 255, 256, 257, 258,
                     469, 470, 471, 472, 473, 474, 509, 512, 513, 514, 515, 516, 859, 860,
                     861, 862};
  int first10[32] = '{'o1440, 'o1620, 'o1710, 'o1744, 'o1133, 'o1455, 'o1131, 'o1454,
                      'o1626, 'o1504, 'o1642, 'o1750, 'o1764, 'o1772, 'o1775, 'o1776,
                      'o1156, 'o1467, 'o1633, 'o1715, 'o1746, 'o1763, 'o1063, 'o1706,
                      'o1743, 'o1761, 'o1770, 'o1774, 'o1127, 'o1453, 'o1625, 'o1712};

  function automatic bit ca(input int p, input int n);
    return g1[n] ^ g2[(n - delays[p-1] + 1023) % 1023];
  endfunction

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 10) $display("FAIL %s prn=%0d idx=%0d at %0t", what, prn, chip_idx, $time);
    end
  endtask

  initial begin
    bit s1[1033], s2[1033];
    for (int n = 0; n < 10; n++) begin s1[n] = 1; s2[n] = 1; end
    for (int n = 0; n + 10 < 1033; n++) begin
      s1[n+10] = s1[n+7] ^ s1[n];
      s2[n+10] = s2[n+8] ^ s2[n+7] ^ s2[n+4] ^ s2[n+2] ^ s2[n+1] ^ s2[n];
    end
    for (int n = 0; n < 1023; n++) begin g1[n] = s1[n]; g2[n] = s2[n]; end
    // the reference model itself against the published first-ten-chip values
    for (int p = 1; p <= 32; p++) begin
      int v;
      v = 0;
      for (int n = 0; n < 10; n++) v = (v << 1) | int'(ca(p, n));
      check(v == first10[p-1], "model first 10 chips");
      if (v != first10[p-1]) $display("p=%0d model %o exp %o", p, v, first10[p-1]);
    end

    restart = 1'b0; chip_stb = 1'b0; half = 1'b0; boc_en = 1'b0; prn = 6'd1;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int p = 1; p <= 32; p++) begin
      int n, ones, epochs;
      @(negedge clk);
      prn = 6'(p); restart = 1'b1;
      @(negedge clk);
      restart = 1'b0;
      n = 0; ones = 0; epochs = 0;
      while (n < 1023 + 20) begin
        chip_stb = ($urandom_range(0, 3) != 0);
        half     = $urandom_range(0, 1);
        boc_en   = $urandom_range(0, 1);
        #1;
        check(prn_chip == ca(p, n % 1023), "chip");
        check(ref_code == (ca(p, n % 1023) ^ (boc_en & half)), "BOC replica");
        check(chip_idx == 10'(n % 1023), "chip index");
        check(epoch_stb == (chip_stb && (n % 1023) == 1022), "epoch strobe");
        if (chip_stb) begin
          if (n < 1023 && prn_chip) ones++;
          if (epoch_stb) epochs++;
          n++;
        end
        @(negedge clk);
      end
      check(ones == 512, "balance: 512 ones per epoch");
      check(epochs == 1, "one epoch per 1023 chips");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
