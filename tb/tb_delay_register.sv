// tb_delay_register: self-checking test of the replica delay line.
//
// Eight instances cover Ng = 2..5 with uniform and with decreasing spacing.
// A random bit stream is shifted in on random ticks. The reference model
// keeps the shifted history and reads each tap at the delay implied by the
// gate spacings: the prompt sits P0 ticks behind the input and gate i's
// early/late taps h_i ticks before/after it, with
//   uniform:    P0 = Ng,         h_i = i
//   decreasing: P0 = 2^Ng - 1,   h_i = 2^(Ng-i) * (2^i - 1)
// (the latter is Delta_i/2 = (2^i-1)/2^(i-1) * Delta_1/2 with
// Delta_1/2 = 2^(Ng-1) ticks). It also checks Delta_2 = 2 Delta_1 (uniform)
// and Delta_2 = 1.5 Delta_1, Delta_3 = 1.75 Delta_1 (decreasing) on the
// model positions.
module tb_delay_register;
  import mgd_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic tick_stb, ref_code;

  always #5 clk = ~clk;

  int checks_a[8];
  int fails_a[8];
  bit done = 1'b0;

  for (genvar g = 0; g < 8; g++) begin : g_inst
    localparam int unsigned NG = 2 + g / 2;
    localparam spacing_e SP = (g % 2) ? SPACING_DECREASING : SPACING_UNIFORM;
    localparam int NTAP = 2 * NG + 1;
    logic [2*NG:0] taps;

    delay_register #(.NG(NG), .SPACING(SP)) dut (
      .clk, .rst_n, .tick_stb, .ref_code, .taps_o(taps));

    function automatic int pos(input int t);
      int p0, i, h;
      p0 = (SP == SPACING_UNIFORM) ? NG : (1 << NG) - 1;
      i  = (t < NG) ? (NG - t) : (t - NG);
      if (i == 0) h = 0;
      else h = (SP == SPACING_UNIFORM) ? i : (1 << (NG - i)) * ((1 << i) - 1);
      return (t < NG) ? p0 - h : p0 + h;
    endfunction

    bit hist[$];  // hist[0] = most recent shifted-in bit

    initial begin
      checks_a[g] = 0; fails_a[g] = 0;
      // spacing ratios of the model
      if (NG >= 3) begin
        int d1, d2, d3;
        d1 = pos(NG + 1) - pos(NG - 1);
        d2 = pos(NG + 2) - pos(NG - 2);
        d3 = pos(NG + 3) - pos(NG - 3);
        checks_a[g]++;
        if (SP == SPACING_UNIFORM ? (d2 != 2 * d1 || d3 != 3 * d1)
                                  : (2 * d2 != 3 * d1 || 4 * d3 != 7 * d1)) fails_a[g]++;
      end
      repeat (70) hist.push_front(1'b0);
      @(posedge rst_n);
      while (!done) begin
        @(negedge clk);
        #2;
        for (int t = 0; t < NTAP; t++) begin
          bit e;
          e = (t == 0) ? ref_code : hist[pos(t) - 1];
          checks_a[g]++;
          if (taps[t] !== e) begin
            fails_a[g]++;
            if (fails_a[g] < 5) $display("FAIL NG=%0d sp=%0d tap %0d", NG, SP, t);
          end
        end
        @(posedge clk);
        if (tick_stb) begin
          hist.push_front(ref_code);
          void'(hist.pop_back());
        end
      end
    end
  end

  initial begin
    int checks, failures;
    tick_stb = 1'b0; ref_code = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (3000) begin
      @(negedge clk);
      tick_stb = $urandom_range(0, 2) != 0;
      ref_code = $urandom_range(0, 1);
    end
    @(negedge clk);
    done = 1'b1;
    checks = 0; failures = 0;
    for (int g = 0; g < 8; g++) begin checks += checks_a[g]; failures += fails_a[g]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=0 failures=1");
    $finish;
  end
endmodule
