// tb_code_nco: self-checking test of the code NCO.
//
// Reference model: two 64-bit accumulators, one adding code_incr and one
// adding code_incr * tick_mult, whose carries beyond bit 32 give the
// expected chip and tick strobes. Checks every cycle the strobes, the
// half-chip flag and the phase, and checks the tick rate: exactly
// tick_mult ticks per chip (8 per chip is the 8.184 MHz delay-register rate
// for a 1.023 MHz code, 32 per chip the 32.736 MHz rate). Runs several
// (increment, multiplier) settings, with random enables.
module tb_code_nco;
  import mgd_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic en;
  logic [NCO_W-1:0] code_incr;
  logic [7:0] tick_mult;
  logic chip_stb, tick_stb, half;
  logic [NCO_W-1:0] chip_phase;

  int checks = 0, failures = 0;

  code_nco dut (.clk, .rst_n, .en, .code_incr, .tick_mult, .chip_stb, .tick_stb,
                .half_o(half), .chip_phase_o(chip_phase));

  always #5 clk = ~clk;

  longint unsigned chip_m, tick_m;
  int ticks_in_chip, chips;

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    int mults[4] = '{8, 32, 20, 16};
    en = 1'b0; code_incr = '0; tick_mult = 8'd8;
    chip_m = 0; tick_m = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    foreach (mults[m]) begin
      // about 40 samples per chip; mult * incr stays below 2^32
      ticks_in_chip = -1;  // first chip after a change is partial
      chips = 0;
      for (int n = 0; n < 40000; n++) begin
        @(negedge clk);
        if (n == 0) begin
          tick_mult = 8'(mults[m]);
          code_incr = NCO_W'(64'h1_0000_0000 / (40 + m)) + NCO_W'($urandom_range(0, 1000));
        end
        en = ($urandom_range(0, 7) != 0);
        #1;
        begin
          longint unsigned cs, ts;
          bit exp_chip, exp_tick;
          cs = chip_m + (en ? longint'(code_incr) : 0);
          ts = tick_m + (en ? ((longint'(code_incr) * tick_mult) & 64'hFFFF_FFFF) : 0);
          exp_chip = cs[32];
          exp_tick = ts[32];
          check(chip_stb == exp_chip, "chip_stb");
          check(tick_stb == exp_tick, "tick_stb");
          check(chip_phase == NCO_W'(chip_m) && half == chip_m[31], "phase/half");
          // tick-rate check: ticks counted between chip strobes
          if (exp_tick && ticks_in_chip >= 0) ticks_in_chip++;
          if (exp_chip) begin
            if (ticks_in_chip >= 0) begin
              check(ticks_in_chip == mults[m], "ticks per chip");
              chips++;
            end
            ticks_in_chip = 0;
          end
          chip_m = cs & 64'hFFFF_FFFF;
          tick_m = ts & 64'hFFFF_FFFF;
        end
      end
      check(chips > 500, "enough chips observed");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
