// tb_mgd_mee: points of the two-path multipath error envelope for the
// prototype configuration (NG = 3, Delta_1 = 0.25 chip, envelope, SinBOC(1,1)).
//
// Four closed-loop trackers receive the same PRN 9 SinBOC(1,1) signal at 40
// samples per chip (IF carrier, -1/0/+1 noise, 4-bit samples):
//   0 narrow correlator   uniform,    8 ticks/chip, a = [1, 0, 0]
//   1 high resolution     uniform,    8 ticks/chip, a = [1, -0.5, 0]
//   2 MGD uniform         uniform,    8 ticks/chip, a = [1, -0.7, -0.2]
//   3 MGD decreasing      decreasing, 32 ticks/chip, a = [1, -0.9, 0.2]
// Each delay-line shape gets its own copy of the signal, shifted by its
// prompt delay, so all four start equally close to lock.
// The channel has a line-of-sight path and a second path of half its
// amplitude, delayed by d = 0.1, 0.2 or 0.3 chip, in phase (0) or in
// anti-phase (pi) with it; a single-path run comes first. Each run starts
// the replicas 0.02 chip off, settles for 12 ms and averages the code error
// of the line-of-sight path (prompt phase minus signal phase, in chips) over
// 12 ms.
//
// Checks:
//   * single path: every tracker unbiased within one sample (1/40 chip);
//   * narrow correlator at d = 0.1 chip: within 0.015 chip of the closed
//     form for the piecewise-linear SinBOC(1,1) correlation (slope 3 per
//     chip up to 0.5 chip): -alpha*d/(1+alpha) = -0.0333 in phase and
//     +0.0625 in anti-phase (both gates inside the main peak);
//   * the two MGDs and the HRC have a smaller mean absolute error over the
//     six channel points than the narrow correlator.
// A typical run gives mean absolute errors of about 16 m (narrow), 10 m
// (HRC and uniform MGD) and 5 m (decreasing MGD), the same ordering as the
// theoretical error envelopes of these discriminators.
module tb_mgd_mee;
  import mgd_pkg::*;
  import tb_gnss_pkg::*;

  localparam int PRN = 9;
  localparam int SPC = 40;
  localparam int NT = 4;
  localparam real PI = 3.14159265358979;
  localparam int NC_W = 2 * ACC_W + 1 + CNT_W;
  localparam int D_W = NC_W + 1 + COEF_W + 2;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [NCO_W-1:0] carr_incr, base_incr;
  logic signed [SAMPLE_W-1:0] smp[2];  // 0: for uniform trackers, 1: decreasing
  logic [6:0] loop_shift;
  logic signed [2:0][COEF_W-1:0] coef[NT];
  assign coef[0] = {COEF_W'(0), COEF_W'(0), COEF_W'(10)};
  assign coef[1] = {COEF_W'(0), COEF_W'(-5), COEF_W'(10)};
  assign coef[2] = {COEF_W'(-2), COEF_W'(-7), COEF_W'(10)};
  assign coef[3] = {COEF_W'(2), COEF_W'(-9), COEF_W'(10)};
  localparam int MULT[NT] = '{8, 8, 8, 32};
  localparam int P0[NT] = '{3, 3, 3, 7};

  logic dump[NT], ncv[NT], dv[NT];
  logic signed [6:0][ACC_W-1:0] ci[NT], cq[NT];
  logic [6:0][NC_W-1:0] nc[NT];
  logic signed [D_W-1:0] disc[NT];
  logic [NCO_W-1:0] incr[NT];
  logic [9:0] idx[NT];
  int m_checks[NT], m_fail[NT], m_dumps[NT], m_blocks[NT], m_discs[NT], m_pow1[NT], m_pow2[NT];
  longint m_last[NT];
  real pos[NT];  // replica code phase of tap 0, chips

  for (genvar k = 0; k < NT; k++) begin : g_trk
    localparam spacing_e SP = (k == 3) ? SPACING_DECREASING : SPACING_UNIFORM;
    mgd_tracker #(.SPACING(SP)) u_trk (
      .clk, .rst_n, .restart(1'b0), .prn(6'(PRN)), .boc_en(1'b1), .carr_incr,
      .base_code_incr(base_incr), .tick_mult(8'(MULT[k])), .n_coh(8'd1), .n_nc(8'd1),
      .pow(POW_ENVELOPE), .coef(coef[k]), .loop_en(1'b1), .loop_shift,
      .sample_valid(1'b1), .sample(smp[k == 3]),
      .dump_o(dump[k]), .corr_i_o(ci[k]), .corr_q_o(cq[k]), .nc_valid_o(ncv[k]), .nc_o(nc[k]),
      .disc_valid_o(dv[k]), .disc_o(disc[k]), .code_incr_o(incr[k]), .chip_idx_o(idx[k]));

    tb_tracker_monitor mon (
      .clk, .rst_n, .dump(dump[k]), .corr_i(ci[k]), .corr_q(cq[k]), .pow(POW_ENVELOPE),
      .n_nc(8'd1), .coef(coef[k]), .nc_valid(ncv[k]), .nc(nc[k]), .disc_valid(dv[k]),
      .disc(disc[k]), .checks(m_checks[k]), .failures(m_fail[k]), .n_dumps(m_dumps[k]),
      .n_blocks(m_blocks[k]), .n_discs(m_discs[k]), .n_pow1(m_pow1[k]), .n_pow2(m_pow2[k]),
      .last_disc(m_last[k]));

    always_comb pos[k] = real'(u_trk.u_channel.u_code_gen.idx_q)
                       + real'(u_trk.u_channel.u_code_nco.chip_q) / 4294967296.0;
  end

  int checks = 0, failures = 0;

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  real sig_phase, chips_per_sample, amp2, delay2;
  longint pcar;

  function automatic real wrap(input real e);
    while (e > 511.5) e -= 1023.0;
    while (e < -511.5) e += 1023.0;
    return e;
  endfunction

  function automatic real err(input int k);
    return wrap(pos[k] - sig_phase);
  endfunction

  // The signal for each delay-line shape is shifted by that shape's prompt
  // delay (P0 ticks), so both start with their prompt 0.02 chip off.
  always @(negedge clk) begin
    int noise;
    noise = $urandom_range(0, 2) - 1;
    for (int g = 0; g < 2; g++) begin
      real ph, v, c;
      int s;
      ph = sig_phase - real'(P0[3 * g]) / real'(MULT[3 * g]);
      while (ph < 0.0) ph += 1023.0;
      v = replica_at(PRN, ph, 1'b1) ? -1.0 : 1.0;
      if (amp2 != 0.0) begin
        real ph2;
        ph2 = ph - delay2;
        if (ph2 < 0.0) ph2 += 1023.0;
        v += amp2 * (replica_at(PRN, ph2, 1'b1) ? -1.0 : 1.0);
      end
      c = $cos(2.0 * PI * real'(pcar) / 4294967296.0 + 0.9);
      s = int'($floor(4.0 * v * c + 0.5)) + noise;
      if (s > 7) s = 7;
      if (s < -8) s = -8;
      smp[g] = SAMPLE_W'(s);
    end
  end

  always @(posedge clk) begin
    if (rst_n) begin
      sig_phase += chips_per_sample;
      if (sig_phase >= 1023.0) sig_phase -= 1023.0;
      pcar = (pcar + carr_incr) & 64'hFFFF_FFFF;
    end
  end

  task automatic wait_ms(input int n);
    int target;
    target = m_discs[0] + n;
    while (m_discs[0] < target) @(posedge clk);
  endtask

  // amp2 < 0 is the anti-phase second path.
  task automatic run(input real a2, input real d2, output real mean_err[NT]);
    real sum[NT];
    @(negedge clk);
    rst_n = 1'b0;
    amp2 = a2;
    delay2 = d2;
    pcar = 0;
    @(negedge clk);
    sig_phase = -0.02;
    rst_n = 1'b1;
    wait_ms(12);
    foreach (sum[k]) sum[k] = 0.0;
    for (int n = 0; n < 12 * 50; n++) begin
      repeat (SPC * 1023 / 50) @(posedge clk);
      for (int k = 0; k < NT; k++) sum[k] += err(k);
    end
    for (int k = 0; k < NT; k++) mean_err[k] = sum[k] / 600.0;
  endtask

  initial begin
    real e[NT], mae[NT];
    real d_list[3] = '{0.1, 0.2, 0.3};
    string names[NT] = '{"narrow", "HRC", "MGD-unif", "MGD-decr"};
    base_incr = NCO_W'(64'h1_0000_0000 / SPC);
    chips_per_sample = real'(base_incr) / 4294967296.0;
    carr_incr = 32'h2345_6789;
    loop_shift = 7'd8;
    pcar = 0; sig_phase = 0.0; amp2 = 0.0; delay2 = 0.0;
    foreach (mae[k]) mae[k] = 0.0;
    repeat (2) @(posedge clk);

    run(0.0, 0.0, e);
    for (int k = 0; k < NT; k++) begin
      $display("single path      %-8s error %8.5f chip", names[k], e[k]);
      check(e[k] < 1.0 / 40.0 && e[k] > -1.0 / 40.0, "single path unbiased");
    end
    for (int p = 0; p < 2; p++) begin
      for (int j = 0; j < 3; j++) begin
        run(p == 0 ? 0.5 : -0.5, d_list[j], e);
        for (int k = 0; k < NT; k++) begin
          $display("d=%3.1f %-9s %-8s error %8.5f chip (%6.2f m)", d_list[j],
                   p == 0 ? "in-phase" : "anti", names[k], e[k], e[k] * 293.25);
          mae[k] += (e[k] < 0.0 ? -e[k] : e[k]) / 6.0;
        end
        if (j == 0) begin
          real want;
          want = (p == 0) ? -0.5 * 0.1 / 1.5 : 0.0625;
          check(e[0] > want - 0.015 && e[0] < want + 0.015, "narrow correlator matches closed form");
        end
      end
    end
    for (int k = 0; k < NT; k++)
      $display("mean |error| %-8s %8.5f chip (%6.2f m)", names[k], mae[k], mae[k] * 293.25);
    for (int k = 1; k < NT; k++) check(mae[k] < mae[0], "smaller mean multipath error than narrow");

    for (int k = 0; k < NT; k++) begin
      checks += m_checks[k];
      failures += m_fail[k];
      check(m_discs[k] > 100, "loop updates");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200 * SPC * 1023) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
