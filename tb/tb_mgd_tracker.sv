// tb_mgd_tracker: end-to-end test of the MGD tracker.
//
// Two trackers run side by side, each fed its own simulated IF signal:
//   u_uni: NG = 3, uniform spacing, 8 ticks per chip (Delta_1 = 0.25 chip),
//          weights a = [1, -0.7, -0.2];
//   u_dec: NG = 3, decreasing spacing, 32 ticks per chip (Delta_1 = 0.25
//          chip, Delta_2 = 0.375, Delta_3 = 0.4375), weights a = [1, -0.9, 0.2].
// The signal is a PRN 3 replica (BPSK or BOC(1,1)) on an IF carrier at the
// carrier NCO frequency, 34 samples per chip, with -1/0/+1 noise; its code
// delay against each tracker's prompt replica is set per scenario:
//   A  open loop, BPSK, squared envelope, N_c = 1, N_nc = 2, replica 0.06
//      chip ahead of the signal: the discriminator must be positive;
//   B  open loop, BPSK, envelope, N_c = 2, N_nc = 1, replica 0.06 chip
//      behind: the discriminator must be negative;
//   C  closed loop, BOC(1,1), envelope, N_c = 1, N_nc = 1, replica 0.06 chip
//      ahead: after 20 ms the code error must stay within one sample
//      period (1/34 chip), the finest the sampled signal resolves.
// tb_tracker_monitor checks every envelope sum and discriminator value
// exactly against the dumped correlations. Each mechanism (coherent dump,
// multi-epoch coherent integration, noncoherent block, both nonlinearities,
// BOC and BPSK replicas, both spacings, loop correction) is counted and
// must occur.
module tb_mgd_tracker;
  import mgd_pkg::*;
  import tb_gnss_pkg::*;

  localparam int PRN = 3;
  localparam int NC_W = 2 * ACC_W + 1 + CNT_W;
  localparam int D_W = NC_W + 1 + COEF_W + 2;
  localparam real PI = 3.14159265358979;
  // Lock tolerance: one sample period (1/34 chip); code edges between
  // samples cannot be resolved more finely.
  localparam real LOCK = 1.0 / 34.0;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  // shared settings
  logic boc_en, loop_en;
  logic [CNT_W-1:0] n_coh, n_nc;
  pow_e pow;
  logic [6:0] loop_shift;
  logic [NCO_W-1:0] carr_incr, base_incr;
  logic signed [SAMPLE_W-1:0] smp[2];

  logic signed [2:0][COEF_W-1:0] coef_u, coef_d;
  assign coef_u = {COEF_W'(-2), COEF_W'(-7), COEF_W'(10)};
  assign coef_d = {COEF_W'(2), COEF_W'(-9), COEF_W'(10)};

  // per-instance outputs
  logic dump[2], ncv[2], dv[2];
  logic signed [6:0][ACC_W-1:0] ci[2], cq[2];
  logic [6:0][NC_W-1:0] nc[2];
  logic signed [D_W-1:0] disc[2];
  logic [NCO_W-1:0] incr[2];
  logic [9:0] idx[2];

  mgd_tracker u_uni (
    .clk, .rst_n, .restart(1'b0), .prn(6'(PRN)), .boc_en, .carr_incr,
    .base_code_incr(base_incr), .tick_mult(8'd8), .n_coh, .n_nc, .pow, .coef(coef_u),
    .loop_en, .loop_shift, .sample_valid(1'b1), .sample(smp[0]),
    .dump_o(dump[0]), .corr_i_o(ci[0]), .corr_q_o(cq[0]), .nc_valid_o(ncv[0]), .nc_o(nc[0]),
    .disc_valid_o(dv[0]), .disc_o(disc[0]), .code_incr_o(incr[0]), .chip_idx_o(idx[0]));

  mgd_tracker #(.NG(3), .SPACING(SPACING_DECREASING)) u_dec (
    .clk, .rst_n, .restart(1'b0), .prn(6'(PRN)), .boc_en, .carr_incr,
    .base_code_incr(base_incr), .tick_mult(8'd32), .n_coh, .n_nc, .pow, .coef(coef_d),
    .loop_en, .loop_shift, .sample_valid(1'b1), .sample(smp[1]),
    .dump_o(dump[1]), .corr_i_o(ci[1]), .corr_q_o(cq[1]), .nc_valid_o(ncv[1]), .nc_o(nc[1]),
    .disc_valid_o(dv[1]), .disc_o(disc[1]), .code_incr_o(incr[1]), .chip_idx_o(idx[1]));

  int m_checks[2], m_fail[2], m_dumps[2], m_blocks[2], m_discs[2], m_pow1[2], m_pow2[2];
  longint m_last[2];

  tb_tracker_monitor #(.NG(3)) mon_u (
    .clk, .rst_n, .dump(dump[0]), .corr_i(ci[0]), .corr_q(cq[0]), .pow, .n_nc, .coef(coef_u),
    .nc_valid(ncv[0]), .nc(nc[0]), .disc_valid(dv[0]), .disc(disc[0]),
    .checks(m_checks[0]), .failures(m_fail[0]), .n_dumps(m_dumps[0]), .n_blocks(m_blocks[0]),
    .n_discs(m_discs[0]), .n_pow1(m_pow1[0]), .n_pow2(m_pow2[0]), .last_disc(m_last[0]));

  tb_tracker_monitor #(.NG(3)) mon_d (
    .clk, .rst_n, .dump(dump[1]), .corr_i(ci[1]), .corr_q(cq[1]), .pow, .n_nc, .coef(coef_d),
    .nc_valid(ncv[1]), .nc(nc[1]), .disc_valid(dv[1]), .disc(disc[1]),
    .checks(m_checks[1]), .failures(m_fail[1]), .n_dumps(m_dumps[1]), .n_blocks(m_blocks[1]),
    .n_discs(m_discs[1]), .n_pow1(m_pow1[1]), .n_pow2(m_pow2[1]), .last_disc(m_last[1]));

  int checks = 0, failures = 0;
  int ev_multi_coh = 0, ev_boc = 0, ev_bpsk = 0, ev_loop = 0, ev_open = 0;

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------------------------------------------------------------
  // Signal generation. Each tracker's signal has its own code phase (in
  // chips); the carrier phase is shared and follows the carrier NCO.
  real sig_phase[2];
  real chips_per_sample;
  longint pcar;
  int p0[2] = '{3, 7};       // prompt tap delay in ticks
  int mult[2] = '{8, 32};    // ticks per chip

  // Prompt replica code phase of tracker k, in chips (modulo 1023).
  function automatic real prompt_phase(input int k);
    real ph;
    if (k == 0)
      ph = real'(u_uni.u_channel.u_code_gen.idx_q)
         + real'(u_uni.u_channel.u_code_nco.chip_q) / 4294967296.0;
    else
      ph = real'(u_dec.u_channel.u_code_gen.idx_q)
         + real'(u_dec.u_channel.u_code_nco.chip_q) / 4294967296.0;
    return ph - real'(p0[k]) / real'(mult[k]);
  endfunction

  // Code error in chips: > 0 when the replica is ahead of the signal.
  function automatic real code_error(input int k);
    real e;
    e = prompt_phase(k) - sig_phase[k];
    while (e > 511.5) e -= 1023.0;
    while (e < -511.5) e += 1023.0;
    return e;
  endfunction

  always @(negedge clk) begin
    for (int k = 0; k < 2; k++) begin
      int s;
      real ph;
      s = int'($floor(5.0 * $cos(2.0 * PI * real'(pcar) / 4294967296.0 + 1.1) + 0.5));
      ph = sig_phase[k];
      while (ph < 0.0) ph += 1023.0;
      if (replica_at(PRN, ph, boc_en)) s = -s;
      s += $urandom_range(0, 2) - 1;
      smp[k] = SAMPLE_W'(s);
    end
  end

  always @(posedge clk) begin
    if (rst_n) begin
      for (int k = 0; k < 2; k++) begin
        sig_phase[k] += chips_per_sample;
        if (sig_phase[k] >= 1023.0) sig_phase[k] -= 1023.0;
      end
      pcar = (pcar + carr_incr) & 64'hFFFF_FFFF;
      if (boc_en) ev_boc++; else ev_bpsk++;
      if (loop_en && (incr[0] != base_incr || incr[1] != base_incr)) ev_loop++;
    end
  end

  always @(posedge clk) if (rst_n && dump[0] && n_coh > 1) ev_multi_coh++;

  // Reset both trackers, apply settings and place each signal `tau` chips
  // behind (tau > 0) its tracker's prompt replica.
  task automatic start(input real tau, input bit boc, input pow_e pw, input int ncoh,
                       input int nnc, input bit closed);
    @(negedge clk);
    rst_n = 1'b0;
    boc_en = boc; pow = pw; n_coh = CNT_W'(ncoh); n_nc = CNT_W'(nnc); loop_en = closed;
    pcar = 0;
    @(negedge clk);
    for (int k = 0; k < 2; k++) sig_phase[k] = -real'(p0[k]) / real'(mult[k]) - tau;
    rst_n = 1'b1;
  endtask

  task automatic wait_discs(input int n);
    int target;
    target = m_discs[0] + n;
    while (m_discs[0] < target) @(posedge clk);
    @(posedge clk);
  endtask

  initial begin
    boc_en = 0; loop_en = 0; n_coh = 1; n_nc = 1; pow = POW_SQUARED; loop_shift = 7'd8;
    chips_per_sample = 1.0 / 34.0;
    base_incr = NCO_W'(64'h1_0000_0000 / 34);
    chips_per_sample = real'(base_incr) / 4294967296.0;
    carr_incr = 32'h1F5C_28F6;  // IF of about 0.1225 times the sample rate
    pcar = 0;
    sig_phase[0] = 0.0; sig_phase[1] = 0.0;
    repeat (2) @(posedge clk);

    // A: replica ahead, open loop
    start(0.06, 0, POW_SQUARED, 1, 2, 0);
    check(code_error(0) > 0.059 && code_error(0) < 0.061, "scenario A set-up");
    wait_discs(2);
    ev_open++;
    $display("A: disc uniform %0d decreasing %0d", m_last[0], m_last[1]);
    check(m_last[0] > 0 && m_last[1] > 0, "A: D > 0 with replica ahead");

    // B: replica behind, open loop, two-epoch coherent integration
    start(-0.06, 0, POW_ENVELOPE, 2, 1, 0);
    wait_discs(2);
    $display("B: disc uniform %0d decreasing %0d", m_last[0], m_last[1]);
    check(m_last[0] < 0 && m_last[1] < 0, "B: D < 0 with replica behind");

    // C: closed loop, BOC(1,1)
    start(0.06, 1, POW_ENVELOPE, 1, 1, 1);
    for (int ms = 0; ms < 30; ms++) begin
      wait_discs(1);
      if (ms % 5 == 4)
        $display("C: %0d ms error uniform %f decreasing %f chip", ms + 1, code_error(0),
                 code_error(1));
      if (ms >= 20) begin
        check(code_error(0) < LOCK && code_error(0) > -LOCK, "C: uniform locked");
        check(code_error(1) < LOCK && code_error(1) > -LOCK, "C: decreasing locked");
      end
    end

    // every mechanism must have happened
    for (int k = 0; k < 2; k++) begin
      check(m_dumps[k] > 0, "coherent dumps");
      check(m_blocks[k] > 0, "noncoherent blocks");
      check(m_discs[k] > 0, "discriminator updates");
      check(m_pow1[k] > 0, "envelope nonlinearity used");
      check(m_pow2[k] > 0, "squared-envelope nonlinearity used");
      checks += m_checks[k];
      failures += m_fail[k];
    end
    check(ev_multi_coh > 0, "multi-epoch coherent integration");
    check(ev_boc > 0 && ev_bpsk > 0, "BOC and BPSK replicas");
    check(ev_loop > 0 && ev_open > 0, "loop corrections and open loop");
    $display("events: dumps %0d/%0d blocks %0d/%0d discs %0d/%0d pow1 %0d pow2 %0d multi-coh %0d loop %0d",
             m_dumps[0], m_dumps[1], m_blocks[0], m_blocks[1], m_discs[0], m_discs[1],
             m_pow1[0], m_pow2[0], ev_multi_coh, ev_loop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
