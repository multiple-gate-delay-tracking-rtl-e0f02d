// tb_mgd_multipath: the static-channel scenarios run through three trackers.
//
// Three default trackers (NG = 3, uniform spacing, Delta_1 = 0.1 chip via
// 20 ticks per chip, squared envelope, N_c = N_nc = 1, closed loop) differ
// only in their weights:
//   narrow correlator        a = [1, 0, 0]
//   high resolution corr.    a = [1, -0.5, 0]
//   MGD (optimised)          a = [1, -0.7, 0.1]
// They receive the same PRN 5 SinBOC(1,1) signal, 80 samples per chip,
// on an IF carrier with -1/0/+1 noise, through
//   scenario 1: one path;
//   scenario 2: two in-phase static paths, delays 0 and 0.2 chip, relative
//               gains 0 and -3 dB.
// Each scenario starts with the replicas 0.03 chip ahead, lets the loops
// settle for 15 ms and then averages the code error of the line-of-sight
// path over 25 ms (error = replica prompt phase minus signal phase, so a
// replica dragged late by the delayed path reads negative). Checks: in
// scenario 1 every tracker is unbiased to within one sample (1/80 chip); in
// scenario 2 the narrow correlator is dragged late by 8 to 15 m (its
// error-envelope value for this channel is 11 m) and the MGD has the
// smaller absolute bias. Errors are also printed in
// metres (1 chip = 293.25 m). A loop shift of 30 gives a stable loop for
// the squared envelope at this sample rate; this run settles at about
// -11 m for the narrow correlator, -3 m for HRC and under 1 m for the MGD.
module tb_mgd_multipath;
  import mgd_pkg::*;
  import tb_gnss_pkg::*;

  localparam int PRN = 5;
  localparam int SPC = 80;          // samples per chip
  localparam int MULT = 20;         // ticks per chip: Delta_1 = 2/20 chip
  localparam int P0 = 3;
  localparam real PI = 3.14159265358979;
  localparam int NC_W = 2 * ACC_W + 1 + CNT_W;
  localparam int D_W = NC_W + 1 + COEF_W + 2;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [NCO_W-1:0] carr_incr, base_incr;
  logic signed [SAMPLE_W-1:0] smp;
  logic [6:0] loop_shift;
  logic signed [2:0][COEF_W-1:0] coef[3];
  assign coef[0] = {COEF_W'(0), COEF_W'(0), COEF_W'(10)};
  assign coef[1] = {COEF_W'(0), COEF_W'(-5), COEF_W'(10)};
  assign coef[2] = {COEF_W'(1), COEF_W'(-7), COEF_W'(10)};

  logic dump[3], ncv[3], dv[3];
  logic signed [6:0][ACC_W-1:0] ci[3], cq[3];
  logic [6:0][NC_W-1:0] nc[3];
  logic signed [D_W-1:0] disc[3];
  logic [NCO_W-1:0] incr[3];
  logic [9:0] idx[3];
  int m_checks[3], m_fail[3], m_dumps[3], m_blocks[3], m_discs[3], m_pow1[3], m_pow2[3];
  longint m_last[3];

  for (genvar k = 0; k < 3; k++) begin : g_trk
    mgd_tracker u_trk (
      .clk, .rst_n, .restart(1'b0), .prn(6'(PRN)), .boc_en(1'b1), .carr_incr,
      .base_code_incr(base_incr), .tick_mult(8'(MULT)), .n_coh(8'd1), .n_nc(8'd1),
      .pow(POW_SQUARED), .coef(coef[k]), .loop_en(1'b1), .loop_shift,
      .sample_valid(1'b1), .sample(smp),
      .dump_o(dump[k]), .corr_i_o(ci[k]), .corr_q_o(cq[k]), .nc_valid_o(ncv[k]), .nc_o(nc[k]),
      .disc_valid_o(dv[k]), .disc_o(disc[k]), .code_incr_o(incr[k]), .chip_idx_o(idx[k]));

    tb_tracker_monitor mon (
      .clk, .rst_n, .dump(dump[k]), .corr_i(ci[k]), .corr_q(cq[k]), .pow(POW_SQUARED),
      .n_nc(8'd1), .coef(coef[k]), .nc_valid(ncv[k]), .nc(nc[k]), .disc_valid(dv[k]),
      .disc(disc[k]), .checks(m_checks[k]), .failures(m_fail[k]), .n_dumps(m_dumps[k]),
      .n_blocks(m_blocks[k]), .n_discs(m_discs[k]), .n_pow1(m_pow1[k]), .n_pow2(m_pow2[k]),
      .last_disc(m_last[k]));

  end

  int checks = 0, failures = 0;

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  real sig_phase, chips_per_sample, gain2;
  longint pcar;
  bit two_path;

  function automatic real wrap(input real e);
    while (e > 511.5) e -= 1023.0;
    while (e < -511.5) e += 1023.0;
    return e;
  endfunction

  function automatic real err(input int k);
    real p;
    case (k)
      0: p = real'(g_trk[0].u_trk.u_channel.u_code_gen.idx_q)
           + real'(g_trk[0].u_trk.u_channel.u_code_nco.chip_q) / 4294967296.0;
      1: p = real'(g_trk[1].u_trk.u_channel.u_code_gen.idx_q)
           + real'(g_trk[1].u_trk.u_channel.u_code_nco.chip_q) / 4294967296.0;
      default: p = real'(g_trk[2].u_trk.u_channel.u_code_gen.idx_q)
           + real'(g_trk[2].u_trk.u_channel.u_code_nco.chip_q) / 4294967296.0;
    endcase
    p -= real'(P0) / real'(MULT);
    return wrap(p - sig_phase);
  endfunction

  always @(negedge clk) begin
    real ph, v, c;
    int s;
    ph = sig_phase;
    while (ph < 0.0) ph += 1023.0;
    v = replica_at(PRN, ph, 1'b1) ? -1.0 : 1.0;
    if (two_path) begin
      real ph2;
      ph2 = ph - 0.2;
      if (ph2 < 0.0) ph2 += 1023.0;
      v += gain2 * (replica_at(PRN, ph2, 1'b1) ? -1.0 : 1.0);
    end
    c = $cos(2.0 * PI * real'(pcar) / 4294967296.0 + 0.4);
    s = int'($floor(3.5 * v * c + 0.5)) + $urandom_range(0, 2) - 1;
    smp = SAMPLE_W'(s);
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

  task automatic run(input bit two, output real mean_err[3]);
    real sum[3];
    @(negedge clk);
    rst_n = 1'b0;
    two_path = two;
    pcar = 0;
    @(negedge clk);
    sig_phase = -real'(P0) / real'(MULT) - 0.03;
    rst_n = 1'b1;
    wait_ms(15);
    foreach (sum[k]) sum[k] = 0.0;
    for (int n = 0; n < 25 * 100; n++) begin  // 100 error samples per ms
      repeat (SPC * 1023 / 100) @(posedge clk);
      for (int k = 0; k < 3; k++) sum[k] += err(k);
    end
    for (int k = 0; k < 3; k++) mean_err[k] = sum[k] / 2500.0;
  endtask

  initial begin
    real e1[3], e2[3];
    string names[3] = '{"narrow", "HRC", "MGD"};
    base_incr = NCO_W'(64'h1_0000_0000 / SPC);
    chips_per_sample = real'(base_incr) / 4294967296.0;
    carr_incr = 32'h1F5C_28F6;
    gain2 = 0.70795;  // -3 dB in amplitude
    loop_shift = 7'd30;
    pcar = 0; sig_phase = 0.0; two_path = 0;
    repeat (2) @(posedge clk);

    run(0, e1);
    for (int k = 0; k < 3; k++) begin
      $display("scenario 1 %-6s mean error %8.5f chip (%6.2f m)", names[k], e1[k], e1[k] * 293.25);
      check(e1[k] < 1.0 / 80.0 && e1[k] > -1.0 / 80.0, "single path unbiased");
    end
    run(1, e2);
    for (int k = 0; k < 3; k++)
      $display("scenario 2 %-6s mean error %8.5f chip (%6.2f m)", names[k], e2[k], e2[k] * 293.25);
    check(e2[0] * 293.25 < -8.0 && e2[0] * 293.25 > -15.0,
          "two-path: narrow correlator settles near its 11 m error-envelope value");
    check((e2[2] < 0 ? -e2[2] : e2[2]) < -e2[0], "two-path: MGD bias below narrow correlator");

    for (int k = 0; k < 3; k++) begin
      checks += m_checks[k];
      failures += m_fail[k];
      check(m_discs[k] > 60, "loop updates");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (90 * SPC * 1023) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
