// tb_mgd_tracker_full: one complete tracking operation of mgd_tracker with
// every parameter at its default (NG = 3, uniform spacing).
//
// A PRN 3 BPSK signal on an IF carrier at the carrier NCO frequency, 34
// samples per chip, with -1/0/+1 noise; 8 ticks per chip give
// Delta_1 = 0.25 chip, with the BPSK weights a = [1, -0.5, 0].
//   1. open loop, squared envelope, N_c = 1, N_nc = 2, replica 0.06 chip
//      ahead of the signal: the discriminator must be positive;
//   2. closed loop, envelope, N_c = N_nc = 1, replica 0.08 chip ahead: after
//      12 ms the code error must stay within one sample period (1/34 chip).
// tb_tracker_monitor checks every envelope sum and discriminator value
// exactly against the dumped correlations.
module tb_mgd_tracker_full;
  import mgd_pkg::*;
  import tb_gnss_pkg::*;

  localparam int PRN = 3;
  localparam int NC_W = 2 * ACC_W + 1 + CNT_W;
  localparam int D_W = NC_W + 1 + COEF_W + 2;
  localparam real PI = 3.14159265358979;
  localparam real LOCK = 1.0 / 34.0;
  localparam int P0 = 3, MULT = 8;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic loop_en;
  logic [CNT_W-1:0] n_coh, n_nc;
  pow_e pow;
  logic [NCO_W-1:0] carr_incr, base_incr;
  logic signed [SAMPLE_W-1:0] smp;
  logic signed [2:0][COEF_W-1:0] coef;
  assign coef = {COEF_W'(0), COEF_W'(-5), COEF_W'(10)};

  logic dump, ncv, dv;
  logic signed [6:0][ACC_W-1:0] ci, cq;
  logic [6:0][NC_W-1:0] nc;
  logic signed [D_W-1:0] disc;
  logic [NCO_W-1:0] incr;
  logic [9:0] idx;

  mgd_tracker dut (
    .clk, .rst_n, .restart(1'b0), .prn(6'(PRN)), .boc_en(1'b0), .carr_incr,
    .base_code_incr(base_incr), .tick_mult(8'(MULT)), .n_coh, .n_nc, .pow, .coef,
    .loop_en, .loop_shift(7'd8), .sample_valid(1'b1), .sample(smp),
    .dump_o(dump), .corr_i_o(ci), .corr_q_o(cq), .nc_valid_o(ncv), .nc_o(nc),
    .disc_valid_o(dv), .disc_o(disc), .code_incr_o(incr), .chip_idx_o(idx));

  int m_checks, m_fail, m_dumps, m_blocks, m_discs, m_pow1, m_pow2;
  longint m_last;

  tb_tracker_monitor mon (
    .clk, .rst_n, .dump, .corr_i(ci), .corr_q(cq), .pow, .n_nc, .coef,
    .nc_valid(ncv), .nc, .disc_valid(dv), .disc,
    .checks(m_checks), .failures(m_fail), .n_dumps(m_dumps), .n_blocks(m_blocks),
    .n_discs(m_discs), .n_pow1(m_pow1), .n_pow2(m_pow2), .last_disc(m_last));

  int checks = 0, failures = 0, ev_loop = 0;

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  real sig_phase, chips_per_sample;
  longint pcar;

  function automatic real code_error();
    real e;
    e = real'(dut.u_channel.u_code_gen.idx_q)
      + real'(dut.u_channel.u_code_nco.chip_q) / 4294967296.0
      - real'(P0) / real'(MULT) - sig_phase;
    while (e > 511.5) e -= 1023.0;
    while (e < -511.5) e += 1023.0;
    return e;
  endfunction

  always @(negedge clk) begin
    int s;
    real ph;
    s = int'($floor(5.0 * $cos(2.0 * PI * real'(pcar) / 4294967296.0 + 1.1) + 0.5));
    ph = sig_phase;
    while (ph < 0.0) ph += 1023.0;
    if (replica_at(PRN, ph, 1'b0)) s = -s;
    s += $urandom_range(0, 2) - 1;
    smp = SAMPLE_W'(s);
  end

  always @(posedge clk) begin
    if (rst_n) begin
      sig_phase += chips_per_sample;
      if (sig_phase >= 1023.0) sig_phase -= 1023.0;
      pcar = (pcar + carr_incr) & 64'hFFFF_FFFF;
      if (loop_en && incr != base_incr) ev_loop++;
    end
  end

  task automatic start(input real tau, input pow_e pw, input int nnc, input bit closed);
    @(negedge clk);
    rst_n = 1'b0;
    pow = pw; n_coh = 8'd1; n_nc = CNT_W'(nnc); loop_en = closed;
    pcar = 0;
    @(negedge clk);
    sig_phase = -real'(P0) / real'(MULT) - tau;
    rst_n = 1'b1;
  endtask

  task automatic wait_discs(input int n);
    int target;
    target = m_discs + n;
    while (m_discs < target) @(posedge clk);
    @(posedge clk);
  endtask

  initial begin
    loop_en = 0; n_coh = 1; n_nc = 1; pow = POW_SQUARED;
    base_incr = NCO_W'(64'h1_0000_0000 / 34);
    chips_per_sample = real'(base_incr) / 4294967296.0;
    carr_incr = 32'h1F5C_28F6;
    pcar = 0; sig_phase = 0.0;
    repeat (2) @(posedge clk);

    start(0.06, POW_SQUARED, 2, 0);
    wait_discs(1);
    $display("open loop: disc %0d", m_last);
    check(m_last > 0, "D > 0 with replica ahead");

    start(0.08, POW_ENVELOPE, 1, 1);
    for (int ms = 0; ms < 16; ms++) begin
      wait_discs(1);
      if (ms % 4 == 3) $display("closed loop: %0d ms error %f chip", ms + 1, code_error());
      if (ms >= 12) check(code_error() < LOCK && code_error() > -LOCK, "locked");
    end

    check(m_dumps > 0 && m_blocks > 0 && m_discs > 0, "dumps, blocks, discriminator");
    check(m_pow1 > 0 && m_pow2 > 0, "both nonlinearities");
    check(ev_loop > 0, "loop corrections");
    checks += m_checks;
    failures += m_fail;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
