// mgd_tracker: multiple gate delay (MGD) code tracking channel for GPS and
// Galileo-type signals, with its discriminator and delay loop.
//
// Signal flow:
//   IF samples -> tracking_channel (carrier NCO + wipe-off, code NCO, code
//   generator, delay register with 2*NG+1 taps, 2 x (2*NG+1) integrate &
//   dump correlators, coherent integration over n_coh code epochs)
//   -> envelope_unit (|I+jQ| or |I+jQ|^2 per tap)
//   -> noncoherent_integrator (sum of n_nc blocks per tap)
//   -> mgd_discriminator (D = sum a_i (late_i - early_i), weights in tenths)
//   -> dll_loop_filter (code NCO increment = base - D >>> loop_shift)
//   -> back to the code NCO.
// NG and the delay-line SPACING are elaboration parameters (the uniform and
// decreasing delay lines are different hardware); everything else is set at
// run time: satellite code `prn`, BOC(1,1) or BPSK replica (`boc_en`),
// carrier and code NCO increments, delay-line tick rate (`tick_mult` ticks
// per chip, which fixes Delta_1), N_c, N_nc, pow_nc and the weights a_i.
// The narrow correlator and the high resolution correlator are the special
// cases coef = {10,0,0} and {10,-5,0} with uniform spacing.
//
// Timing: one sample per `sample_valid`. `dump_o` pulses when new coherent
// correlations appear on corr_i/corr_q; `disc_valid_o` pulses three clocks
// after the dump that completes a noncoherent block, with `disc_o` = 10*D;
// the new code increment acts one clock later.
//
// The chain of blocks follows the reference MGD structure and hardware
// channel. In the reference prototype the envelope, noncoherent sum,
// discriminator and loop ran in software; here they are hardware.
module mgd_tracker
  import mgd_pkg::*;
#(
  parameter int unsigned NG      = NG_DEFAULT,
  parameter spacing_e    SPACING = SPACING_UNIFORM,
  localparam int unsigned NTAP   = 2 * NG + 1,
  localparam int unsigned ENV_W  = 2 * ACC_W + 1,
  localparam int unsigned NC_W   = ENV_W + CNT_W,
  localparam int unsigned D_W    = NC_W + 1 + COEF_W + $clog2(NG + 1)
) (
  input  logic                              clk,
  input  logic                              rst_n,
  // channel set-up
  input  logic                              restart,
  input  logic [5:0]                        prn,
  input  logic                              boc_en,
  input  logic [NCO_W-1:0]                  carr_incr,
  input  logic [NCO_W-1:0]                  base_code_incr,
  input  logic [7:0]                        tick_mult,
  input  logic [CNT_W-1:0]                  n_coh,
  input  logic [CNT_W-1:0]                  n_nc,
  input  pow_e                              pow,
  input  logic signed [NG-1:0][COEF_W-1:0]  coef,
  input  logic                              loop_en,
  input  logic [6:0]                        loop_shift,
  // digital IF samples from the front end
  input  logic                              sample_valid,
  input  logic signed [SAMPLE_W-1:0]        sample,
  // results
  output logic                              dump_o,
  output logic signed [NTAP-1:0][ACC_W-1:0] corr_i_o,
  output logic signed [NTAP-1:0][ACC_W-1:0] corr_q_o,
  output logic                              nc_valid_o,
  output logic [NTAP-1:0][NC_W-1:0]         nc_o,
  output logic                              disc_valid_o,
  output logic signed [D_W-1:0]             disc_o,
  output logic [NCO_W-1:0]                  code_incr_o,
  output logic [$clog2(CA_LEN)-1:0]         chip_idx_o
);

  logic                      env_valid;
  logic [NTAP-1:0][ENV_W-1:0] env_w;

  tracking_channel #(.NG(NG), .SPACING(SPACING), .OUT_W(ACC_W)) u_channel (
    .clk, .rst_n, .restart, .prn, .boc_en, .sample_valid, .sample,
    .carr_incr, .code_incr(code_incr_o), .tick_mult, .n_coh,
    .dump_o, .corr_i(corr_i_o), .corr_q(corr_q_o), .chip_idx_o
  );

  envelope_unit #(.NTAP(NTAP), .IN_W(ACC_W)) u_env (
    .clk, .rst_n, .valid(dump_o), .pow, .corr_i(corr_i_o), .corr_q(corr_q_o),
    .valid_o(env_valid), .env_o(env_w)
  );

  noncoherent_integrator #(.NTAP(NTAP), .IN_W(ENV_W)) u_nc (
    .clk, .rst_n, .valid(env_valid), .env(env_w), .n_nc,
    .valid_o(nc_valid_o), .sum_o(nc_o)
  );

  mgd_discriminator #(.NG(NG), .IN_W(NC_W)) u_disc (
    .clk, .rst_n, .valid(nc_valid_o), .r(nc_o), .coef,
    .valid_o(disc_valid_o), .d_o(disc_o)
  );

  dll_loop_filter #(.D_W(D_W)) u_loop (
    .clk, .rst_n, .valid(disc_valid_o), .d(disc_o), .shift(loop_shift),
    .loop_en, .base_incr(base_code_incr), .code_incr_o
  );

endmodule
