// tracking_channel: one hardware delay tracking channel of the MGD receiver.
//
// Data path per input sample:
//   sample --x sin--> I branch --x replica tap t--> integrate & dump -> corr_i[t]
//          --x cos--> Q branch --x replica tap t--> integrate & dump -> corr_q[t]
// The carrier NCO gives the sine and cosine that strip the IF carrier; the
// code NCO paces the code generator (one chip per carry) and the delay
// register (one shift per tick); the delay register turns the replica into
// 2*NG+1 taps (NG early, prompt, NG late); each branch has one correlator per
// tap. With NG = 3 these are the seven correlators per branch of the
// reference channel.
//
// Both NCOs advance on `sample_valid`, so frequencies are fractions of the
// sample rate: carrier f = carr_incr/2^32 * fs, code f = code_incr/2^32 * fs,
// tick f = tick_mult * code f. The replica taps and the epoch strobe are
// delayed by one clock to line up with the registered carrier wipe-off.
// `dump_o` pulses when a coherent integration of `n_coh` code epochs ends;
// `corr_i`/`corr_q` then hold the new sums until the next dump.
// `restart` restarts the code at chip 0 with a new `prn`.
//
// Block structure and the 32-bit NCOs follow the reference architecture;
// the GPS C/A code, widths and alignment registers are own choices (see the
// sub-blocks).
module tracking_channel
  import mgd_pkg::*;
#(
  parameter int unsigned NG      = NG_DEFAULT,
  parameter spacing_e    SPACING = SPACING_UNIFORM,
  parameter int unsigned OUT_W   = ACC_W
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic                             restart,
  input  logic [5:0]                       prn,
  input  logic                             boc_en,
  input  logic                             sample_valid,
  input  logic signed [SAMPLE_W-1:0]       sample,
  input  logic [NCO_W-1:0]                 carr_incr,
  input  logic [NCO_W-1:0]                 code_incr,
  input  logic [7:0]                       tick_mult,
  input  logic [CNT_W-1:0]                 n_coh,
  output logic                             dump_o,
  output logic signed [2*NG:0][OUT_W-1:0]  corr_i,
  output logic signed [2*NG:0][OUT_W-1:0]  corr_q,
  output logic [$clog2(CA_LEN)-1:0]        chip_idx_o
);

  localparam int unsigned NTAP = 2 * NG + 1;
  localparam int unsigned X_W  = SAMPLE_W + TRIG_W;

  logic signed [TRIG_W-1:0] sin_w, cos_w;
  logic [NCO_W-1:0]         carr_phase_w, chip_phase_w;
  logic                     chip_stb, tick_stb, half_w;
  logic                     ref_code_w, prn_chip_w, epoch_w;
  logic [NTAP-1:0]          taps_w;

  carrier_nco u_carr_nco (
    .clk, .rst_n, .en(sample_valid), .incr(carr_incr),
    .phase_o(carr_phase_w), .sin_o(sin_w), .cos_o(cos_w)
  );

  code_nco u_code_nco (
    .clk, .rst_n, .en(sample_valid), .code_incr, .tick_mult,
    .chip_stb, .tick_stb, .half_o(half_w), .chip_phase_o(chip_phase_w)
  );

  code_gen u_code_gen (
    .clk, .rst_n, .restart, .prn, .chip_stb, .half(half_w), .boc_en,
    .ref_code_o(ref_code_w), .prn_chip_o(prn_chip_w), .epoch_stb(epoch_w),
    .chip_idx_o
  );

  delay_register #(.NG(NG), .SPACING(SPACING)) u_delay (
    .clk, .rst_n, .tick_stb, .ref_code(ref_code_w), .taps_o(taps_w)
  );

  // Carrier wipe-off (one clock) and matching delay of taps and epoch strobe.
  logic                  wo_valid;
  logic signed [X_W-1:0] wo_i, wo_q;
  logic [NTAP-1:0]       taps_q;
  logic                  epoch_q;

  carrier_wipeoff u_wipeoff (
    .clk, .rst_n, .sample_valid, .sample, .sin_i(sin_w), .cos_i(cos_w),
    .valid_o(wo_valid), .i_o(wo_i), .q_o(wo_q)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      taps_q  <= '0;
      epoch_q <= 1'b0;
    end else begin
      taps_q  <= taps_w;
      epoch_q <= epoch_w & ~restart;
    end
  end

  logic dump_q_w;

  correlator_bank #(.NTAP(NTAP), .X_W(X_W), .OUT_W(OUT_W)) u_corr_i (
    .clk, .rst_n, .valid(wo_valid), .x(wo_i), .taps(taps_q),
    .epoch_stb(epoch_q), .n_coh, .dump_o, .corr_o(corr_i)
  );

  correlator_bank #(.NTAP(NTAP), .X_W(X_W), .OUT_W(OUT_W)) u_corr_q (
    .clk, .rst_n, .valid(wo_valid), .x(wo_q), .taps(taps_q),
    .epoch_stb(epoch_q), .n_coh, .dump_o(dump_q_w), .corr_o(corr_q)
  );

  // Both branches share the epoch count, so their dumps coincide.
  a_dumps_aligned: assert property (@(posedge clk) disable iff (!rst_n)
    dump_o == dump_q_w);

endmodule
