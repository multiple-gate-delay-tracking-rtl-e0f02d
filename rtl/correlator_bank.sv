// correlator_bank: code wipe-off and integrate & dump for one branch (I or Q)
// of the tracking channel.
//
// Each of the NTAP lanes multiplies the carrier-wiped sample by its replica
// tap (0 = +1, 1 = -1, so the product is a conditional negation) and adds it
// to a lane accumulator. `epoch_stb` marks the last sample of a code epoch;
// after `n_coh` epochs (coherent integration N_c, 0 is taken as 1) every
// lane's sum, including that last sample, is copied to `corr_o`, the
// accumulators restart from zero and `dump_o` pulses for one clock. The
// outputs hold until the next dump. The sums are plain coherent sums; the
// 1/N_c scaling of the averaged correlation is left out because a common
// factor does not move the discriminator's zero crossing.
//
// Timing: `valid`, `x`, `taps` and `epoch_stb` must describe the same
// sample. `corr_o` and `dump_o` appear one clock after the cycle carrying
// the final `epoch_stb`. Sums wrap at ACC_W bits; ACC_W = 24 holds N_c = 8
// epochs of 16368 samples of magnitude 56 with margin.
//
// From the reference architecture: one correlator per replica tap followed
// by integrate & dump. Own choices: widths, the epoch-based dump and the
// coherent count.
module correlator_bank
  import mgd_pkg::*;
#(
  parameter int unsigned NTAP  = 2 * NG_DEFAULT + 1,
  parameter int unsigned X_W   = SAMPLE_W + TRIG_W,
  parameter int unsigned OUT_W = ACC_W
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           valid,
  input  logic signed [X_W-1:0]          x,
  input  logic [NTAP-1:0]                taps,
  input  logic                           epoch_stb,
  input  logic [CNT_W-1:0]               n_coh,
  output logic                           dump_o,
  output logic signed [NTAP-1:0][OUT_W-1:0] corr_o
);

  logic signed [NTAP-1:0][OUT_W-1:0] acc_q;
  logic signed [NTAP-1:0][OUT_W-1:0] acc_next;
  logic [CNT_W-1:0] epochs_q;
  logic             dump_now;

  always_comb begin
    for (int t = 0; t < NTAP; t++) begin
      if (!valid)       acc_next[t] = acc_q[t];
      else if (taps[t]) acc_next[t] = acc_q[t] - OUT_W'(x);
      else              acc_next[t] = acc_q[t] + OUT_W'(x);
    end
  end

  assign dump_now = epoch_stb && (epochs_q + 1'b1 >= n_coh);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_q    <= '0;
      corr_o   <= '0;
      epochs_q <= '0;
      dump_o   <= 1'b0;
    end else begin
      dump_o <= dump_now;
      if (dump_now) begin
        corr_o   <= acc_next;
        acc_q    <= '0;
        epochs_q <= '0;
      end else begin
        acc_q <= acc_next;
        if (epoch_stb) epochs_q <= epochs_q + 1'b1;
      end
    end
  end

endmodule
