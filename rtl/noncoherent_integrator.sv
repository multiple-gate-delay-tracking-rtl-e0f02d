// noncoherent_integrator: sums N_nc successive envelopes per correlator tap.
//
// Each `valid` pulse brings one envelope (or squared envelope) per tap, the
// result of one coherent integration. The sums are kept in NTAP unsigned
// accumulators; when `n_nc` values have been added (0 is taken as 1) the
// totals are copied to `sum_o`, `valid_o` pulses for one clock and the
// accumulators restart. As with the coherent sums, the 1/N_nc average is
// replaced by the plain sum.
//
// Timing: `sum_o`/`valid_o` appear one clock after the `valid` that
// completes the block and hold until the next block completes.
//
// Noncoherent integration over N_nc blocks follows the reference structure;
// the widths and the count handling are own choices.
module noncoherent_integrator
  import mgd_pkg::*;
#(
  parameter int unsigned NTAP  = 2 * NG_DEFAULT + 1,
  parameter int unsigned IN_W  = 2 * ACC_W + 1,
  localparam int unsigned OUT_W = IN_W + CNT_W
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        valid,
  input  logic [NTAP-1:0][IN_W-1:0]   env,
  input  logic [CNT_W-1:0]            n_nc,
  output logic                        valid_o,
  output logic [NTAP-1:0][OUT_W-1:0]  sum_o
);

  logic [NTAP-1:0][OUT_W-1:0] acc_q, acc_next;
  logic [CNT_W-1:0]           cnt_q;
  logic                       done;

  always_comb begin
    for (int t = 0; t < NTAP; t++) acc_next[t] = acc_q[t] + OUT_W'(env[t]);
  end

  assign done = valid && (cnt_q + 1'b1 >= n_nc);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_q   <= '0;
      cnt_q   <= '0;
      sum_o   <= '0;
      valid_o <= 1'b0;
    end else begin
      valid_o <= done;
      if (done) begin
        sum_o <= acc_next;
        acc_q <= '0;
        cnt_q <= '0;
      end else if (valid) begin
        acc_q <= acc_next;
        cnt_q <= cnt_q + 1'b1;
      end
    end
  end

endmodule
