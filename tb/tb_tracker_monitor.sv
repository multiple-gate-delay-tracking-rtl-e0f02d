// tb_tracker_monitor: checker for the post-correlation part of mgd_tracker,
// used by the end-to-end testbenches.
//
// On every correlator dump it forms the expected envelope of each tap from
// the dumped I/Q values (I^2+Q^2 or floor(sqrt(I^2+Q^2)), computed here in
// 64-bit and floating-point arithmetic), adds it to its own noncoherent
// sums and, after n_nc dumps, expects those sums on nc_o with nc_valid, and
// one clock later the discriminator sum_i coef_i (nc[NG+i] - nc[NG-i]).
// Counts checks, failures and how often each event happened.
module tb_tracker_monitor
  import mgd_pkg::*;
#(
  parameter int NG = 3,
  localparam int NTAP = 2 * NG + 1,
  localparam int NC_W = 2 * ACC_W + 1 + CNT_W,
  localparam int D_W = NC_W + 1 + COEF_W + $clog2(NG + 1)
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              dump,
  input  logic signed [NTAP-1:0][ACC_W-1:0] corr_i,
  input  logic signed [NTAP-1:0][ACC_W-1:0] corr_q,
  input  pow_e                              pow,
  input  logic [CNT_W-1:0]                  n_nc,
  input  logic signed [NG-1:0][COEF_W-1:0]  coef,
  input  logic                              nc_valid,
  input  logic [NTAP-1:0][NC_W-1:0]         nc,
  input  logic                              disc_valid,
  input  logic signed [D_W-1:0]             disc,
  output int                                checks,
  output int                                failures,
  output int                                n_dumps,
  output int                                n_blocks,
  output int                                n_discs,
  output int                                n_pow1,
  output int                                n_pow2,
  output longint                            last_disc
);

  longint acc[NTAP];
  longint held[NTAP];
  int     cnt;
  longint exp_d;
  bit     exp_d_pending;
  int     nc_due;  // clocks until the noncoherent sums are due

  function automatic longint floor_sqrt(input longint v);
    longint r;
    r = longint'($sqrt(real'(v)));
    while (r * r > v) r--;
    while ((r + 1) * (r + 1) <= v) r++;
    return r;
  endfunction

  function automatic longint sx(input logic [ACC_W-1:0] v);
    return longint'(signed'(v));
  endfunction

  initial begin
    checks = 0; failures = 0; n_dumps = 0; n_blocks = 0; n_discs = 0;
    n_pow1 = 0; n_pow2 = 0; last_disc = 0;
  end

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      foreach (acc[t]) acc[t] = 0;
      cnt = 0;
      nc_due = 0;
      exp_d_pending = 0;
    end else begin
      // discriminator one clock after the noncoherent sums
      if (exp_d_pending) begin
        checks++;
        if (!disc_valid || longint'(disc) != exp_d) begin
          failures++;
          $display("FAIL disc %0d exp %0d (valid %0b)", disc, exp_d, disc_valid);
        end
        n_discs++;
        last_disc = longint'(disc);
        exp_d_pending = 0;
      end else if (disc_valid) begin
        failures++;
        $display("FAIL unexpected disc_valid");
      end
      if (nc_due == 1) begin
        checks++;
        if (!nc_valid) begin failures++; $display("FAIL nc_valid missing"); end
        for (int t = 0; t < NTAP; t++) begin
          checks++;
          if (longint'(nc[t]) != held[t]) begin
            failures++;
            $display("FAIL nc[%0d] %0d exp %0d", t, nc[t], held[t]);
          end
        end
        exp_d = 0;
        for (int i = 1; i <= NG; i++)
          exp_d += longint'(signed'(coef[i-1])) * (held[NG+i] - held[NG-i]);
        exp_d_pending = 1;
        n_blocks++;
      end else if (nc_valid) begin
        failures++;
        $display("FAIL unexpected nc_valid");
      end
      if (nc_due > 0) nc_due--;
      // envelope and noncoherent model, result due two clocks after a dump
      if (dump) begin
        n_dumps++;
        if (pow == POW_SQUARED) n_pow2++; else n_pow1++;
        for (int t = 0; t < NTAP; t++) begin
          longint p;
          p = sx(corr_i[t]) * sx(corr_i[t]) + sx(corr_q[t]) * sx(corr_q[t]);
          acc[t] += (pow == POW_SQUARED) ? p : floor_sqrt(p);
        end
        cnt++;
        if (cnt >= ((n_nc == 0) ? 1 : int'(n_nc))) begin
          foreach (acc[t]) begin held[t] = acc[t]; acc[t] = 0; end
          cnt = 0;
          nc_due = 2;  // envelope register, then the sum register
        end
      end
    end
  end

endmodule
