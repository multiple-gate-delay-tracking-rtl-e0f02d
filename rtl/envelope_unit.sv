// envelope_unit: the noncoherent nonlinearity |.|^pow_nc applied to every
// correlator output.
//
// For each tap t the complex correlation I + jQ is turned into
//   pow = POW_SQUARED  (pow_nc = 2): I^2 + Q^2          (squared envelope)
//   pow = POW_ENVELOPE (pow_nc = 1): floor(sqrt(I^2+Q^2)) (envelope)
// The square root is a bit-serial integer square root unrolled into
// combinational logic (one conditional subtraction per result bit). Squared
// envelopes avoid the root; envelopes gave the smaller multipath errors in
// the optimisation, so both are selectable at run time.
//
// Timing: results are registered; `valid_o` follows `valid` by one clock.
// ENV_W = 2*IN_W + 1 bits hold the squared envelope; the envelope uses the
// low IN_W + 1 bits.
//
// The choice between envelope and squared envelope follows the reference
// design; the integer square root and the widths are own choices.
module envelope_unit
  import mgd_pkg::*;
#(
  parameter int unsigned NTAP = 2 * NG_DEFAULT + 1,
  parameter int unsigned IN_W = ACC_W,
  localparam int unsigned ENV_W = 2 * IN_W + 1
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              valid,
  input  pow_e                              pow,
  input  logic signed [NTAP-1:0][IN_W-1:0]  corr_i,
  input  logic signed [NTAP-1:0][IN_W-1:0]  corr_q,
  output logic                              valid_o,
  output logic [NTAP-1:0][ENV_W-1:0]        env_o
);

  localparam int unsigned ROOT_W = (ENV_W + 1) / 2;

  // floor(sqrt(v)) by the restoring digit-by-digit method.
  function automatic logic [ROOT_W-1:0] isqrt(input logic [ENV_W-1:0] v);
    logic [2*ROOT_W-1:0] rem, bitv, res;
    rem  = (2 * ROOT_W)'(v);
    res  = '0;
    bitv = (2 * ROOT_W)'(1) << (2 * ROOT_W - 2);
    for (int k = 0; k < ROOT_W; k++) begin
      if (rem >= res + bitv) begin
        rem = rem - (res + bitv);
        res = (res >> 1) + bitv;
      end else begin
        res = res >> 1;
      end
      bitv = bitv >> 2;
    end
    return ROOT_W'(res);
  endfunction

  logic [NTAP-1:0][ENV_W-1:0] env_w;

  always_comb begin
    for (int t = 0; t < NTAP; t++) begin
      logic signed [2*IN_W-1:0] ii, qq;
      logic [ENV_W-1:0] pwr;
      ii  = signed'(corr_i[t]) * signed'(corr_i[t]);
      qq  = signed'(corr_q[t]) * signed'(corr_q[t]);
      pwr = ENV_W'(unsigned'(ii)) + ENV_W'(unsigned'(qq));
      env_w[t] = (pow == POW_SQUARED) ? pwr : ENV_W'(isqrt(pwr));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_o <= 1'b0;
      env_o   <= '0;
    end else begin
      valid_o <= valid;
      if (valid) env_o <= env_w;
    end
  end

endmodule
