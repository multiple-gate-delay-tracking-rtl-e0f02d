// mgd_discriminator: the multiple gate delay discriminator
//   D = sum_{i=1..NG} a_i * (R(late_i) - R(early_i))
// over NG gate pairs of noncoherently integrated correlations.
//
// Early tap of pair i is NG-i, late tap NG+i (tap NG is the prompt, which
// the discriminator does not use). "Late" is the replica delayed more, so
// D > 0 means the prompt replica is ahead of the received code. Weights are
// signed integers in tenths, coef[i-1] = 10 * a_i, so the result is 10*D.
// Examples: narrow correlator a = [1,0,0] -> coef {10,0,0}; high resolution
// correlator a = [1,-0.5,0] -> {10,-5,0}; MGD a = [1,-0.7,-0.2] ->
// {10,-7,-2}.
//
// Timing: registered; `valid_o` follows `valid` by one clock.
//
// The discriminator formula and the 0.1-step weights follow the reference
// design; the integer scaling and the widths are own choices.
module mgd_discriminator
  import mgd_pkg::*;
#(
  parameter int unsigned NG   = NG_DEFAULT,
  parameter int unsigned IN_W = 2 * ACC_W + 1 + CNT_W,
  localparam int unsigned D_W = IN_W + 1 + COEF_W + $clog2(NG + 1)
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic                               valid,
  input  logic [2*NG:0][IN_W-1:0]            r,
  input  logic signed [NG-1:0][COEF_W-1:0]   coef,
  output logic                               valid_o,
  output logic signed [D_W-1:0]              d_o
);

  logic signed [D_W-1:0] d_w;

  always_comb begin
    d_w = '0;
    for (int i = 1; i <= NG; i++) begin
      logic signed [IN_W:0] diff;
      logic signed [D_W-1:0] w;
      diff = signed'({1'b0, r[NG+i]}) - signed'({1'b0, r[NG-i]});
      w    = D_W'(signed'(coef[i-1]));
      d_w  = d_w + w * D_W'(diff);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_o <= 1'b0;
      d_o     <= '0;
    end else begin
      valid_o <= valid;
      if (valid) d_o <= d_w;
    end
  end

endmodule
