// dll_loop_filter: re-estimates the code delay from the discriminator by
// steering the code NCO.
//
// A first-order delay lock loop: each new discriminator value sets the code
// NCO increment to
//   code_incr = base_incr - sat(d >>> shift)
// so the replica runs slower while it is ahead of the received code (d > 0)
// and faster while it lags; the delay estimate is the integral of that rate
// offset. `shift` is the loop gain as a power of two. With `loop_en` low the
// increment is `base_incr` (open loop). The correction saturates at
// +/- 2^(NCO_W-2).
//
// Timing: the correction is registered and changes one clock after `valid`
// (or is cleared one clock after `loop_en` falls); `code_incr_o` is
// base_incr minus that correction, so a new `base_incr` acts at once.
//
// The reference design only names this step (re-estimate the delay from the
// discriminator); the first-order proportional loop is this
// implementation's choice.
module dll_loop_filter
  import mgd_pkg::*;
#(
  parameter int unsigned D_W = 2 * ACC_W + 2 + CNT_W + COEF_W + 2
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   valid,
  input  logic signed [D_W-1:0]  d,
  input  logic [6:0]             shift,
  input  logic                   loop_en,
  input  logic [NCO_W-1:0]       base_incr,
  output logic [NCO_W-1:0]       code_incr_o
);

  localparam int unsigned CW = (D_W > NCO_W) ? D_W : NCO_W;
  localparam logic signed [CW-1:0] LIM = CW'(1) <<< (NCO_W - 2);

  logic signed [CW-1:0] scaled, corr;

  always_comb begin
    scaled = CW'(d) >>> shift;
    if (scaled > LIM)       corr = LIM;
    else if (scaled < -LIM) corr = -LIM;
    else                    corr = scaled;
  end

  // Held correction; the saturation keeps it within NCO_W-1 signed bits.
  logic signed [NCO_W-1:0] corr_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        corr_q <= '0;
    else if (!loop_en) corr_q <= '0;
    else if (valid)    corr_q <= NCO_W'(corr);
  end

  assign code_incr_o = base_incr - corr_q;

endmodule
