// code_nco: numerically controlled oscillator for the replica code.
//
// Two PHASE_W-bit accumulators advance on every cycle with `en` high:
//   * the chip accumulator adds `code_incr`; its carry out is `chip_stb`,
//     one strobe per code chip, and its MSB (`half_o`) tells the first from
//     the second half of the chip (used for the SinBOC(1,1) subcarrier);
//   * the tick accumulator adds code_incr * tick_mult (modulo 2^PHASE_W);
//     its carry out is `tick_stb`, the shift strobe of the delay register.
// Both start at zero, so the tick accumulator always equals tick_mult times
// the chip accumulator modulo 2^PHASE_W and the ticks fall exactly every
// 1/tick_mult chip, even while the loop changes code_incr. tick_mult sets
// the smallest delay Z^-1 of the delay register: 1/tick_mult chip. For
// example Delta_1 = 0.25 chip needs tick_mult = 8 with uniform spacing
// (Z^-1 = 0.125 chip, 8.184 MHz tick rate) and 32 with decreasing spacing
// for Ng = 3 (Z^-1 = 0.03125 chip, 32.736 MHz).
//
// At most one tick per enabled cycle is possible: code_incr * tick_mult must
// stay below 2^PHASE_W (checked by an assertion). The strobes are
// combinational: high in the cycle whose clock edge makes the accumulator
// wrap. `half_o` and `chip_phase_o` come from the chip accumulator register.
//
// From the reference architecture: the code NCO with an increment input, the
// 32-bit accumulator and the tick rates. Own choice: generating the delay
// register shift rate from a second accumulator locked to the first.
module code_nco
  import mgd_pkg::*;
#(
  parameter int unsigned PHASE_W = NCO_W,
  parameter int unsigned MULT_W  = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,
  input  logic [PHASE_W-1:0] code_incr,
  input  logic [MULT_W-1:0]  tick_mult,
  output logic               chip_stb,
  output logic               tick_stb,
  output logic               half_o,
  output logic [PHASE_W-1:0] chip_phase_o
);

  logic [PHASE_W-1:0] chip_q, tick_q;
  logic [PHASE_W-1:0] tick_incr;
  logic [PHASE_W:0]   chip_sum, tick_sum;

  assign tick_incr = PHASE_W'(code_incr * tick_mult);
  assign chip_sum  = {1'b0, chip_q} + {1'b0, code_incr};
  assign tick_sum  = {1'b0, tick_q} + {1'b0, tick_incr};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      chip_q <= '0;
      tick_q <= '0;
    end else if (en) begin
      chip_q <= chip_sum[PHASE_W-1:0];
      tick_q <= tick_sum[PHASE_W-1:0];
    end
  end

  // Strobes announce a carry at the coming clock edge, so that the code
  // generator steps and the delay register shifts on the same edge on which
  // the accumulator wraps.
  assign chip_stb = en & chip_sum[PHASE_W];
  assign tick_stb = en & tick_sum[PHASE_W];

  assign half_o       = chip_q[PHASE_W-1];
  assign chip_phase_o = chip_q;

  // The tick rate may not exceed the enable rate.
  a_one_tick_per_cycle: assert property (@(posedge clk) disable iff (!rst_n)
    en |-> (({{MULT_W{1'b0}}, code_incr} * {{PHASE_W{1'b0}}, tick_mult}) >> PHASE_W) == '0)
    else $error("code_nco: code_incr * tick_mult overflows; ticks would be lost");

endmodule
