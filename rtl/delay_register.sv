// delay_register: replica code delay line giving the early, prompt and late
// taps of an Ng-pair multiple gate delay correlator.
//
// The replica chip value enters at tap 0 (VVE for Ng = 3, the earliest
// replica) and moves through a chain of one-bit registers that shift on
// `tick_stb`, one tick being the smallest delay Z^-1. Taps are numbered
// 0 .. 2*Ng: taps 0..Ng-1 are the early replicas (most early first), tap Ng
// is the prompt and taps Ng+1..2*Ng the late replicas (least late first).
// Gate pair i (i = 1..Ng) is early tap Ng-i and late tap Ng+i.
//
//   SPACING_UNIFORM:    every stage is Z^-1, so Delta_i = i * Delta_1 with
//                       Delta_1 = 2 Z^-1; 2*Ng registers in all.
//   SPACING_DECREASING: the stage between gate k and gate k-1 (gate 0 being
//                       the prompt) is Z^-(2^(Ng-k)), mirrored on the late
//                       side (Ng = 3: Z^-1 Z^-2 Z^-4 | Z^-4 Z^-2 Z^-1), so
//                       Delta_1 = 2^Ng Z^-1 and Delta_i = (2^i - 1)/2^(i-1)
//                       Delta_1; 2*(2^Ng - 1) registers in all.
// The register counts (Ng = 2..5: 4, 6, 8, 10 uniform; 6, 14, 30, 62
// decreasing) and the stage pattern follow the reference design; the tap
// numbering is this implementation's.
//
// Interface: `taps_o[0]` is `ref_code` itself; every other tap is a
// register. With a tick rate that is an even multiple of the chip rate all
// taps change on the same clock edge. Reset clears the chain.
module delay_register
  import mgd_pkg::*;
#(
  parameter int unsigned NG      = NG_DEFAULT,
  parameter spacing_e    SPACING = SPACING_UNIFORM
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                tick_stb,
  input  logic                ref_code,
  output logic [2*NG:0]       taps_o
);

  localparam int unsigned NTAP = 2 * NG + 1;

  // Delay of the stage between tap s and tap s+1 (s = 0 .. 2*NG-1).
  function automatic int unsigned stage_delay(input int unsigned s);
    int unsigned k;
    if (SPACING == SPACING_UNIFORM) return 1;
    k = (s < NG) ? (NG - s) : (s - NG + 1);  // gate index of the outer end
    return 1 << (NG - k);
  endfunction

  // Position of tap t in the chain = total delay before it, in ticks.
  function automatic int unsigned tap_pos(input int unsigned t);
    int unsigned p;
    p = 0;
    for (int unsigned s = 0; s < t; s++) p += stage_delay(s);
    return p;
  endfunction

  localparam int unsigned LEN = tap_pos(NTAP - 1);  // at least 2 (Ng >= 1)

  logic [LEN:1] chain_q;  // chain_q[d] is ref_code delayed by d ticks

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        chain_q <= '0;
    else if (tick_stb) chain_q <= {chain_q[LEN-1:1], ref_code};
  end

  assign taps_o[0] = ref_code;
  for (genvar t = 1; t < NTAP; t++) begin : g_tap
    assign taps_o[t] = chain_q[tap_pos(t)];
  end

endmodule
