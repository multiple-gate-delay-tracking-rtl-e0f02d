// carrier_nco: numerically controlled oscillator for carrier wipe-off.
//
// A PHASE_W-bit phase accumulator adds `incr` on every cycle with `en` high
// (one input sample), so the output frequency is incr / 2^PHASE_W times the
// sample rate. The top 4 phase bits address a 16-point sine table of signed
// TRIG_W-bit values, round(7 * sin(2*pi*k/16)) = 0,3,5,6,7,6,5,3,0,-3,...;
// the table is folded from one quarter wave. Cosine is the sine a quarter
// period (4 table steps) ahead.
//
// Interface: `sin_o`/`cos_o` are combinational from the phase register, so
// they describe the sample presented in the same cycle. Reset clears the
// phase. `phase_o` exposes the accumulator.
//
// From the reference architecture: a carrier NCO with an increment input and
// sine/cosine outputs, and the 32-bit accumulator. Own choices: the
// 16-point, 4-bit table and the reset value.
module carrier_nco
  import mgd_pkg::*;
#(
  parameter int unsigned PHASE_W = NCO_W
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     en,
  input  logic [PHASE_W-1:0]       incr,
  output logic [PHASE_W-1:0]       phase_o,
  output logic signed [TRIG_W-1:0] sin_o,
  output logic signed [TRIG_W-1:0] cos_o
);

  logic [PHASE_W-1:0] phase_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  phase_q <= '0;
    else if (en) phase_q <= phase_q + incr;
  end

  // Quarter-wave amplitude for index 0..4: round(7 * sin(pi/2 * i/4)).
  function automatic logic signed [TRIG_W-1:0] quarter(input logic [2:0] i);
    case (i)
      3'd0:    return TRIG_W'(0);
      3'd1:    return TRIG_W'(3);
      3'd2:    return TRIG_W'(5);
      3'd3:    return TRIG_W'(6);
      default: return TRIG_W'(7);
    endcase
  endfunction

  // Sine at table position k (0..15) by quarter-wave symmetry.
  function automatic logic signed [TRIG_W-1:0] sine16(input logic [3:0] k);
    logic [2:0] idx;
    logic signed [TRIG_W-1:0] mag;
    idx = k[2] ? (3'd4 - {1'b0, k[1:0]}) : {1'b0, k[1:0]};
    mag = quarter(idx);
    return k[3] ? -mag : mag;
  endfunction

  logic [3:0] k;
  assign k       = phase_q[PHASE_W-1 -: 4];
  assign sin_o   = sine16(k);
  assign cos_o   = sine16(k + 4'd4);
  assign phase_o = phase_q;

endmodule
