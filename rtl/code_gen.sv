// code_gen: replica PRN code generator with optional SinBOC(1,1) subcarrier.
//
// The spreading code is the GPS C/A Gold code: two 10-stage linear feedback
// shift registers, G1 (1 + x^3 + x^10) and G2 (1 + x^2 + x^3 + x^6 + x^8 +
// x^9 + x^10), both starting at all ones. The chip is G1 stage 10 xor the
// two G2 stages selected for the satellite number `prn` (1..32). The
// registers step on `chip_stb` (one strobe per chip from the code NCO) and
// are reloaded after chip CA_LEN-1, so one code epoch is exactly CA_LEN chips.
//
// With `boc_en` high the chip is multiplied by a one-period-per-chip square
// wave in sine phase (SinBOC(1,1)): `half` (the code NCO phase MSB) selects
// the second half of the chip, in which the chip value is inverted.
//
// Interface: `ref_code_o` is the replica in 0/1 form (0 = +1, 1 = -1);
// `epoch_stb` is high in the cycle whose clock edge starts a new epoch;
// `restart` reloads both registers and the chip counter (epoch start) and
// takes the new `prn`. `chip_idx_o` is the index of the current chip.
//
// From the reference architecture: only the name and purpose of the block
// (a replica code generator for Galileo/GPS BOC and BPSK signals). Own
// choices: the GPS C/A generator (the 4092-chip Galileo E1 memory codes are
// not generated here) and the subcarrier taken from the code NCO phase.
module code_gen
  import mgd_pkg::*;
#(
  parameter int unsigned CODE_LEN = CA_LEN
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       restart,
  input  logic [5:0] prn,
  input  logic       chip_stb,
  input  logic       half,
  input  logic       boc_en,
  output logic       ref_code_o,
  output logic       prn_chip_o,
  output logic       epoch_stb,
  output logic [$clog2(CODE_LEN)-1:0] chip_idx_o
);

  localparam int unsigned IDX_W = $clog2(CODE_LEN);

  // G2 output taps (stage numbers 1..10) per satellite number.
  function automatic logic [7:0] g2_taps(input logic [5:0] n);
    case (n)
      6'd1:  return {4'd2, 4'd6};   6'd2:  return {4'd3, 4'd7};
      6'd3:  return {4'd4, 4'd8};   6'd4:  return {4'd5, 4'd9};
      6'd5:  return {4'd1, 4'd9};   6'd6:  return {4'd2, 4'd10};
      6'd7:  return {4'd1, 4'd8};   6'd8:  return {4'd2, 4'd9};
      6'd9:  return {4'd3, 4'd10};  6'd10: return {4'd2, 4'd3};
      6'd11: return {4'd3, 4'd4};   6'd12: return {4'd5, 4'd6};
      6'd13: return {4'd6, 4'd7};   6'd14: return {4'd7, 4'd8};
      6'd15: return {4'd8, 4'd9};   6'd16: return {4'd9, 4'd10};
      6'd17: return {4'd1, 4'd4};   6'd18: return {4'd2, 4'd5};
      6'd19: return {4'd3, 4'd6};   6'd20: return {4'd4, 4'd7};
      6'd21: return {4'd5, 4'd8};   6'd22: return {4'd6, 4'd9};
      6'd23: return {4'd1, 4'd3};   6'd24: return {4'd4, 4'd6};
      6'd25: return {4'd5, 4'd7};   6'd26: return {4'd6, 4'd8};
      6'd27: return {4'd7, 4'd9};   6'd28: return {4'd8, 4'd10};
      6'd29: return {4'd1, 4'd6};   6'd30: return {4'd2, 4'd7};
      6'd31: return {4'd3, 4'd8};   default: return {4'd4, 4'd9};
    endcase
  endfunction

  // Stage k of a register is bit k (bit 0 unused).
  logic [10:0] g1_q, g2_q;
  logic [7:0]  taps_q;
  logic [IDX_W-1:0] idx_q;
  logic        last_chip;

  assign last_chip = (idx_q == IDX_W'(CODE_LEN - 1));
  assign epoch_stb = chip_stb & last_chip;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      g1_q   <= {10'h3FF, 1'b0};
      g2_q   <= {10'h3FF, 1'b0};
      idx_q  <= '0;
      taps_q <= g2_taps(prn);
    end else if (restart) begin
      g1_q   <= {10'h3FF, 1'b0};
      g2_q   <= {10'h3FF, 1'b0};
      idx_q  <= '0;
      taps_q <= g2_taps(prn);
    end else if (chip_stb) begin
      if (last_chip) begin
        g1_q  <= {10'h3FF, 1'b0};
        g2_q  <= {10'h3FF, 1'b0};
        idx_q <= '0;
      end else begin
        g1_q  <= {g1_q[9:1], g1_q[3] ^ g1_q[10], 1'b0};
        g2_q  <= {g2_q[9:1],
                  g2_q[2] ^ g2_q[3] ^ g2_q[6] ^ g2_q[8] ^ g2_q[9] ^ g2_q[10],
                  1'b0};
        idx_q <= idx_q + 1'b1;
      end
    end
  end

  assign prn_chip_o = g1_q[10] ^ g2_q[taps_q[7:4]] ^ g2_q[taps_q[3:0]];
  assign ref_code_o = prn_chip_o ^ (boc_en & half);
  assign chip_idx_o = idx_q;

endmodule
