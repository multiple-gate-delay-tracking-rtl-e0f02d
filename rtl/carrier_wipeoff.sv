// carrier_wipeoff: removes the intermediate-frequency carrier from the input
// samples and splits them into in-phase and quadrature branches.
//
// I = sample * sin and Q = sample * cos, with sine and cosine from the
// carrier NCO, as in the reference channel (sine to the in-phase branch,
// cosine to the quadrature branch). Products are registered once, so I/Q
// and `valid_o` follow `sample_valid` by one clock.
//
// The multiplier pair comes from the reference architecture; the widths and
// the output register are this implementation's choices.
module carrier_wipeoff
  import mgd_pkg::*;
#(
  parameter int unsigned IN_W  = SAMPLE_W,
  parameter int unsigned LUT_W = TRIG_W
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          sample_valid,
  input  logic signed [IN_W-1:0]        sample,
  input  logic signed [LUT_W-1:0]       sin_i,
  input  logic signed [LUT_W-1:0]       cos_i,
  output logic                          valid_o,
  output logic signed [IN_W+LUT_W-1:0]  i_o,
  output logic signed [IN_W+LUT_W-1:0]  q_o
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_o <= 1'b0;
      i_o     <= '0;
      q_o     <= '0;
    end else begin
      valid_o <= sample_valid;
      if (sample_valid) begin
        i_o <= sample * sin_i;
        q_o <= sample * cos_i;
      end
    end
  end

endmodule
