// tb_carrier_wipeoff: self-checking test of the carrier wipe-off multipliers.
//
// Random signed samples, sines and cosines with random valid flags; the
// registered I = sample*sin and Q = sample*cos and the one-clock valid delay
// are compared with integer products computed here. Outputs must hold when
// no sample is valid.
module tb_carrier_wipeoff;
  import mgd_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic sample_valid, valid_o;
  logic signed [SAMPLE_W-1:0] sample;
  logic signed [TRIG_W-1:0] sin_v, cos_v;
  logic signed [SAMPLE_W+TRIG_W-1:0] i_o, q_o;

  int checks = 0, failures = 0;

  carrier_wipeoff dut (.clk, .rst_n, .sample_valid, .sample, .sin_i(sin_v), .cos_i(cos_v),
                       .valid_o, .i_o, .q_o);

  always #5 clk = ~clk;

  initial begin
    int exp_i, exp_q;
    bit exp_v;
    sample_valid = 1'b0; sample = '0; sin_v = '0; cos_v = '0;
    exp_i = 0; exp_q = 0; exp_v = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (5000) begin
      @(negedge clk);
      sample_valid = $urandom_range(0, 3) != 0;
      sample = SAMPLE_W'($urandom);
      sin_v  = TRIG_W'($urandom);
      cos_v  = TRIG_W'($urandom);
      @(posedge clk);
      if (sample_valid) begin
        exp_i = int'(sample) * int'(sin_v);
        exp_q = int'(sample) * int'(cos_v);
      end
      exp_v = sample_valid;
      #1;
      checks++;
      if (valid_o != exp_v || int'(i_o) != exp_i || int'(q_o) != exp_q) begin
        failures++;
        if (failures < 10) $display("FAIL i=%0d/%0d q=%0d/%0d", i_o, exp_i, q_o, exp_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
