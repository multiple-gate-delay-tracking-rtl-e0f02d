// tb_carrier_nco: self-checking test of the carrier NCO.
//
// Drives random phase increments with a random enable pattern and compares
// the phase accumulator with a 64-bit reference sum and the sine/cosine
// outputs with round(7*sin) / round(7*cos) of the top four phase bits,
// computed here with real arithmetic. A watchdog ends the run.
module tb_carrier_nco;
  import mgd_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic en;
  logic [NCO_W-1:0] incr;
  logic [NCO_W-1:0] phase;
  logic signed [TRIG_W-1:0] sin_v, cos_v;

  int checks = 0, failures = 0;

  carrier_nco dut (.clk, .rst_n, .en, .incr, .phase_o(phase), .sin_o(sin_v), .cos_o(cos_v));

  always #5 clk = ~clk;

  function automatic int ref_trig(input longint unsigned ph, input bit cosine);
    real ang;
    ang = 2.0 * 3.14159265358979 * real'((ph >> (NCO_W - 4)) & 15) / 16.0;
    if (cosine) return int'($floor(7.0 * $cos(ang) + 0.5));
    else        return int'($floor(7.0 * $sin(ang) + 0.5));
  endfunction

  longint unsigned model;

  initial begin
    en = 1'b0; incr = '0; model = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      // compare the current state
      checks++;
      if (phase != NCO_W'(model) || int'(sin_v) != ref_trig(model, 0) ||
          int'(cos_v) != ref_trig(model, 1)) begin
        failures++;
        if (failures < 10)
          $display("mismatch n=%0d phase=%h exp=%h sin=%0d/%0d cos=%0d/%0d", n, phase,
                   NCO_W'(model), sin_v, ref_trig(model, 0), cos_v, ref_trig(model, 1));
      end
      // next stimulus
      en   = ($urandom_range(0, 3) != 0);
      incr = (n < 2000) ? NCO_W'(32'h1000_0000 + n) : $urandom;
      if (en) model = (model + incr) & 64'hFFFF_FFFF;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
