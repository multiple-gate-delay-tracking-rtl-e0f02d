// tb_dll_loop_filter: self-checking test of the code loop filter.
//
// Open loop the increment equals the base increment. Closed loop each
// discriminator value d sets increment = base - clamp(d >>> shift,
// +/-2^30); the held correction must survive cycles without a new value,
// follow a base-increment change at once, and clear when the loop opens.
module tb_dll_loop_filter;
  import mgd_pkg::*;

  localparam int D_W = 2 * ACC_W + 2 + CNT_W + COEF_W + 2;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic valid, loop_en;
  logic signed [D_W-1:0] d;
  logic [6:0] shift;
  logic [NCO_W-1:0] base, incr;

  int checks = 0, failures = 0;

  dll_loop_filter dut (.clk, .rst_n, .valid, .d, .shift, .loop_en, .base_incr(base),
                       .code_incr_o(incr));

  always #5 clk = ~clk;

  initial begin
    longint corr, dv, lim;
    lim = longint'(1) << 30;
    valid = 0; loop_en = 0; d = '0; shift = 7'd10; base = 32'h0666_6666;
    corr = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      if (n % 1000 == 500) base = $urandom;
      loop_en = (n % 1000) > 50;
      valid = $urandom_range(0, 3) == 0;
      shift = 7'($urandom_range(0, 40));
      dv = longint'({$urandom, $urandom}) >>> $urandom_range(0, 63);
      d = D_W'(dv);
      #1;
      checks++;  // combinational use of the current base
      if (incr != NCO_W'(longint'(base) - corr)) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d incr=%h exp=%h", n, incr, NCO_W'(longint'(base) - corr));
      end
      @(posedge clk);
      if (!loop_en) corr = 0;
      else if (valid) begin
        longint s;
        s = dv >>> shift;
        corr = (s > lim) ? lim : (s < -lim) ? -lim : s;
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
