// tb_mgd_discriminator: self-checking test of the MGD discriminator.
//
// First a hand-worked case with correlations r = {100,200,...,700} (tap 0 =
// most early, tap 3 = prompt): the narrow correlator (a = [1,0,0]) gives
// 10*(500-300) = 2000, the high resolution correlator (a = [1,-0.5,0])
// 2000 - 5*(600-200) = 0, the MGD a = [1,-0.7,-0.2] gives
// 2000 - 7*400 - 2*600 = -2000. Then random correlations and random
// weights in [-1.0, +1.0], compared with the sum computed here, plus a
// check that the prompt tap does not affect the result.
module tb_mgd_discriminator;
  import mgd_pkg::*;

  localparam int NG = 3;
  localparam int IN_W = 2 * ACC_W + 1 + CNT_W;
  localparam int D_W = IN_W + 1 + COEF_W + $clog2(NG + 1);

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic valid, valid_o;
  logic [2*NG:0][IN_W-1:0] r;
  logic signed [NG-1:0][COEF_W-1:0] coef;
  logic signed [D_W-1:0] d;

  int checks = 0, failures = 0;

  mgd_discriminator #(.NG(NG)) dut (.clk, .rst_n, .valid, .r, .coef, .valid_o, .d_o(d));

  always #5 clk = ~clk;

  task automatic apply(input longint rv[7], input int a[3], input longint exp_d,
                       input string what);
    @(negedge clk);
    valid = 1;
    for (int t = 0; t < 7; t++) r[t] = IN_W'(rv[t]);
    for (int i = 0; i < 3; i++) coef[i] = COEF_W'(a[i]);
    @(posedge clk);
    #1;
    checks++;
    if (!valid_o || longint'(d) != exp_d) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d exp %0d", what, d, exp_d);
    end
    @(negedge clk);
    valid = 0;
    @(posedge clk);
    #1;
    checks++;
    if (valid_o || longint'(d) != exp_d) failures++;  // holds, no pulse
  endtask

  initial begin
    longint rv[7];
    int a[3];
    valid = 0; r = '0; coef = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    rv = '{100, 200, 300, 400, 500, 600, 700};
    a = '{10, 0, 0};   apply(rv, a, 2000, "NEML");
    a = '{10, -5, 0};  apply(rv, a, 0, "HRC");
    a = '{10, -7, -2}; apply(rv, a, -2000, "MGD uniform");
    for (int n = 0; n < 2000; n++) begin
      longint e;
      for (int t = 0; t < 7; t++) rv[t] = longint'({$urandom, $urandom} & 64'h3_FFFF_FFFF_FFFF);
      for (int i = 0; i < 3; i++) a[i] = $urandom_range(0, 20) - 10;
      e = 0;
      for (int i = 1; i <= 3; i++) e += a[i-1] * (rv[3+i] - rv[3-i]);
      apply(rv, a, e, "random");
      rv[3] = rv[3] ^ 64'h1234;
      apply(rv, a, e, "prompt ignored");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
