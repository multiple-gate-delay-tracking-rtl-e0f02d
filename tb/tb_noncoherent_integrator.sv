// tb_noncoherent_integrator: self-checking test of the noncoherent sums.
//
// Random envelopes for seven taps arrive at random intervals; n_nc steps
// through 1, 4, 10 and 0 (taken as 1). The model adds them per tap and
// predicts when a block completes and the totals it reports.
module tb_noncoherent_integrator;
  import mgd_pkg::*;

  localparam int NTAP = 7;
  localparam int IN_W = 2 * ACC_W + 1;
  localparam int OUT_W = IN_W + CNT_W;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic valid, valid_o;
  logic [NTAP-1:0][IN_W-1:0] env;
  logic [CNT_W-1:0] n_nc;
  logic [NTAP-1:0][OUT_W-1:0] sum;

  int checks = 0, failures = 0;

  noncoherent_integrator #(.NTAP(NTAP)) dut (.clk, .rst_n, .valid, .env, .n_nc, .valid_o,
                                             .sum_o(sum));

  always #5 clk = ~clk;

  initial begin
    longint unsigned acc[NTAP], held[NTAP];
    int cnt, blocks;
    int settings[4] = '{1, 4, 10, 0};
    bit exp_v;
    valid = 0; env = '0; n_nc = 8'd1;
    foreach (acc[t]) begin acc[t] = 0; held[t] = 0; end
    cnt = 0; blocks = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      if (n % 1000 == 0) n_nc = CNT_W'(settings[n / 1000]);
      valid = $urandom_range(0, 2) == 0;
      for (int t = 0; t < NTAP; t++) env[t] = {$urandom, $urandom} & ((64'd1 << (IN_W - 2)) - 1);
      @(posedge clk);
      exp_v = 0;
      if (valid) begin
        for (int t = 0; t < NTAP; t++) acc[t] += longint'(env[t]);
        cnt++;
        if (cnt >= ((n_nc == 0) ? 1 : int'(n_nc))) begin
          exp_v = 1; blocks++;
          foreach (acc[t]) begin held[t] = acc[t]; acc[t] = 0; end
          cnt = 0;
        end
      end
      #1;
      checks++;
      if (valid_o != exp_v) failures++;
      for (int t = 0; t < NTAP; t++) begin
        checks++;
        if (longint'(sum[t]) != held[t]) begin
          failures++;
          if (failures < 10) $display("FAIL tap %0d %0d/%0d", t, sum[t], held[t]);
        end
      end
    end
    checks++;
    if (blocks < 100) failures++;
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
