// tb_correlator_bank: self-checking test of the correlators with integrate
// & dump.
//
// Random wiped-off samples, replica taps and valid flags are fed to a
// seven-lane bank; epoch strobes arrive every 37..60 cycles and the coherent
// count n_coh cycles through 1, 2, 3 and 0 (taken as 1). A reference model
// sums +x or -x per lane and predicts the dump instant and the dumped sums,
// which must hold until the next dump.
module tb_correlator_bank;
  import mgd_pkg::*;

  localparam int NTAP = 7;
  localparam int X_W = SAMPLE_W + TRIG_W;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic valid, epoch_stb, dump;
  logic signed [X_W-1:0] x;
  logic [NTAP-1:0] taps;
  logic [CNT_W-1:0] n_coh;
  logic signed [NTAP-1:0][ACC_W-1:0] corr;

  int checks = 0, failures = 0;

  correlator_bank #(.NTAP(NTAP)) dut (.clk, .rst_n, .valid, .x, .taps, .epoch_stb, .n_coh,
                                      .dump_o(dump), .corr_o(corr));

  always #5 clk = ~clk;

  initial begin
    longint acc[NTAP], held[NTAP];
    int epochs, to_epoch, dumps;
    bit exp_dump;
    valid = 0; epoch_stb = 0; x = '0; taps = '0; n_coh = 8'd1;
    foreach (acc[t]) begin acc[t] = 0; held[t] = 0; end
    epochs = 0; dumps = 0; to_epoch = 40;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 6000; n++) begin
      @(negedge clk);
      if (n % 1500 == 0) n_coh = CNT_W'((n / 1500 + 1) % 4);
      valid = $urandom_range(0, 4) != 0;
      x     = X_W'($urandom);
      taps  = NTAP'($urandom);
      to_epoch--;
      epoch_stb = (to_epoch == 0);
      if (epoch_stb) to_epoch = $urandom_range(37, 60);
      @(posedge clk);
      for (int t = 0; t < NTAP; t++)
        if (valid) acc[t] += taps[t] ? -longint'(x) : longint'(x);
      exp_dump = 0;
      if (epoch_stb) begin
        epochs++;
        if (epochs >= ((n_coh == 0) ? 1 : int'(n_coh))) begin
          exp_dump = 1; dumps++;
          foreach (acc[t]) begin held[t] = acc[t]; acc[t] = 0; end
          epochs = 0;
        end
      end
      #1;
      checks++;
      if (dump != exp_dump) begin
        failures++;
        if (failures < 10) $display("FAIL dump flag n=%0d", n);
      end
      for (int t = 0; t < NTAP; t++) begin
        checks++;
        if (longint'(signed'(corr[t])) != held[t]) begin
          failures++;
          if (failures < 10) $display("FAIL lane %0d %0d/%0d", t, corr[t], held[t]);
        end
      end
    end
    checks++;
    if (dumps < 50) failures++;
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
