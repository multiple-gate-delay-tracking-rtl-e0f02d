// tb_tracking_channel: self-checking test of the complete hardware tracking
// channel (NCOs, code generator, delay register, wipe-off, correlators).
//
// Two channels run side by side: uniform spacing with 8 ticks per chip
// (Delta_1 = 0.25 chip) and BPSK, and decreasing spacing with 32 ticks per
// chip (Delta_1 = 0.25 chip) and BOC(1,1) with two-epoch coherent
// integration. Both get the same input: a replica of PRN 7 aligned with the
// prompt tap of the first channel on an IF carrier at the carrier NCO
// frequency (phase offset 0.7 rad), plus random -1/0/+1 noise, with about 40 samples per chip and random sample gaps.
// The reference model sums, for every sample, sample * sin/cos of the NCO
// phase times each tap's replica (see tb_gnss_pkg) and closes a sum after
// the last sample of each code epoch (or pair of epochs). Every dumped
// correlation is compared exactly, the dump count is checked against the
// 1023-chip epoch, and the prompt of the aligned channel must carry the
// largest correlation.
module tb_tracking_channel;
  import mgd_pkg::*;
  import tb_gnss_pkg::*;

  localparam int PRN = 7;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic sample_valid;
  logic signed [SAMPLE_W-1:0] sample;
  logic [NCO_W-1:0] carr_incr, code_incr;

  logic dump_u, dump_d;
  logic signed [6:0][ACC_W-1:0] ci_u, cq_u, ci_d, cq_d;
  logic [9:0] idx_u, idx_d;

  tracking_channel #(.NG(3), .SPACING(SPACING_UNIFORM)) dut_u (
    .clk, .rst_n, .restart(1'b0), .prn(6'(PRN)), .boc_en(1'b0), .sample_valid, .sample,
    .carr_incr, .code_incr, .tick_mult(8'd8), .n_coh(8'd1),
    .dump_o(dump_u), .corr_i(ci_u), .corr_q(cq_u), .chip_idx_o(idx_u));

  tracking_channel #(.NG(3), .SPACING(SPACING_DECREASING)) dut_d (
    .clk, .rst_n, .restart(1'b0), .prn(6'(PRN)), .boc_en(1'b1), .sample_valid, .sample,
    .carr_incr, .code_incr, .tick_mult(8'd32), .n_coh(8'd2),
    .dump_o(dump_d), .corr_i(ci_d), .corr_q(cq_d), .chip_idx_o(idx_d));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // tap delays in ticks: uniform 0..6; decreasing 0,1,3,7,11,13,14
  int del_u[7] = '{0, 1, 2, 3, 4, 5, 6};
  int del_d[7] = '{0, 1, 3, 7, 11, 13, 14};

  longint acc_iu[7], acc_qu[7], acc_id[7], acc_qd[7];
  // expected sums per dump: [dump][tap]
  longint exp_iu[8][7], exp_qu[8][7], exp_id[8][7], exp_qd[8][7];
  int n_exp_u = 0, n_exp_d = 0;

  function automatic longint sx(input logic [ACC_W-1:0] v);
    return longint'(signed'(v));
  endfunction

  task automatic check_tap(input string what, input int t, input longint gi, input longint gq,
                           input longint ei, input longint eq);
    checks++;
    if (gi != ei || gq != eq) begin
      failures++;
      if (failures < 10) $display("FAIL %s tap %0d: I %0d/%0d Q %0d/%0d", what, t,
                                  gi, ei, gq, eq);
    end
  endtask

  int dumps_u = 0, dumps_d = 0;
  longint peak_ok = 0;

  always @(posedge clk) begin
    if (dump_u) begin
      #1;
      if (dumps_u >= n_exp_u) begin failures++; $display("FAIL unexpected dump (uniform)"); end
      else begin
        for (int t = 0; t < 7; t++)
          check_tap("uniform", t, sx(ci_u[t]), sx(cq_u[t]), exp_iu[dumps_u][t], exp_qu[dumps_u][t]);
        // prompt (tap 3) is the strongest
        begin
          longint pp, pt;
          pp = sx(ci_u[3]) * sx(ci_u[3]) + sx(cq_u[3]) * sx(cq_u[3]);
          for (int t = 0; t < 7; t++) begin
            pt = sx(ci_u[t]) * sx(ci_u[t]) + sx(cq_u[t]) * sx(cq_u[t]);
            checks++;
            if (t != 3 && pt >= pp) begin failures++; $display("FAIL peak not at prompt"); end
          end
        end
        dumps_u++;
      end
    end
  end

  always @(posedge clk) begin
    if (dump_d) begin
      #1;
      if (dumps_d >= n_exp_d) begin failures++; $display("FAIL unexpected dump (decr.)"); end
      else begin
        for (int t = 0; t < 7; t++)
          check_tap("decreasing", t, sx(ci_d[t]), sx(cq_d[t]), exp_id[dumps_d][t], exp_qd[dumps_d][t]);
        dumps_d++;
      end
    end
  end

  initial begin
    longint m, pc, pcar;  // enabled samples so far, code and carrier phase
    int epochs_d;
    int total_cycles;
    foreach (acc_iu[t]) begin acc_iu[t] = 0; acc_qu[t] = 0; acc_id[t] = 0; acc_qd[t] = 0; end
    sample_valid = 0; sample = '0;
    code_incr = NCO_W'(64'h1_0000_0000 / 40) + 32'd12345;
    carr_incr = 32'h0CCC_CCCD + NCO_W'($urandom_range(0, 1 << 20));
    m = 0; pc = 0; pcar = 0; epochs_d = 0; total_cycles = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // three code epochs
    while (pc < longint'(3 * 1023) <<< 32) begin
      @(negedge clk);
      total_cycles++;
      sample_valid = ($urandom_range(0, 9) != 0);
      if (sample_valid) begin
        int s, si, co, x_i, x_q;
        longint ku, kd;
        bit last;
        ku = tick_index(pc, 8);
        kd = tick_index(pc, 32);
        // received signal: replica aligned with the uniform channel's prompt
        s = int'($floor(5.0 * $cos(2.0 * 3.14159265358979 * real'(pcar) / 4294967296.0 + 0.7)
                        + 0.5));
        if (replica(PRN, ku - 3, 8, 0)) s = -s;
        s += $urandom_range(0, 2) - 1;
        sample = SAMPLE_W'(s);
        si = trig16(pcar, 0);
        co = trig16(pcar, 1);
        x_i = s * si;
        x_q = s * co;
        for (int t = 0; t < 7; t++) begin
          int su, sd;
          su = replica(PRN, ku - del_u[t], 8, 0) ? -1 : 1;
          sd = replica(PRN, kd - del_d[t], 32, 1) ? -1 : 1;
          acc_iu[t] += su * x_i; acc_qu[t] += su * x_q;
          acc_id[t] += sd * x_i; acc_qd[t] += sd * x_q;
        end
        // last sample of an epoch: the next sample starts a new 1023-chip epoch
        last = ((pc >>> 32) / 1023) != (((pc + code_incr) >>> 32) / 1023);
        if (last) begin
          foreach (acc_iu[t]) begin
            exp_iu[n_exp_u][t] = acc_iu[t]; exp_qu[n_exp_u][t] = acc_qu[t];
            acc_iu[t] = 0; acc_qu[t] = 0;
          end
          n_exp_u++;
          epochs_d++;
          if (epochs_d == 2) begin
            foreach (acc_id[t]) begin
              exp_id[n_exp_d][t] = acc_id[t]; exp_qd[n_exp_d][t] = acc_qd[t];
              acc_id[t] = 0; acc_qd[t] = 0;
            end
            n_exp_d++;
            epochs_d = 0;
          end
        end
        pc += code_incr;
        pcar = (pcar + carr_incr) & 64'hFFFF_FFFF;
        m++;
      end
    end
    @(negedge clk); sample_valid = 0;
    repeat (5) @(negedge clk);
    checks++;
    if (dumps_u != 3 || dumps_d != 1) begin
      failures++;
      $display("FAIL dump count %0d/%0d", dumps_u, dumps_d);
    end
    // rate: 1023 chips per epoch at ~40 samples per chip
    checks++;
    if (m < 3 * 1023 * 39 || m > 3 * 1023 * 41) failures++;
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
