// tb_envelope_unit: self-checking test of the |.|^pow_nc nonlinearity.
//
// Random signed I/Q correlations (full range, small values and zero) for
// seven taps in both modes. Expected values: I^2 + Q^2 for the squared
// envelope and floor(sqrt(I^2 + Q^2)) for the envelope, the root found here
// from a floating-point estimate corrected by integer comparisons.
module tb_envelope_unit;
  import mgd_pkg::*;

  localparam int NTAP = 7;
  localparam int ENV_W = 2 * ACC_W + 1;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic valid, valid_o;
  pow_e pow;
  logic signed [NTAP-1:0][ACC_W-1:0] ci, cq;
  logic [NTAP-1:0][ENV_W-1:0] env;

  int checks = 0, failures = 0;

  envelope_unit #(.NTAP(NTAP)) dut (.clk, .rst_n, .valid, .pow, .corr_i(ci), .corr_q(cq),
                                    .valid_o, .env_o(env));

  always #5 clk = ~clk;

  function automatic longint unsigned floor_sqrt(input longint unsigned v);
    longint unsigned r;
    r = longint'($sqrt(real'(v)));
    while (r * r > v) r--;
    while ((r + 1) * (r + 1) <= v) r++;
    return r;
  endfunction

  function automatic longint rnd_corr(input int mode);
    case (mode)
      0: return longint'(signed'(ACC_W'($urandom)));
      1: return longint'($urandom_range(0, 20)) - 10;
      2: return 0;
      default: return ($urandom_range(0, 1) ? -(longint'(1) <<< (ACC_W - 1))
                                            : (longint'(1) <<< (ACC_W - 1)) - 1);
    endcase
  endfunction

  initial begin
    longint vi[NTAP], vq[NTAP];
    valid = 0; pow = POW_SQUARED; ci = '0; cq = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      valid = 1;
      pow = (n % 2) ? POW_ENVELOPE : POW_SQUARED;
      for (int t = 0; t < NTAP; t++) begin
        int mode;
        mode = (n < 100) ? (n % 4) : 0;
        vi[t] = rnd_corr(mode);
        vq[t] = rnd_corr((mode == 3) ? 3 : mode);
        ci[t] = ACC_W'(vi[t]);
        cq[t] = ACC_W'(vq[t]);
      end
      @(posedge clk);
      #1;
      checks++;
      if (!valid_o) failures++;
      for (int t = 0; t < NTAP; t++) begin
        longint unsigned p, e;
        p = longint'(vi[t] * vi[t]) + longint'(vq[t] * vq[t]);
        e = (pow == POW_SQUARED) ? p : floor_sqrt(p);
        checks++;
        if (longint'(env[t]) != e) begin
          failures++;
          if (failures < 10) $display("FAIL pow=%0d I=%0d Q=%0d got %0d exp %0d",
                                      pow, vi[t], vq[t], env[t], e);
        end
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
