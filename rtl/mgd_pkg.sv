// mgd_pkg: constants and types shared by the multiple gate delay (MGD)
// tracking channel.
//
// An MGD tracker correlates the incoming signal with Ng early/late replica
// pairs plus a prompt replica and forms the discriminator
//   D = sum_i a_i * (R(late_i) - R(early_i)),
// which covers the narrow correlator (a = [1,0,0]) and the high resolution
// correlator (a = [1,-0.5,0]) as special cases.
//
// The 32-bit NCO accumulators, the 1023-chip code epoch of GPS C/A and the
// two delay-line spacing types (uniform, decreasing) follow the reference
// architecture; the sample, lookup-table, accumulator and coefficient widths
// are this implementation's own choices.
package mgd_pkg;

  // NCO phase accumulator width (32 bits removes the sample-slip offset
  // seen with 24 bits).
  localparam int unsigned NCO_W = 32;

  // GPS C/A code length in chips (one code epoch = 1 ms at 1.023 Mchip/s).
  localparam int unsigned CA_LEN = 1023;

  // Default number of early/late gate pairs.
  localparam int unsigned NG_DEFAULT = 3;

  // Signed input sample width, carrier sine/cosine width and correlator
  // accumulator width.
  localparam int unsigned SAMPLE_W = 4;
  localparam int unsigned TRIG_W   = 4;
  localparam int unsigned ACC_W    = 24;

  // Discriminator weights are signed integers in tenths (a_i = coef/10),
  // matching the 0.1 search grid of the optimised coefficient tables.
  localparam int unsigned COEF_W = 8;

  // Width of the noncoherent-integration count N_nc and coherent count N_c.
  localparam int unsigned CNT_W = 8;

  // Delay-line spacing types.
  typedef enum logic {
    SPACING_UNIFORM    = 1'b0,  // Delta_i = i * Delta_1
    SPACING_DECREASING = 1'b1   // Delta_i = (2^i - 1) / 2^(i-1) * Delta_1
  } spacing_e;

  // Noncoherent nonlinearity |.|^pow_nc.
  typedef enum logic {
    POW_ENVELOPE = 1'b0,  // pow_nc = 1: sqrt(I^2 + Q^2)
    POW_SQUARED  = 1'b1   // pow_nc = 2: I^2 + Q^2
  } pow_e;

  // Number of correlator taps for Ng gate pairs: Ng early, prompt, Ng late.
  function automatic int unsigned n_taps(input int unsigned ng);
    return 2 * ng + 1;
  endfunction

endpackage
