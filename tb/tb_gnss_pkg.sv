// tb_gnss_pkg: reference models shared by the channel-level testbenches.
//
// * GPS C/A codes built from the G1/G2 recurrences and the published G2
//   delays (independent of the shift-register form used in the design).
// * The replica seen on a delay-register tap: with a code phase of P
//   (units of 2^-32 chip) and `mult` ticks per chip, the current tick
//   interval is k = floor(P * mult / 2^32); a tap delayed by d ticks shows
//   the replica of interval k - d, i.e. chip floor((k-d)/mult), second half
//   when (k-d) mod mult >= mult/2 (the BOC(1,1) subcarrier), and +1 (bit 0)
//   for intervals before the start.
// * The carrier table value round(7 sin(2 pi j/16)) for phase P.
package tb_gnss_pkg;

  int delays[32] = '{5, 6, 7, 8, 17, 18, 139, 140, 141, 251, 252, 254, 255, 256, 257, 258,
                     469, 470, 471, 472, 473, 474, 509, 512, 513, 514, 515, 516, 859, 860,
                     861, 862};
  bit g1[1023], g2[1023];
  bit ready = 0;

  function automatic void build();
    bit s1[1033], s2[1033];
    for (int n = 0; n < 10; n++) begin s1[n] = 1; s2[n] = 1; end
    for (int n = 0; n + 10 < 1033; n++) begin
      s1[n+10] = s1[n+7] ^ s1[n];
      s2[n+10] = s2[n+8] ^ s2[n+7] ^ s2[n+4] ^ s2[n+2] ^ s2[n+1] ^ s2[n];
    end
    for (int n = 0; n < 1023; n++) begin g1[n] = s1[n]; g2[n] = s2[n]; end
    ready = 1;
  endfunction

  function automatic bit ca(input int prn, input longint chip);
    longint n;
    if (!ready) build();
    n = chip % 1023;
    return g1[n] ^ g2[(n - delays[prn-1] + 1023) % 1023];
  endfunction

  // Tick interval index for code phase p (units 2^-32 chip).
  function automatic longint tick_index(input longint p, input int mult);
    return (p * mult) >>> 32;
  endfunction

  // Replica bit (0 = +1, 1 = -1) of tick interval j.
  function automatic bit replica(input int prn, input longint j, input int mult, input bit boc);
    if (j < 0) return 0;
    return ca(prn, j / mult) ^ (boc & ((j % mult) >= mult / 2));
  endfunction

  // Replica bit at an arbitrary (real-valued) code phase in chips.
  function automatic bit replica_at(input int prn, input real chips, input bit boc);
    longint c;
    real frac;
    if (chips < 0.0) return 0;
    c = longint'($floor(chips));
    frac = chips - real'(c);
    return ca(prn, c) ^ (boc & (frac >= 0.5));
  endfunction

  function automatic int trig16(input longint unsigned phase, input bit cosine);
    real ang;
    ang = 2.0 * 3.14159265358979 * real'((phase >> 28) & 15) / 16.0;
    return cosine ? int'($floor(7.0 * $cos(ang) + 0.5)) : int'($floor(7.0 * $sin(ang) + 0.5));
  endfunction

endpackage
