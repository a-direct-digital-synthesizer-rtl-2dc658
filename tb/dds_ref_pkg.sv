// dds_ref_pkg: reference model of the synthesizer's sine look-up, for testbenches.
//
// Rebuilds the coarse and fine quarter-wave tables from their defining
// formulas with real arithmetic (independently of the ROM hex files), and
// gives the expected 10-bit offset-binary sample for a 12-bit phase:
//   S(p)        = 511.5*sin(pi/2*(p+0.5)/1024) - 0.5,  M(p) = round(S(p))
//   fine(A,C)   = round(mean over B of S(A,B,C) - S(A,B,0)), limited to 0..7
//   coarse(A,B) = round(mean over C of M(A,B,C) - fine(A,C)) - 4*{A,B}
//   mag(p)      = 4*{A,B} + coarse(A,B) + fine(A,C),  p = {A[3:0],B[2:0],C[2:0]}
//   sample      = 511 - mag (phase MSB 0) or 512 + mag (phase MSB 1), with p the
//                 low 10 phase bits, inverted when the second MSB is 1.
package dds_ref_pkg;

  localparam real PI = 3.14159265358979323846;

  int coarse_t [128];
  int fine_t   [128];

  function automatic int rnd(real x);
    return int'($floor(x + 0.5));
  endfunction

  function automatic real target(int p);
    return 511.5 * $sin(PI / 2.0 * (real'(p) + 0.5) / 1024.0) - 0.5;
  endfunction

  function automatic int target_mag(int p);
    int m;
    m = rnd(target(p));
    if (m < 0) m = 0;
    if (m > 511) m = 511;
    return m;
  endfunction

  function automatic void init_tables();
    for (int a = 0; a < 16; a++)
      for (int c = 0; c < 8; c++) begin
        real s = 0.0;
        int f;
        for (int b = 0; b < 8; b++)
          s += target(a*64 + b*8 + c) - target(a*64 + b*8);
        f = rnd(s / 8.0);
        fine_t[a*8 + c] = (f < 0) ? 0 : (f > 7) ? 7 : f;
      end
    for (int a = 0; a < 16; a++)
      for (int b = 0; b < 8; b++) begin
        int s = 0;
        int v;
        for (int c = 0; c < 8; c++)
          s += target_mag(a*64 + b*8 + c) - fine_t[a*8 + c];
        v = rnd(real'(s) / 8.0) - 4*(a*8 + b);
        coarse_t[a*8 + b] = (v < 0) ? 0 : (v > 127) ? 127 : v;
      end
  endfunction

  function automatic int mag(int p);
    return 4*(p >> 3) + coarse_t[p >> 3] + fine_t[((p >> 6) << 3) | (p & 7)];
  endfunction

  function automatic int fold(int ph);
    return (((ph >> 10) & 1) != 0) ? (~ph & 1023) : (ph & 1023);
  endfunction

  function automatic int sample(int ph);
    int m;
    m = mag(fold(ph));
    return (((ph >> 11) & 1) != 0) ? 512 + m : 511 - m;
  endfunction

  // Ideal offset-binary value (before the 511.5 offset is removed) for a phase
  function automatic real ideal(int ph);
    return 511.5 - 511.5 * $sin(2.0 * PI * (real'(ph) + 0.5) / 4096.0);
  endfunction

endpackage
