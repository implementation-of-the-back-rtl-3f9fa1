// gps_ref_pkg: reference models for the GPS back-end testbenches.
//
// The C/A code is built here by the textbook "delayed G2" method: the G1
// and G2 maximal-length sequences are generated once, and the code of
// satellite s is G1[n] XOR G2[n - delay(s)] with the published G2 delays
// (5 chips for satellite 1 ... 512 chips for satellite 24).  The design
// instead XORs two G2 register stages, so agreement between the two is an
// independent check of the tap table.  Carrier signs use real sin/cos.
package gps_ref_pkg;

  localparam int CODE_LEN = 1023;

  typedef bit code_t [CODE_LEN];

  function automatic int g2_delay(input int sv);
    int d [24] = '{5, 6, 7, 8, 17, 18, 139, 140, 141, 251, 252, 254,
                   255, 256, 257, 258, 469, 470, 471, 472, 473, 474, 509, 512};
    return d[sv - 1];
  endfunction

  // Maximal-length sequence of a 10-stage register started at all ones;
  // taps are the feedback stages (1-based).
  function automatic code_t mls(input bit g2);
    code_t s;
    bit r [1:10];
    bit fb;
    for (int i = 1; i <= 10; i++) r[i] = 1'b1;
    for (int n = 0; n < CODE_LEN; n++) begin
      s[n] = r[10];
      if (g2) fb = r[2] ^ r[3] ^ r[6] ^ r[8] ^ r[9] ^ r[10];
      else    fb = r[3] ^ r[10];
      for (int i = 10; i > 1; i--) r[i] = r[i-1];
      r[1] = fb;
    end
    return s;
  endfunction

  function automatic code_t ca_code(input int sv);
    code_t g1, g2, c;
    int d;
    g1 = mls(1'b0);
    g2 = mls(1'b1);
    d  = g2_delay(sv);
    for (int n = 0; n < CODE_LEN; n++)
      c[n] = g1[n] ^ g2[(n - d + CODE_LEN) % CODE_LEN];
    return c;
  endfunction

  // Sign of the 16-bit rounded sine of THETA (8-bit angle): 1 = not negative.
  function automatic bit sin_pos(input int theta);
    real x;
    x = 2.0 * 3.14159265358979 * real'(theta % 256) / 256.0;
    return ($sin(x) * 32767.0) > -0.5;
  endfunction

  function automatic bit cos_pos(input int theta);
    return sin_pos(theta + 64);
  endfunction

endpackage
