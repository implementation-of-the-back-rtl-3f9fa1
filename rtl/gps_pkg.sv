// gps_pkg: constants, types and elaboration-time functions shared by the
// GPS back-end modules.
//
// * The C/A code constants (1023-chip code, 10-stage G1/G2 registers, 24
//   satellites) and the per-satellite G2 tap pairs used by the delay
//   generators.  The tap pairs are those of the C/A code: the listed pairs
//   reproduce the G2 delays of 5 chips (SV1) to 512 chips (SV24).
// * Fixed-point helpers that let the sine/cosine table and the CORDIC
//   arctangent constants be computed at elaboration instead of being typed
//   in: sine and cosine by Taylor series, arctan(2^-i) by its power series,
//   all in Q30 integer arithmetic on 64-bit values.
package gps_pkg;

  localparam int unsigned GPS_NUM_SV   = 24;    // satellites searched in parallel
  localparam int unsigned GPS_CODE_LEN = 1023;  // chips per C/A code period
  localparam int unsigned GPS_CNT_W    = 10;    // width of the match counters
  localparam int unsigned GPS_FSL_W    = 32;    // FSL data width
  localparam int unsigned GPS_SV_W     = 5;     // width of a satellite number

  typedef logic [GPS_CNT_W-1:0] count_t;
  typedef logic [GPS_SV_W-1:0]  sv_id_t;

  // G2 tap pair of a satellite, as stage numbers 1..10.
  typedef struct packed {
    logic [3:0] a;
    logic [3:0] b;
  } g2_taps_t;

  // Phase-selector taps of satellites 1..24 (0 for any other number).
  function automatic g2_taps_t sv_taps(input int unsigned sv);
    case (sv)
      1:  return '{4'd2, 4'd6};
      2:  return '{4'd3, 4'd7};
      3:  return '{4'd4, 4'd8};
      4:  return '{4'd5, 4'd9};
      5:  return '{4'd1, 4'd9};
      6:  return '{4'd2, 4'd10};
      7:  return '{4'd1, 4'd8};
      8:  return '{4'd2, 4'd9};
      9:  return '{4'd3, 4'd10};
      10: return '{4'd2, 4'd3};
      11: return '{4'd3, 4'd4};
      12: return '{4'd5, 4'd6};
      13: return '{4'd6, 4'd7};
      14: return '{4'd7, 4'd8};
      15: return '{4'd8, 4'd9};
      16: return '{4'd9, 4'd10};
      17: return '{4'd1, 4'd4};
      18: return '{4'd2, 4'd5};
      19: return '{4'd3, 4'd6};
      20: return '{4'd4, 4'd7};
      21: return '{4'd5, 4'd8};
      22: return '{4'd6, 4'd9};
      23: return '{4'd1, 4'd3};
      24: return '{4'd4, 4'd6};
      default: return '{4'd0, 4'd0};
    endcase
  endfunction

  // ---------------------------------------------------------------------
  // Q30 fixed-point helpers (value = integer / 2^30).
  // ---------------------------------------------------------------------
  localparam longint Q30_ONE = 64'sd1073741824;   // 1.0
  localparam longint Q30_PI  = 64'sd3373259426;   // pi, rounded

  // sin(x) for 0 <= x <= pi/2, Horner form of the Taylor series to x^13.
  function automatic longint q30_sin(input longint x);
    longint x2, t;
    x2 = (x * x) >>> 30;
    t  = Q30_ONE - (x2 / 156);
    t  = Q30_ONE - (((x2 * t) >>> 30) / 110);
    t  = Q30_ONE - (((x2 * t) >>> 30) / 72);
    t  = Q30_ONE - (((x2 * t) >>> 30) / 42);
    t  = Q30_ONE - (((x2 * t) >>> 30) / 20);
    t  = Q30_ONE - (((x2 * t) >>> 30) / 6);
    return (x * t) >>> 30;
  endfunction

  // cos(x) for 0 <= x <= pi/2, Taylor series to x^14.
  function automatic longint q30_cos(input longint x);
    longint x2, t;
    x2 = (x * x) >>> 30;
    t  = Q30_ONE - (x2 / 182);
    t  = Q30_ONE - (((x2 * t) >>> 30) / 132);
    t  = Q30_ONE - (((x2 * t) >>> 30) / 90);
    t  = Q30_ONE - (((x2 * t) >>> 30) / 56);
    t  = Q30_ONE - (((x2 * t) >>> 30) / 30);
    t  = Q30_ONE - (((x2 * t) >>> 30) / 12);
    t  = Q30_ONE - (((x2 * t) >>> 30) / 2);
    return t;
  endfunction

  // sin(2*pi*k/2^tw) scaled to amp and rounded to the nearest integer.
  function automatic longint sin_table(input longint k, input int tw, input longint amp);
    longint quarter, r, x, v, mag;
    int     q;
    quarter = 64'sd1 <<< (tw - 2);
    q       = int'((k >>> (tw - 2)) & 3);
    r       = k & (quarter - 1);
    x       = (r * (Q30_PI / 2)) / quarter;
    v       = (q == 0 || q == 2) ? q30_sin(x) : q30_cos(x);
    mag     = (v * amp + (Q30_ONE / 2)) >>> 30;
    return (q >= 2) ? -mag : mag;
  endfunction

  // arctan(2^-i) in Q30.
  function automatic longint q30_atan_pow2(input int i);
    longint x, x2, p, s;
    if (i == 0) return Q30_PI / 4;
    x  = Q30_ONE >>> i;
    x2 = (x * x) >>> 30;
    p  = x;
    s  = 0;
    for (int k = 0; k < 40; k++) begin
      if (k % 2 == 0) s = s + p / (2 * k + 1);
      else            s = s - p / (2 * k + 1);
      p = (p * x2) >>> 30;
    end
    return s;
  endfunction

endpackage
