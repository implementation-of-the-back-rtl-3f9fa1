// cordic_atan: pipelined CORDIC in vectoring mode, computing the angle of
// the vector (X, Y), i.e. atan(Y/X) over the full circle -pi .. +pi.
//
// Structure (one register per box):
//   input register  -> coarse rotation -> ITER shift-add-sub stages
//                   -> output rounding register
// Coarse rotation: a vector with X < 0 is negated (rotated by pi) and the
// phase accumulator starts at +pi (Y >= 0) or -pi (Y < 0), so the
// micro-rotations only have to cover -pi/2 .. +pi/2.  Stage i rotates the
// vector by -/+ atan(2^-i) toward Y = 0 using shifts and adds only, and
// adds the same angle to the phase.  The stage angles come from
// gps_pkg::q30_atan_pow2, evaluated at elaboration.  The magnitude is not
// output.
//
// Number formats: x_in and y_in are IN_W-bit signed "1QN" numbers (sign,
// one integer bit, IN_W-2 fraction bits, so +/-1.0 is +/-2^(IN_W-2));
// p_out is an OUT_W-bit signed "2QN" angle in radians (sign, two integer
// bits, OUT_W-3 fraction bits, so pi is about 3.1416 * 2^(OUT_W-3)).
//
// Control, after the ports of the arctangent core described for the
// design: `nd` marks a new input, `rdy` marks the matching output LATENCY
// cycles later, `rfd` is high whenever a new input may be given (the
// pipeline takes one per cycle), `ce` freezes the pipeline, `sclr` and
// `aclr` clear the valid flags (synchronously / asynchronously).  The
// widths (16/16), the iteration count and the internal guard bits are this
// design's choices.
module cordic_atan #(
  parameter int unsigned IN_W  = 16,
  parameter int unsigned OUT_W = 16,
  parameter int unsigned ITER  = 14
) (
  input  logic                    clk,
  input  logic                    ce,
  input  logic                    sclr,
  input  logic                    aclr,
  input  logic                    nd,
  input  logic signed [IN_W-1:0]  x_in,
  input  logic signed [IN_W-1:0]  y_in,
  output logic signed [OUT_W-1:0] p_out,
  output logic                    rdy,
  output logic                    rfd
);

  localparam int unsigned LATENCY = ITER + 3;
  localparam int unsigned W   = IN_W + 3;        // guard bits for CORDIC gain
  localparam int unsigned PG  = 3;               // extra phase fraction bits
  localparam int unsigned PF  = OUT_W - 3 + PG;  // phase fraction bits inside
  localparam int unsigned PW  = OUT_W + PG + 1;  // phase width inside

  typedef logic signed [W-1:0]  vec_t;
  typedef logic signed [PW-1:0] ph_t;

  // Angle constants at PF fraction bits, rounded.
  function automatic ph_t q_angle(input longint q30);
    return ph_t'((q30 + (64'sd1 <<< (29 - PF))) >>> (30 - PF));
  endfunction

  localparam ph_t PI_Q = q_angle(gps_pkg::Q30_PI);

  ph_t atan_q [ITER];
  for (genvar i = 0; i < ITER; i++) begin : g_atan
    localparam ph_t A = q_angle(gps_pkg::q30_atan_pow2(i));
    assign atan_q[i] = A;
  end

  // Pipeline registers: index 0 = input register, 1 = after coarse
  // rotation, k+2 = after micro-rotation k.
  vec_t x_r [ITER+2];
  vec_t y_r [ITER+2];
  ph_t  z_r [ITER+2];
  logic v_r [ITER+3];

  always_ff @(posedge clk or posedge aclr) begin
    if (aclr) begin
      for (int k = 0; k < ITER + 3; k++) v_r[k] <= 1'b0;
    end else if (sclr) begin
      for (int k = 0; k < ITER + 3; k++) v_r[k] <= 1'b0;
    end else if (ce) begin
      v_r[0] <= nd;
      for (int k = 1; k < ITER + 3; k++) v_r[k] <= v_r[k-1];
    end
  end

  always_ff @(posedge clk) begin
    if (ce) begin
      // input register
      x_r[0] <= vec_t'(x_in);
      y_r[0] <= vec_t'(y_in);
      z_r[0] <= '0;
      // coarse rotation into the right half plane
      if (x_r[0] < 0) begin
        x_r[1] <= -x_r[0];
        y_r[1] <= -y_r[0];
        z_r[1] <= (y_r[0] >= 0) ? PI_Q : -PI_Q;
      end else begin
        x_r[1] <= x_r[0];
        y_r[1] <= y_r[0];
        z_r[1] <= '0;
      end
      // shift-add-sub stages
      for (int i = 0; i < ITER; i++) begin
        if (y_r[i+1] >= 0) begin
          x_r[i+2] <= x_r[i+1] + (y_r[i+1] >>> i);
          y_r[i+2] <= y_r[i+1] - (x_r[i+1] >>> i);
          z_r[i+2] <= z_r[i+1] + atan_q[i];
        end else begin
          x_r[i+2] <= x_r[i+1] - (y_r[i+1] >>> i);
          y_r[i+2] <= y_r[i+1] + (x_r[i+1] >>> i);
          z_r[i+2] <= z_r[i+1] - atan_q[i];
        end
      end
      // output rounding
      p_out <= OUT_W'((z_r[ITER+1] + ph_t'(1 << (PG - 1))) >>> PG);
    end
  end

  assign rdy = v_r[LATENCY-1];
  assign rfd = !sclr;

endmodule
