// phase_matcher: carrier phase search loop for one detected satellite.
//
// Once the sending satellite is known, its C/A code is generated locally at
// code phase zero and combined (XNOR) with the sign of a local sine and of a
// local cosine carrier, giving a quadrature (Q) and an in-phase (I)
// reference.  Each is XNORed with the stored data bits and counted over one
// 1023-chip code period.  The two counts become signed correlations
//     corr = 2*count - CODE_LEN
// which enter a CORDIC as X = Q and Y = I, so the CORDIC angle is
// atan(I/Q).  The carrier phase is right when Q is zero, i.e. when that
// angle is +/-90 degrees (either sign, since the data bit may invert the
// signal).  If the angle is not within PHASE_TOL of +/-90 degrees, the
// phase offset is increased by one THETA step (2*pi/2^THETA_W) and the
// period is correlated again.  The search ends when the condition holds
// (found = 1, phase = offset) or after all 2^THETA_W offsets (found = 0).
//
// Carrier: sample n uses THETA = offset + n*carrier_step (mod 2^THETA_W).
// Only the sign bit of the sine/cosine table is used for the XNOR; a zero
// value counts as positive.  XNOR acts as a multiplier with 1 = +1 and
// 0 = -1.
//
// What follows the design described: code generator with satellite delay,
// XNOR mixing with sin and cos, two 10-bit correlation counters, arctangent
// of the two counts with Q on X and I on Y, and the rule "if 90 degrees is
// found stop, else increase the phase shift by one and repeat".  This
// design's own choices: the sign-bit mixing, the count-to-1QN scaling, the
// tolerance, the programmable carrier step, stopping after one full turn,
// and the phase step being applied directly to the carrier (the phase-to-
// shift transform between decision and generators is not specified).
//
// Interface: pulse `start` while idle to search for satellite `sv_id`.  The
// sample memory is read through `smp_addr` (bit index 0..CODE_LEN-1); the
// bit must appear on `smp_bit` one cycle later.  After each trial,
// `trial_valid` pulses with that trial's offset, counts and angle.  `done`
// pulses at the end with `found` and `phase` valid until the next start.
//
// Timing: one trial takes CODE_LEN + 4 cycles of correlation plus the
// CORDIC latency (ITER + 3) plus 2 cycles of decision.
module phase_matcher #(
  parameter int unsigned CODE_LEN  = gps_pkg::GPS_CODE_LEN,
  parameter int unsigned CNT_W     = gps_pkg::GPS_CNT_W,
  parameter int unsigned THETA_W   = 8,
  parameter int unsigned SC_W      = 16,
  parameter int unsigned ANG_W     = 16,
  parameter int unsigned PHASE_TOL = 201
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  gps_pkg::sv_id_t         sv_id,
  input  logic [THETA_W-1:0]      carrier_step,
  output logic [9:0]              smp_addr,
  input  logic                    smp_bit,
  output logic                    busy,
  output logic                    trial_valid,
  output logic [THETA_W-1:0]      trial_phase,
  output logic [CNT_W-1:0]        q_count,
  output logic [CNT_W-1:0]        i_count,
  output logic signed [ANG_W-1:0] angle,
  output logic                    done,
  output logic                    found,
  output logic [THETA_W-1:0]      phase
);

  localparam int unsigned ANG_FRAC = ANG_W - 3;
  // pi/2 in the CORDIC's 2QN output format
  localparam longint HALF_PI_Q =
    ((gps_pkg::Q30_PI / 2) + (64'sd1 <<< (29 - ANG_FRAC))) >>> (30 - ANG_FRAC);

  typedef enum logic [2:0] {S_IDLE, S_CLEAR, S_RUN, S_DRAIN, S_ATAN, S_WAIT, S_DECIDE} state_t;

  state_t             state;
  logic [10:0]        n;          // sample index of the address being issued
  logic [THETA_W-1:0] offset;     // current carrier phase offset
  logic [THETA_W-1:0] theta;      // carrier angle of sample n
  logic               run_d;      // a sample is in flight (data returns now)
  logic [1:0]         drain;
  gps_pkg::sv_id_t    sv_q;

  // ---- local code --------------------------------------------------------
  logic       g1, g2i, epoch, chip, chip_d;
  logic [9:0] g2;
  logic       code_adv;

  assign code_adv = (state == S_RUN);

  ca_code_gen u_gen (
    .clk, .rst_n, .enable(code_adv), .init(state == S_CLEAR),
    .g1_out(g1), .g2_state(g2), .epoch
  );
  sv_delay_gen u_delay (.g2_state(g2), .sv_id(sv_q), .g2i);
  assign chip = g1 ^ g2i;

  // ---- carrier -----------------------------------------------------------
  logic signed [SC_W-1:0] sin_v, cos_v;
  sincos_lut #(.THETA_W(THETA_W), .OUT_W(SC_W)) u_lut (
    .clk, .theta, .sin_out(sin_v), .cos_out(cos_v)
  );

  // ---- mixing and correlation -------------------------------------------
  logic q_ref, i_ref;
  assign q_ref = chip_d ~^ ~sin_v[SC_W-1];
  assign i_ref = chip_d ~^ ~cos_v[SC_W-1];

  match_counter #(.CNT_W(CNT_W)) u_q (
    .clk, .rst_n, .clear(state == S_CLEAR), .enable(run_d),
    .match(smp_bit ~^ q_ref), .count(q_count)
  );
  match_counter #(.CNT_W(CNT_W)) u_i (
    .clk, .rst_n, .clear(state == S_CLEAR), .enable(run_d),
    .match(smp_bit ~^ i_ref), .count(i_count)
  );

  // ---- arctangent --------------------------------------------------------
  localparam int unsigned IN_W = 16;
  logic signed [IN_W-1:0] x_in, y_in;
  logic                   c_nd, c_rdy, c_rfd;
  logic signed [ANG_W-1:0] c_p;

  // corr = 2*count - CODE_LEN, placed so that CODE_LEN maps just under 1.0
  function automatic logic signed [IN_W-1:0] to_1qn(input logic [CNT_W-1:0] c);
    logic signed [IN_W-1:0] corr;
    corr = IN_W'(2 * int'(c)) - IN_W'(CODE_LEN);
    return corr <<< (IN_W - 2 - CNT_W);
  endfunction

  assign x_in = to_1qn(q_count);
  assign y_in = to_1qn(i_count);
  assign c_nd = (state == S_ATAN);

  cordic_atan #(.IN_W(IN_W), .OUT_W(ANG_W), .ITER(ANG_W - 2)) u_atan (
    .clk, .ce(1'b1), .sclr(!rst_n), .aclr(1'b0), .nd(c_nd),
    .x_in, .y_in, .p_out(c_p), .rdy(c_rdy), .rfd(c_rfd)
  );

  // ---- decision ----------------------------------------------------------
  localparam logic signed [ANG_W:0] TOL_S = (ANG_W+1)'(PHASE_TOL);
  logic signed [ANG_W:0] dev;      // |angle| - pi/2
  logic                  matched;
  always_comb begin
    dev     = (angle < 0) ? -(ANG_W+1)'(angle) : (ANG_W+1)'(angle);
    dev     = dev - (ANG_W+1)'(HALF_PI_Q);
    matched = (dev <= TOL_S) && (dev >= -TOL_S);
  end

  // ---- sequencing --------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      n           <= '0;
      offset      <= '0;
      theta       <= '0;
      run_d       <= 1'b0;
      chip_d      <= 1'b0;
      drain       <= '0;
      sv_q        <= '0;
      angle       <= '0;
      trial_valid <= 1'b0;
      trial_phase <= '0;
      done        <= 1'b0;
      found       <= 1'b0;
      phase       <= '0;
    end else begin
      trial_valid <= 1'b0;
      done        <= 1'b0;
      run_d       <= (state == S_RUN);
      chip_d      <= chip;
      unique case (state)
        S_IDLE: if (start) begin
          sv_q   <= sv_id;
          offset <= '0;
          found  <= 1'b0;
          state  <= S_CLEAR;
        end
        S_CLEAR: begin
          n     <= '0;
          theta <= offset;
          state <= S_RUN;
        end
        S_RUN: begin
          n     <= n + 1'b1;
          theta <= theta + carrier_step;
          if (32'(n) == CODE_LEN - 1) begin
            drain <= '0;
            state <= S_DRAIN;
          end
        end
        S_DRAIN: begin
          drain <= drain + 1'b1;
          if (drain == 2'd1) state <= S_ATAN;
        end
        S_ATAN: state <= S_WAIT;
        S_WAIT: if (c_rdy) begin
          angle <= c_p;
          state <= S_DECIDE;
        end
        S_DECIDE: begin
          trial_valid <= 1'b1;
          trial_phase <= offset;
          if (matched) begin
            found <= 1'b1;
            phase <= offset;
            done  <= 1'b1;
            state <= S_IDLE;
          end else if (offset == '1) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            offset <= offset + 1'b1;
            state  <= S_CLEAR;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign smp_addr = n[9:0];
  assign busy     = (state != S_IDLE);

  // the CORDIC takes one input per cycle, so it must always be ready
  // every trial correlates from chip 0 of the code
  a_code_start: assert property (@(posedge clk) disable iff (!rst_n)
                                 (state == S_RUN && n == '0) |-> epoch);
  a_cordic_ready: assert property (@(posedge clk) disable iff (!rst_n) c_nd |-> c_rfd);

endmodule
