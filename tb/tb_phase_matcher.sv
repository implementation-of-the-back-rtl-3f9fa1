// tb_phase_matcher: carrier phase search on synthetic samples.
// The samples are code(sv) times the sign of a cosine carrier of phase
// THETA0 and step STEP per sample, times a data polarity, with some
// samples flipped as noise; they sit in a one-cycle-latency bit memory.
// For every trial the testbench recomputes the Q and I counts from real
// sin/cos, checks the counts, the CORDIC angle against atan2 (0.003 rad),
// that trials step the phase by one from 0, and that the search stops at
// the first trial whose angle is within the tolerance of +/-90 degrees
// (trials closer than 0.003 rad to the tolerance edge are not judged).
// Searches: (sv 1, THETA0 37, step 1), (sv 17, THETA0 200, step 7).
module tb_phase_matcher;
  import gps_ref_pkg::*;

  logic clk = 0, rst_n = 0, start = 0;
  logic [4:0] sv_id;
  logic [7:0] carrier_step;
  logic [9:0] smp_addr;
  logic smp_bit;
  logic busy, trial_valid, done, found;
  logic [7:0] trial_phase, phase;
  logic [9:0] q_count, i_count;
  logic signed [15:0] angle;
  int checks = 0, failures = 0;

  localparam real TOL = 201.0 / 8192.0;
  localparam real PI  = 3.14159265358979;

  phase_matcher #(.CODE_LEN(1023), .CNT_W(10), .THETA_W(8), .SC_W(16),
                  .ANG_W(16), .PHASE_TOL(201)) dut (.*);

  always #5 clk = ~clk;

  bit mem [1024];
  always_ff @(posedge clk) smp_bit <= mem[smp_addr];

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    repeat (800000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  code_t c;
  int    step_i, next_trial, n_trials;

  // per-trial reference check
  always @(negedge clk) if (trial_valid) begin
    int qr, ir, th;
    real ra, ga, d, dev;
    bit judged, ref_match;
    qr = 0; ir = 0;
    for (int n = 0; n < 1023; n++) begin
      th = int'(trial_phase) + n * step_i;
      if (mem[n] == (c[n] ~^ sin_pos(th))) qr++;
      if (mem[n] == (c[n] ~^ cos_pos(th))) ir++;
    end
    check(int'(trial_phase) == next_trial, $sformatf("trial phase %0d vs %0d", trial_phase, next_trial));
    check(int'(q_count) == qr && int'(i_count) == ir,
          $sformatf("counts Q %0d/%0d I %0d/%0d", q_count, qr, i_count, ir));
    ra = $atan2(real'(2 * ir - 1023), real'(2 * qr - 1023));
    ga = real'(angle) / 8192.0;
    d  = ga - ra;
    if (d > PI) d -= 2.0 * PI;
    if (d < -PI) d += 2.0 * PI;
    check(d < 0.003 && d > -0.003, $sformatf("angle %f vs %f", ga, ra));
    dev = ((ra < 0.0) ? -ra : ra) - PI / 2.0;
    if (dev < 0.0) dev = -dev;
    ref_match = (dev <= TOL);
    judged = (dev < TOL - 0.003) || (dev > TOL + 0.003);
    if (judged) check((done && found) == ref_match, $sformatf("decision at phase %0d", trial_phase));
    if (!done) check(trial_phase != 8'hFF, "search must end after the last phase");
    next_trial++;
    n_trials++;
  end

  initial begin
    int svs [2]    = '{1, 17};
    int theta0 [2] = '{37, 200};
    int steps [2]  = '{1, 7};
    int pol [2]    = '{1, 0};
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 2; r++) begin
      c = ca_code(svs[r]);
      step_i = steps[r];
      for (int n = 0; n < 1023; n++)
        mem[n] = (pol[r] == 1) ~^ (c[n] ~^ cos_pos(theta0[r] + n * step_i))
                 ^ ($urandom_range(0, 19) == 0);
      next_trial = 0;
      n_trials = 0;
      sv_id = 5'(svs[r]);
      carrier_step = 8'(step_i);
      start = 1;
      @(negedge clk);
      start = 0;
      check(busy, "busy after start");
      while (!done) @(negedge clk);
      check(found, $sformatf("search %0d found", r));
      $display("search %0d: phase %0d (carrier phase %0d)", r, phase, theta0[r]);
      @(negedge clk);
      check(!busy, "idle after done");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
