// tb_gps_backend_top: the whole back-end at its default sizes, the way the
// host uses it.
//  1. Satellite search: a capture of 1023 samples of satellite 17's code
//     (baseband, 1 in 8 samples flipped) is written to FSL0 as 32 words with
//     random gaps; the 24 counts are read from FSL1 under random
//     back-pressure, checked against the reference correlation, and the
//     largest one must name satellite 17.
//  2. Phase search: a second capture of the detected satellite on a carrier
//     (step 3 per sample, phase 90) is placed in the
//     sample memory; the search is started for the detected satellite and
//     must end with found = 1 at a phase within 2 steps of the carrier phase
//     or of the carrier phase + 128 (the solution for inverted data).
//     Offsets below the carrier phase give a negative Q correlation, so the
//     CORDIC's coarse rotation is exercised on the way.
// Mechanisms counted, each must occur: FSL0 empty stalls, FSL1 full stalls,
// the dropped 32nd bit of the last word, phase steps (rejected trials),
// trials whose angle needed the CORDIC coarse rotation (|angle| > 90 deg),
// and a found phase.
module tb_gps_backend_top;
  import gps_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [31:0] fsl0_data = 0, fsl1_data;
  logic fsl0_exists = 0, fsl0_read, fsl1_write, fsl1_full = 0, det_busy;
  logic pm_start = 0;
  logic [4:0] pm_sv_id = 0;
  logic [7:0] pm_carrier_step = 0;
  logic [9:0] pm_smp_addr;
  logic pm_smp_bit;
  logic pm_busy, pm_trial_valid, pm_done, pm_found;
  logic [7:0] pm_trial_phase, pm_phase;
  logic [9:0] pm_q_count, pm_i_count;
  logic signed [15:0] pm_angle;
  int checks = 0, failures = 0;

  gps_backend_top dut (.*);

  always #5 clk = ~clk;

  bit mem [1024];
  always_ff @(posedge clk) pm_smp_bit <= mem[pm_smp_addr];

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_empty_stall, n_full_stall, n_dropped_bit, n_phase_step, n_coarse, n_found;

  always @(negedge clk) if (pm_trial_valid) begin
    if (!pm_done) n_phase_step++;
    if (pm_angle > 16'sd12868 || pm_angle < -16'sd12868) n_coarse++;
  end

  initial begin
    localparam int SENT = 17, THETA0 = 90, STEP = 3;
    bit          samples [1024];
    logic [31:0] words [32];
    int          expect_cnt [24];
    int          wi, got, best, best_sv, d, feeds, feeds_since_read;
    code_t       c, cs;

    repeat (3) @(negedge clk);
    rst_n = 1;

    // ---- 1. satellite search ------------------------------------------
    c = ca_code(SENT);
    for (int n = 0; n < 1023; n++) samples[n] = c[n] ^ ($urandom_range(0, 7) == 0);
    samples[1023] = 1'b1;
    for (int w = 0; w < 32; w++)
      for (int b = 0; b < 32; b++) words[w][31-b] = samples[32*w + b];
    for (int s = 1; s <= 24; s++) begin
      cs = ca_code(s);
      expect_cnt[s-1] = 0;
      for (int n = 0; n < 1023; n++) if (cs[n] == samples[n]) expect_cnt[s-1]++;
    end
    wi = 0; got = 0; best = -1; best_sv = 0; feeds = 0; feeds_since_read = 0;
    while (got < 24) begin
      fsl0_exists = (wi < 32) && ($urandom_range(0, 3) != 0);
      fsl0_data   = (wi < 32) ? words[wi] : 32'h0;
      fsl1_full   = ($urandom_range(0, 3) == 0);
      #1;
      if (wi < 32 && !fsl0_exists && !dut.u_det.feed_en) n_empty_stall++;
      if (fsl1_full && feeds == 1023 && got < 24) n_full_stall++;
      if (fsl0_read) begin
        wi++;
        feeds_since_read = 0;
      end
      if (dut.u_det.feed_en) begin
        feeds++;
        feeds_since_read++;
      end
      if (fsl1_write) begin
        // the last word's 32nd bit (sample 1023) is never shifted in
        if (got == 0 && feeds_since_read == 31) n_dropped_bit++;
        check(int'(fsl1_data) == expect_cnt[got],
              $sformatf("sv %0d count %0d vs %0d", got + 1, fsl1_data, expect_cnt[got]));
        if (int'(fsl1_data) > best) begin
          best = int'(fsl1_data);
          best_sv = got + 1;
        end
        got++;
      end
      @(negedge clk);
    end
    fsl1_full = 0;
    check(best_sv == SENT, $sformatf("detected satellite %0d", best_sv));
    $display("detected satellite %0d with %0d of 1023 matches", best_sv, best);

    // ---- 2. phase search -----------------------------------------------
    c = ca_code(best_sv);
    for (int n = 0; n < 1023; n++)
      mem[n] = (c[n] ~^ cos_pos(THETA0 + n * STEP)) ^ ($urandom_range(0, 15) == 0);
    pm_sv_id = 5'(best_sv);
    pm_carrier_step = 8'(STEP);
    pm_start = 1;
    @(negedge clk);
    pm_start = 0;
    while (!pm_done) @(negedge clk);
    check(pm_found, "phase found");
    if (pm_found) n_found++;
    d = (int'(pm_phase) - THETA0 + 256) % 128;
    check(d <= 2 || d >= 126, $sformatf("phase %0d vs carrier %0d", pm_phase, THETA0));
    $display("carrier phase %0d found at offset %0d", THETA0, pm_phase);

    $display("mechanisms: fsl0_empty_stall=%0d fsl1_full_stall=%0d dropped_bit=%0d phase_step=%0d coarse_rotation=%0d found=%0d",
             n_empty_stall, n_full_stall, n_dropped_bit, n_phase_step, n_coarse, n_found);
    check(n_empty_stall > 0, "FSL0 empty stall never happened");
    check(n_full_stall > 0, "FSL1 full stall never happened");
    check(n_dropped_bit > 0, "dropped bit never happened");
    check(n_phase_step > 0, "phase step never happened");
    check(n_coarse > 0, "coarse rotation never happened");
    check(n_found > 0, "phase match never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
