// gps_backend_top: digital back-end of the GPS receiver, satellite search
// and carrier phase matching.
//
// Two units share the clock and reset:
//  * sat_detector: the satellite detector core.  The host writes 32 words
//    (1023 one-bit samples) on the FSL0 slave port and reads back NUM_SV
//    match counts on the FSL1 master port; the largest count names the
//    satellite that sent the samples.
//  * phase_matcher: the carrier phase search for one satellite.  The host
//    starts it with the satellite number and the carrier step; it reads the
//    stored samples through a bit-address port (the sample memory is
//    outside this block) and reports the carrier phase offset at which the
//    quadrature correlation vanishes.
// The choice of satellite between the two steps (largest count) is made by
// the host, as in the system described, so the units are not wired to each
// other here.
//
// All ports are plain signals; see sat_detector and phase_matcher for the
// handshakes and timing.
module gps_backend_top #(
  parameter int unsigned NUM_SV   = gps_pkg::GPS_NUM_SV,
  parameter int unsigned CODE_LEN = gps_pkg::GPS_CODE_LEN,
  parameter int unsigned FSL_W    = gps_pkg::GPS_FSL_W,
  parameter int unsigned CNT_W    = gps_pkg::GPS_CNT_W,
  parameter int unsigned THETA_W  = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  // FSL0 (host -> detector)
  input  logic [FSL_W-1:0]   fsl0_data,
  input  logic               fsl0_exists,
  output logic               fsl0_read,
  // FSL1 (detector -> host)
  output logic [FSL_W-1:0]   fsl1_data,
  output logic               fsl1_write,
  input  logic               fsl1_full,
  output logic               det_busy,
  // phase search control
  input  logic               pm_start,
  input  gps_pkg::sv_id_t    pm_sv_id,
  input  logic [THETA_W-1:0] pm_carrier_step,
  // sample memory read port
  output logic [9:0]         pm_smp_addr,
  input  logic               pm_smp_bit,
  // phase search results
  output logic               pm_busy,
  output logic               pm_trial_valid,
  output logic [THETA_W-1:0] pm_trial_phase,
  output logic [CNT_W-1:0]   pm_q_count,
  output logic [CNT_W-1:0]   pm_i_count,
  output logic signed [15:0] pm_angle,
  output logic               pm_done,
  output logic               pm_found,
  output logic [THETA_W-1:0] pm_phase
);

  sat_detector #(
    .NUM_SV(NUM_SV), .CODE_LEN(CODE_LEN), .FSL_W(FSL_W), .CNT_W(CNT_W)
  ) u_det (
    .clk, .rst_n,
    .fsl0_data, .fsl0_exists, .fsl0_read,
    .fsl1_data, .fsl1_write, .fsl1_full,
    .busy(det_busy)
  );

  phase_matcher #(
    .CODE_LEN(CODE_LEN), .CNT_W(CNT_W), .THETA_W(THETA_W)
  ) u_pm (
    .clk, .rst_n,
    .start(pm_start), .sv_id(pm_sv_id), .carrier_step(pm_carrier_step),
    .smp_addr(pm_smp_addr), .smp_bit(pm_smp_bit),
    .busy(pm_busy), .trial_valid(pm_trial_valid), .trial_phase(pm_trial_phase),
    .q_count(pm_q_count), .i_count(pm_i_count), .angle(pm_angle),
    .done(pm_done), .found(pm_found), .phase(pm_phase)
  );

endmodule
