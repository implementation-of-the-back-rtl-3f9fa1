// sat_channel: one satellite correlator of the detector ("PRN block").
//
// Holds a C/A code generator and the delay generator of satellite SV; their
// outputs are XORed to give the satellite's code chip, which is XNORed with
// the incoming data bit, and a match counter counts the agreements.  After
// one 1023-chip period `count` is the correlation of the data with this
// satellite's code at zero code offset.
//
// Interface: on a cycle with `enable` high the channel consumes `data_bit`,
// counts it against the current chip and advances the code generator.
// `clear` restarts the generator at chip 0 and clears the count.  `count`
// is registered (one cycle after the last enabled chip).  `chip` exposes the
// current code chip.
module sat_channel
#(
  parameter int unsigned SV    = 1,
  parameter int unsigned CNT_W = gps_pkg::GPS_CNT_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             enable,
  input  logic             data_bit,
  output logic             chip,
  output logic [CNT_W-1:0] count
);

  logic       g1, g2i, epoch;
  logic [9:0] g2;

  ca_code_gen u_gen (
    .clk, .rst_n, .enable, .init(clear),
    .g1_out(g1), .g2_state(g2), .epoch
  );

  sv_delay_gen u_delay (
    .g2_state(g2), .sv_id(gps_pkg::sv_id_t'(SV)), .g2i
  );

  assign chip = g1 ^ g2i;

  match_counter #(.CNT_W(CNT_W)) u_cnt (
    .clk, .rst_n, .clear, .enable,
    .match(chip ~^ data_bit),
    .count
  );

  // after a clear the generator must stand on chip 0 of the code
  a_restart: assert property (@(posedge clk) disable iff (!rst_n) clear |=> epoch);

endmodule
