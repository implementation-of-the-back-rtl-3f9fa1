// sv_delay_gen: satellite delay generator (G2 phase selector).
//
// A satellite's C/A code is G1 XOR a delayed copy of G2.  Instead of a long
// delay line, the delayed G2 chip is formed by XORing two stages of the G2
// register: by the shift-and-add property of the maximal-length sequence,
// each stage pair equals G2 delayed by a fixed amount (5 chips for
// satellite 1 up to 512 chips for satellite 24).  The stage pair of each
// satellite comes from gps_pkg::sv_taps.
//
// Interface: purely combinational.  `sv_id` is the satellite number 1..24;
// any other number gives 0.  Tie `sv_id` to a constant for a fixed channel.
module sv_delay_gen
(
  input  logic [9:0] g2_state,   // bit i-1 holds G2 stage i
  input  gps_pkg::sv_id_t     sv_id,
  output logic       g2i
);

  gps_pkg::g2_taps_t taps;

  always_comb begin
    taps = gps_pkg::sv_taps(int'(sv_id));
    if (taps.a == 4'd0) g2i = 1'b0;
    else                g2i = g2_state[taps.a - 4'd1] ^ g2_state[taps.b - 4'd1];
  end

endmodule
