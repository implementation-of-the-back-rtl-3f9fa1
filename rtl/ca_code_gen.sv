// ca_code_gen: generic GPS C/A code generator (the "generic PRN generator"
// shared by every satellite channel).
//
// Two 10-stage linear feedback shift registers, G1 and G2, advance by one
// chip on every cycle that `enable` is high.  G1 has feedback polynomial
// 1 + x^3 + x^10 and G2 has 1 + x^2 + x^3 + x^6 + x^8 + x^9 + x^10; both
// start from all ones.  Stage 1 takes the feedback, stage 10 is the oldest.
// The module gives the G1 serial output (stage 10) and all ten G2 stages;
// the satellite-specific part of the code, the XOR of two G2 stages, is
// done by sv_delay_gen, so one generator design serves every satellite.
//
// The G1-serial / G2-parallel split follows the design described; the
// polynomials and the start state are those of the GPS C/A code.
//
// Interface: `init` reloads both registers with all ones (takes priority
// over `enable`).  Outputs are registered values, valid every cycle; the
// chip shown is the one for the current cycle, and it moves on at the clock
// edge where `enable` is high.  `epoch` is high while G1 is in its start
// state, i.e. on chip 0 of every 1023-chip period.
module ca_code_gen (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       enable,
  input  logic       init,
  output logic       g1_out,
  output logic [9:0] g2_state,   // bit i-1 holds stage i
  output logic       epoch
);

  logic [9:0] g1, g2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      g1 <= '1;
      g2 <= '1;
    end else if (init) begin
      g1 <= '1;
      g2 <= '1;
    end else if (enable) begin
      g1 <= {g1[8:0], g1[2] ^ g1[9]};
      g2 <= {g2[8:0], g2[1] ^ g2[2] ^ g2[5] ^ g2[7] ^ g2[8] ^ g2[9]};
    end
  end

  assign g1_out   = g1[9];
  assign g2_state = g2;
  assign epoch    = (g1 == 10'h3FF);

endmodule
