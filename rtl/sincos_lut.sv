// sincos_lut: sine/cosine look-up table of the carrier generator.
//
// Maps an unsigned angle THETA of THETA_W bits to
//     theta = THETA * 2*pi / 2^THETA_W  radians
// and returns sin(theta) and cos(theta) as OUT_W-bit two's-complement
// numbers scaled by 2^(OUT_W-1) - 1 and rounded to nearest.  The table is
// computed at elaboration (gps_pkg::sin_table, a Taylor series in integer
// arithmetic); cos(THETA) is read as sin(THETA + 2^THETA_W / 4).
//
// The angle mapping, the 8-bit angle and the two's-complement output follow
// the carrier generator described for the design (there a vendor look-up
// table core).  The 16-bit output width and the single output register are
// this design's choices.
//
// Timing: one cycle of latency; the outputs change on the clock edge after
// `theta` is presented.
module sincos_lut #(
  parameter int unsigned THETA_W = 8,
  parameter int unsigned OUT_W   = 16
) (
  input  logic                    clk,
  input  logic [THETA_W-1:0]      theta,
  output logic signed [OUT_W-1:0] sin_out,
  output logic signed [OUT_W-1:0] cos_out
);

  localparam int unsigned N    = 1 << THETA_W;
  localparam longint      AMP  = (64'sd1 <<< (OUT_W - 1)) - 1;

  logic signed [OUT_W-1:0] rom [N];

  for (genvar k = 0; k < N; k++) begin : g_rom
    localparam logic signed [OUT_W-1:0] VAL =
      OUT_W'(gps_pkg::sin_table(longint'(k), int'(THETA_W), AMP));
    assign rom[k] = VAL;
  end

  logic [THETA_W-1:0] theta_c;
  assign theta_c = theta + THETA_W'(N / 4);

  always_ff @(posedge clk) begin
    sin_out <= rom[theta];
    cos_out <= rom[theta_c];
  end

endmodule
