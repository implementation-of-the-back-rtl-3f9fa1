// count_mux: the detector's output multiplexer.
//
// An unregistered NUM_SV-to-1 multiplexer, CNT_W bits wide, that puts the
// count of the satellite chosen by `sel` (0 = satellite 1) on the FSL1 data
// path.  A select beyond the last satellite gives 0.
module count_mux #(
  parameter int unsigned NUM_SV = 24,
  parameter int unsigned CNT_W  = 10,
  parameter int unsigned SEL_W  = 5
) (
  input  logic [CNT_W-1:0] din [NUM_SV],
  input  logic [SEL_W-1:0] sel,
  output logic [CNT_W-1:0] dout
);

  always_comb begin
    dout = '0;
    for (int i = 0; i < NUM_SV; i++)
      if (int'(sel) == i) dout = din[i];
  end

endmodule
