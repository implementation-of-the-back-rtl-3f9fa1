// sat_detector: PRN satellite detector core.
//
// Finds which GPS satellite sent a block of 1023 received 1-bit samples by
// correlating the block, in parallel, with the C/A codes of all NUM_SV
// satellites and reporting the number of matching chips per satellite; the
// satellite with the largest count is the sender (the comparison is left to
// the processor reading FSL1, as in the design described).
//
// Data path: FSL0 words -> shift_reg32 (MSB first) -> one data bit per
// cycle broadcast to NUM_SV sat_channel instances (code generator, delay
// generator, XOR, XNOR, 10-bit match counter) -> count_mux -> FSL1.
// det_controller sequences the run.
//
// Interface: FSL slave on the input side (fsl0_data/fsl0_exists/fsl0_read:
// the word is taken on a cycle with fsl0_read high) and FSL master on the
// output side (fsl1_data/fsl1_write/fsl1_full: a word is written on a cycle
// with fsl1_write high, never while full).  Each run consumes 32 words and
// produces NUM_SV words, satellite 1 first; the count sits in bits 9:0 of
// each output word and the upper bits are zero.
module sat_detector
#(
  parameter int unsigned NUM_SV   = gps_pkg::GPS_NUM_SV,
  parameter int unsigned CODE_LEN = gps_pkg::GPS_CODE_LEN,
  parameter int unsigned FSL_W    = gps_pkg::GPS_FSL_W,
  parameter int unsigned CNT_W    = gps_pkg::GPS_CNT_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [FSL_W-1:0] fsl0_data,
  input  logic             fsl0_exists,
  output logic             fsl0_read,
  output logic [FSL_W-1:0] fsl1_data,
  output logic             fsl1_write,
  input  logic             fsl1_full,
  output logic             busy
);

  logic             feed_en, clear, data_bit;
  logic [4:0]       sel;
  logic [CNT_W-1:0] counts [NUM_SV];
  logic [CNT_W-1:0] sel_count;
  logic [NUM_SV-1:0] chips;         // code chips; only used by the check below

  det_controller #(.NUM_SV(NUM_SV), .CODE_LEN(CODE_LEN), .FSL_W(FSL_W)) u_ctrl (
    .clk, .rst_n, .fsl0_exists, .fsl0_read, .fsl1_full, .fsl1_write,
    .sel, .feed_en, .clear, .busy
  );

  shift_reg32 #(.WIDTH(FSL_W)) u_sr (
    .clk, .rst_n, .load(fsl0_read), .din(fsl0_data), .shift(feed_en), .sout(data_bit)
  );

  for (genvar s = 0; s < NUM_SV; s++) begin : g_sv
    sat_channel #(.SV(s + 1), .CNT_W(CNT_W)) u_ch (
      .clk, .rst_n, .clear, .enable(feed_en), .data_bit,
      .chip(chips[s]), .count(counts[s])
    );
  end

  count_mux #(.NUM_SV(NUM_SV), .CNT_W(CNT_W), .SEL_W(5)) u_mux (
    .din(counts), .sel, .dout(sel_count)
  );

  assign fsl1_data = FSL_W'(sel_count);

  // the C/A codes of different satellites differ: the channels can never
  // all show the same chip for a whole run (spot check on the first two)
  logic diff_seen;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       diff_seen <= 1'b0;
    else if (clear)   diff_seen <= 1'b0;
    else if (feed_en && (chips[0] != chips[NUM_SV-1])) diff_seen <= 1'b1;
  end
  a_codes_differ: assert property (@(posedge clk) disable iff (!rst_n)
                                   (fsl1_write && sel == '0) |-> diff_seen);

endmodule
