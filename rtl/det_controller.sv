// det_controller: control state machine of the satellite detector core.
//
// One detection run correlates CODE_LEN data bits against every satellite:
//   CLEAR  restart all code generators at chip 0 and clear the counters;
//   WAIT   wait for FSL0 to hold a word, then read it into the shift
//          register (fsl0_read doubles as the shift register's load);
//   SHIFT  one chip per cycle: feed_en shifts the register and advances
//          every code generator and counter; after FSL_W bits go back to
//          WAIT for the next word, after CODE_LEN bits go to OUTPUT.  The
//          remaining bits of the last word are dropped (32 words carry 1024
//          bits, the code has 1023 chips).  No word is read while shifting.
//   OUTPUT step `sel` through the satellites, writing each count to FSL1
//          whenever FSL1 is not full, then start the next run.
// The state sequence follows the controller described for the design; the
// encoding and exact cycle timing are this design's own.
//
// Timing: a run takes CODE_LEN shift cycles plus one cycle per word read,
// plus NUM_SV write cycles, plus one clear cycle, plus any cycles spent
// waiting on an empty FSL0 or a full FSL1.
module det_controller
#(
  parameter int unsigned NUM_SV   = gps_pkg::GPS_NUM_SV,
  parameter int unsigned CODE_LEN = gps_pkg::GPS_CODE_LEN,
  parameter int unsigned FSL_W    = gps_pkg::GPS_FSL_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         fsl0_exists,
  output logic         fsl0_read,
  input  logic         fsl1_full,
  output logic         fsl1_write,
  output logic [4:0]   sel,
  output logic         feed_en,
  output logic         clear,
  output logic         busy
);

  typedef enum logic [1:0] {S_CLEAR, S_WAIT, S_SHIFT, S_OUTPUT} state_t;

  state_t      state;
  logic [10:0] chip_cnt;   // chips correlated in this run
  logic [5:0]  bit_cnt;    // bits shifted from the current word

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_CLEAR;
      chip_cnt <= '0;
      bit_cnt  <= '0;
      sel      <= '0;
    end else begin
      unique case (state)
        S_CLEAR: begin
          chip_cnt <= '0;
          sel      <= '0;
          state    <= S_WAIT;
        end
        S_WAIT: if (fsl0_exists) begin
          bit_cnt <= '0;
          state   <= S_SHIFT;
        end
        S_SHIFT: begin
          chip_cnt <= chip_cnt + 1'b1;
          bit_cnt  <= bit_cnt + 1'b1;
          if (32'(chip_cnt) == CODE_LEN - 1)   state <= S_OUTPUT;
          else if (32'(bit_cnt) == FSL_W - 1)  state <= S_WAIT;
        end
        S_OUTPUT: if (!fsl1_full) begin
          if (32'(sel) == NUM_SV - 1) state <= S_CLEAR;
          else                        sel   <= sel + 1'b1;
        end
        default: state <= S_CLEAR;
      endcase
    end
  end

  assign clear      = (state == S_CLEAR);
  assign fsl0_read  = (state == S_WAIT) && fsl0_exists;
  assign feed_en    = (state == S_SHIFT);
  assign fsl1_write = (state == S_OUTPUT) && !fsl1_full;
  assign busy       = !((state == S_WAIT) && (chip_cnt == '0));

  // FSL rules: never read an empty FIFO, never write a full one.
  a_no_read_empty:  assert property (@(posedge clk) disable iff (!rst_n) fsl0_read  |-> fsl0_exists);
  a_no_write_full:  assert property (@(posedge clk) disable iff (!rst_n) fsl1_write |-> !fsl1_full);
  a_no_read_shift:  assert property (@(posedge clk) disable iff (!rst_n) feed_en    |-> !fsl0_read);

endmodule
