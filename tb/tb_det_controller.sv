// tb_det_controller: drives the FSL handshakes with random gaps (empty
// FSL0, full FSL1) for three runs and checks: 32 words read per run, 1023
// feed cycles, at most 32 feeds per word and none while reading, 24 writes
// per run with select 0..23 in order, one clear per run (at its start), and the run length
// when no stall occurs (1023 + 32 + 24 + 1 cycles).
module tb_det_controller;
  logic clk = 0, rst_n = 0, fsl0_exists = 0, fsl1_full = 0;
  logic fsl0_read, fsl1_write, feed_en, clear, busy;
  logic [4:0] sel;
  int checks = 0, failures = 0;
  int reads, feeds, writes, clears, feeds_word, cycles;
  bit stalls;

  det_controller #(.NUM_SV(24), .CODE_LEN(1023), .FSL_W(32)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int run = 0; run < 3; run++) begin
      stalls = (run != 1);
      reads = 0; feeds = 0; writes = 0; clears = 0; feeds_word = 0; cycles = 0;
      while (writes < 24) begin
        fsl0_exists = stalls ? ($urandom_range(0, 2) != 0) : 1'b1;
        fsl1_full   = stalls ? ($urandom_range(0, 2) == 0) : 1'b0;
        #1;
        cycles++;
        if (clear) clears++;
        if (fsl0_read) begin
          check(!feed_en, "read while feeding");
          check(fsl0_exists, "read of empty FSL0");
          if (reads > 0) check(feeds_word == 32, "32 bits per word");
          reads++;
          feeds_word = 0;
        end
        if (feed_en) begin
          feeds++;
          feeds_word++;
          check(feeds_word <= 32, "too many feeds for a word");
        end
        if (fsl1_write) begin
          check(!fsl1_full, "write to full FSL1");
          check(feeds == 1023, "writes only after 1023 feeds");
          check(sel == 5'(writes), $sformatf("select %0d at write %0d", sel, writes));
          writes++;
        end
        @(negedge clk);
      end
      check(reads == 32, $sformatf("reads %0d", reads));
      check(feeds == 1023, $sformatf("feeds %0d", feeds));
      check(feeds_word == 31, "last word gives 31 bits");
      check(clears == 1, $sformatf("clears %0d", clears));
      if (!stalls) check(cycles == 1023 + 32 + 24 + 1, $sformatf("run length %0d", cycles));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
