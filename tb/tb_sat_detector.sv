// tb_sat_detector: the detector core end to end through its FSL ports.
// Each run packs 1023 samples (a satellite's code, with some chips flipped)
// MSB first into 32 words, offers them on FSL0 with random gaps, reads the
// 24 counts from FSL1 with random back-pressure, and checks every count
// against the reference correlation and that the largest count names the
// satellite that sent the samples.  There is one run per satellite as
// sender, satellite 17 first.
module tb_sat_detector;
  import gps_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [31:0] fsl0_data, fsl1_data;
  logic fsl0_exists = 0, fsl0_read, fsl1_write, fsl1_full = 0, busy;
  int checks = 0, failures = 0;

  sat_detector #(.NUM_SV(24), .CODE_LEN(1023), .FSL_W(32), .CNT_W(10)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    repeat (150000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit          samples [1024];
  logic [31:0] words [32];
  int          expect_cnt [24];
  int          wi, got, best, best_sv;

  initial begin
    int senders [24];
    code_t c, cs;
    for (int i = 0; i < 24; i++) senders[i] = (i == 0) ? 17 : ((i <= 16) ? i : i + 1);
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int run = 0; run < 24; run++) begin
      c = ca_code(senders[run]);
      for (int n = 0; n < 1023; n++) samples[n] = c[n] ^ ($urandom_range(0, 6) == 0);
      samples[1023] = $urandom_range(0, 1);
      for (int w = 0; w < 32; w++)
        for (int b = 0; b < 32; b++) words[w][31-b] = samples[32*w + b];
      for (int s = 1; s <= 24; s++) begin
        cs = ca_code(s);
        expect_cnt[s-1] = 0;
        for (int n = 0; n < 1023; n++) if (cs[n] == samples[n]) expect_cnt[s-1]++;
      end
      wi = 0; got = 0; best = -1; best_sv = 0;
      while (got < 24) begin
        fsl0_exists = (wi < 32) && ($urandom_range(0, 3) != 0);
        fsl0_data   = (wi < 32) ? words[wi] : 32'h0;
        fsl1_full   = ($urandom_range(0, 3) == 0);
        #1;
        if (fsl0_read) wi++;
        if (fsl1_write) begin
          check(fsl1_data[31:10] == 0, "upper FSL1 bits zero");
          check(int'(fsl1_data[9:0]) == expect_cnt[got],
                $sformatf("run %0d sv %0d count %0d vs %0d", run, got + 1, fsl1_data[9:0], expect_cnt[got]));
          if (int'(fsl1_data[9:0]) > best) begin
            best = int'(fsl1_data[9:0]);
            best_sv = got + 1;
          end
          got++;
        end
        @(negedge clk);
      end
      check(wi == 32, "32 words consumed");
      check(best_sv == senders[run], $sformatf("detected %0d, sent %0d", best_sv, senders[run]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
