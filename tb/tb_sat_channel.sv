// tb_sat_channel: one satellite correlator (satellite 17).  Feeds noisy
// copies of satellite 17's code, random data and another satellite's code
// with random enable gaps, and checks the chip sequence and the final match
// count against the reference code; the count must be final one cycle after
// the last chip.
module tb_sat_channel;
  import gps_ref_pkg::*;

  logic clk = 0, rst_n = 0, clear = 0, enable = 0, data_bit = 0, chip;
  logic [9:0] count;
  int checks = 0, failures = 0;
  code_t c17, c5;

  sat_channel #(.SV(17), .CNT_W(10)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int expect_cnt;
    c17 = ca_code(17);
    c5  = ca_code(5);
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int run = 0; run < 4; run++) begin
      clear = 1;
      @(negedge clk);
      clear = 0;
      expect_cnt = 0;
      for (int n = 0; n < CODE_LEN; n++) begin
        while ($urandom_range(0, 4) == 0) begin
          enable = 0;
          @(negedge clk);
        end
        enable = 1;
        case (run)
          0: data_bit = c17[n];
          1: data_bit = c17[n] ^ ($urandom_range(0, 9) == 0);
          2: data_bit = $urandom_range(0, 1);
          default: data_bit = c5[n];
        endcase
        check(chip == c17[n], $sformatf("chip %0d", n));
        if (data_bit == c17[n]) expect_cnt++;
        @(negedge clk);
      end
      enable = 0;
      check(count == 10'(expect_cnt), $sformatf("run %0d count %0d vs %0d", run, count, expect_cnt));
      if (run == 0) check(count == 10'd1023, "full match count");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
