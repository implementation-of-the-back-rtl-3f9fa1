// tb_sv_delay_gen: for every satellite 1..24 and every G2 register state
// of a full period, the selected-stage XOR must equal G2 delayed by the
// satellite's published delay; numbers outside 1..24 must give 0.
module tb_sv_delay_gen;
  import gps_ref_pkg::*;

  logic [9:0] g2_state;
  logic [4:0] sv_id;
  logic       g2i;
  int checks = 0, failures = 0;
  code_t g2r;

  sv_delay_gen dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    g2r = mls(1'b1);
    for (int n = 0; n < CODE_LEN; n++) begin
      // stage k (bit k-1) holds G2 chip n + 10 - k
      for (int k = 1; k <= 10; k++) g2_state[k-1] = g2r[(n + 10 - k) % CODE_LEN];
      for (int sv = 0; sv <= 26; sv++) begin
        sv_id = 5'(sv);
        #1;
        checks++;
        if (sv >= 1 && sv <= 24) begin
          if (g2i !== g2r[(n - g2_delay(sv) + CODE_LEN) % CODE_LEN]) begin
            failures++;
            if (failures < 10) $display("FAIL sv %0d chip %0d", sv, n);
          end
        end else if (g2i !== 1'b0) begin
          failures++;
          if (failures < 10) $display("FAIL sv %0d not zero", sv);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
