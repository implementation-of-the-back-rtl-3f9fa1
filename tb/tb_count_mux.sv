// tb_count_mux: random 10-bit inputs, every select value 0..31; a select
// beyond the 24 satellites must give zero.
module tb_count_mux;
  logic [9:0] din [24];
  logic [4:0] sel;
  logic [9:0] dout;
  int checks = 0, failures = 0;

  count_mux #(.NUM_SV(24), .CNT_W(10), .SEL_W(5)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 20; t++) begin
      for (int i = 0; i < 24; i++) din[i] = 10'($urandom);
      for (int s = 0; s < 32; s++) begin
        sel = 5'(s);
        #1;
        checks++;
        if (dout !== ((s < 24) ? din[s] : 10'd0)) begin
          failures++;
          if (failures < 10) $display("FAIL sel %0d", s);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
