// tb_shift_reg32: loads random words and checks they come out MSB first,
// one bit per shift, holding while shift is low.
module tb_shift_reg32;
  logic clk = 0, rst_n = 0, load = 0, shift = 0;
  logic [31:0] din;
  logic sout;
  int checks = 0, failures = 0;

  shift_reg32 #(.WIDTH(32)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] w;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 50; t++) begin
      w = $urandom;
      din = w; load = 1;
      @(negedge clk);
      load = 0;
      for (int b = 31; b >= 0; b--) begin
        checks++;
        if (sout !== w[b]) begin
          failures++;
          if (failures < 10) $display("FAIL word %0d bit %0d", t, b);
        end
        shift = ($urandom_range(0, 3) != 0);
        while (!shift) begin
          @(negedge clk);
          checks++;
          if (sout !== w[b]) failures++;
          shift = ($urandom_range(0, 3) != 0);
        end
        @(negedge clk);
        shift = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
