// tb_match_counter: random enable/match/clear traffic against a software
// count, including saturation at the maximum of a 10-bit counter.
module tb_match_counter;
  logic clk = 0, rst_n = 0, clear = 0, enable = 0, match = 0;
  logic [9:0] count;
  int checks = 0, failures = 0, model = 0;

  match_counter #(.CNT_W(10)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      clear  = (i == 1500) || ((i < 1500 || i > 2700) && ($urandom_range(0, 600) == 0));
      enable = (i > 1500 && i < 2700) ? 1'b1 : $urandom_range(0, 1);
      match  = (i > 1500 && i < 2700) ? 1'b1 : $urandom_range(0, 1);
      @(posedge clk);
      if (clear) model = 0;
      else if (enable && match && model < 1023) model++;
      @(negedge clk);
      checks++;
      if (count != 10'(model)) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d: %0d vs %0d", i, count, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
