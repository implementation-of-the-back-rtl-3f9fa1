// tb_ca_code_gen: checks the G1 serial output and G2 register of the C/A
// code generator against independently generated G1/G2 sequences, over two
// full periods, the hold behaviour with enable low, the restart on init,
// and the epoch flag at chip 0.
module tb_ca_code_gen;
  import gps_ref_pkg::*;

  logic clk = 0, rst_n = 0, enable = 0, init = 0;
  logic g1_out, epoch;
  logic [9:0] g2_state;
  int checks = 0, failures = 0;
  code_t g1r, g2r;

  ca_code_gen dut (.*);

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
    g1r = mls(1'b0);
    g2r = mls(1'b1);
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < 2 * CODE_LEN; n++) begin
      check(g1_out == g1r[n % CODE_LEN], $sformatf("G1 chip %0d", n));
      check(g2_state[9] == g2r[n % CODE_LEN], $sformatf("G2 chip %0d", n));
      check(epoch == (n % CODE_LEN == 0), $sformatf("epoch at %0d", n));
      // stage k holds the G2 output k-10 chips ahead
      check(g2_state[0] == g2r[(n + 9) % CODE_LEN], "G2 stage 1");
      enable = ($urandom_range(0, 3) != 0);
      if (!enable) begin
        @(negedge clk);
        check(g1_out == g1r[n % CODE_LEN], "hold with enable low");
        enable = 1;
      end
      @(negedge clk);
    end
    enable = 1;
    repeat (37) @(negedge clk);
    init = 1;
    @(negedge clk);
    init = 0;
    enable = 0;
    check(g1_out == g1r[0] && g2_state == 10'h3FF && epoch, "restart on init");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
