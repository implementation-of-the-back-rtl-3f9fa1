// tb_sincos_lut: every THETA against real sin/cos scaled to 32767, within
// one LSB, with the one-cycle latency of the output register.
module tb_sincos_lut;
  logic clk = 0;
  logic [7:0] theta = 0;
  logic signed [15:0] sin_out, cos_out;
  int checks = 0, failures = 0;

  sincos_lut #(.THETA_W(8), .OUT_W(16)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real x, es, ec;
    for (int k = 0; k < 256; k++) begin
      @(negedge clk);
      theta = 8'(k);
      @(negedge clk);
      x  = 2.0 * 3.14159265358979 * real'(k) / 256.0;
      es = $sin(x) * 32767.0;
      ec = $cos(x) * 32767.0;
      checks += 2;
      if ((real'(sin_out) - es) > 1.0 || (es - real'(sin_out)) > 1.0) begin
        failures++;
        if (failures < 10) $display("FAIL sin %0d: %0d vs %f", k, sin_out, es);
      end
      if ((real'(cos_out) - ec) > 1.0 || (ec - real'(cos_out)) > 1.0) begin
        failures++;
        if (failures < 10) $display("FAIL cos %0d: %0d vs %f", k, cos_out, ec);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
