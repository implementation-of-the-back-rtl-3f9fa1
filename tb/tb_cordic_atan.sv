// tb_cordic_atan: random vectors in all four quadrants, plus the axes,
// streamed one per cycle with random gaps.  Each result must arrive
// exactly 17 cycles after its input (ITER = 14) and be within 0.002 rad of
// the real atan2(Y, X).  Also checks that sclr drops results in flight.
module tb_cordic_atan;
  logic clk = 0, ce = 1, sclr = 0, aclr = 0, nd = 0;
  logic signed [15:0] x_in = 0, y_in = 0, p_out;
  logic rdy, rfd;
  int checks = 0, failures = 0;
  real exp_q [$];
  int  due_q [$];
  int  cyc = 0, nres = 0;

  cordic_atan #(.IN_W(16), .OUT_W(16), .ITER(14)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // result checker
  always @(negedge clk) if (rdy) begin
    real e, got;
    checks++;
    if (exp_q.size() == 0) begin
      failures++;
      $display("FAIL: unexpected rdy");
    end else begin
      e = exp_q.pop_front();
      got = real'(p_out) / 8192.0;
      if (due_q.pop_front() != cyc) begin
        failures++;
        if (failures < 10) $display("FAIL: latency at cycle %0d", cyc);
      end
      if ((got - e) > 0.002 || (e - got) > 0.002) begin
        failures++;
        if (failures < 10) $display("FAIL: angle %f vs %f", got, e);
      end
      nres++;
    end
  end

  task automatic send(input int x, input int y);
    x_in = 16'(x);
    y_in = 16'(y);
    nd = 1;
    exp_q.push_back($atan2(real'(y), real'(x)));
    due_q.push_back(cyc + 17);
    @(negedge clk);
    nd = 0;
  endtask

  initial begin
    int xs [8] = '{16383, 0, -16383, 0, 16383, -16383, -16383, 16383};
    int ys [8] = '{0, 16383, 1, -16383, 16383, 16383, -16383, -16383};
    @(negedge clk);
    checks++;
    if (!rfd) failures++;
    for (int i = 0; i < 8; i++) send(xs[i], ys[i]);
    for (int i = 0; i < 400; i++) begin
      int x, y;
      x = $urandom_range(0, 32766) - 16383;
      y = $urandom_range(0, 32766) - 16383;
      if (x == 0 && y == 0) x = 1;
      send(x, y);
      if ($urandom_range(0, 3) == 0) @(negedge clk);
    end
    repeat (20) @(negedge clk);
    checks++;
    if (nres != 408) begin
      failures++;
      $display("FAIL: %0d results", nres);
    end
    // sclr clears results in flight
    x_in = 100; y_in = 100; nd = 1;
    @(negedge clk);
    nd = 0;
    repeat (3) @(negedge clk);
    sclr = 1;
    @(negedge clk);
    sclr = 0;
    repeat (20) @(negedge clk);
    checks++;
    if (nres != 408) begin
      failures++;
      $display("FAIL: result survived sclr");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
