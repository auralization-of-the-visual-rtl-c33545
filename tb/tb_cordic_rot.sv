// tb_cordic_rot: streams 500 random vectors and phases (plus the four
// quadrant edges) through the rotator back to back, one per clock with
// random gaps, and compares each result with a real-number rotation:
// error at most 40 LSB of the 24-bit output (18 iterations leave an angle
// error near 2^-17 rad, about 30 LSB at these magnitudes), and exactly ITER+2 clocks of
// latency.
module tb_cordic_rot;
  localparam int W = 24, PW = 24, ITER = 18;
  logic clk = 0, rst = 1;
  always #5 clk = !clk;
  logic in_valid = 0, out_valid;
  logic signed [W-1:0] x = 0, y = 0, xo, yo;
  logic [PW-1:0] phase = 0;
  cordic_rot #(.W(W), .PW(PW), .ITER(ITER)) dut (.clk, .rst, .in_valid, .x, .y, .phase,
    .out_valid, .xo, .yo);

  int checks = 0, failures = 0;
  real ex [$], ey [$];
  longint t_in [$], cyc = 0;
  always_ff @(posedge clk) cyc <= cyc + 1;
  always_ff @(posedge clk) if (!rst && out_valid) begin
    real dx, dy;
    longint t0;
    dx = ex.pop_front(); dy = ey.pop_front(); t0 = t_in.pop_front();
    checks++;
    if ((xo - dx) > 40.0 || (dx - xo) > 40.0 || (yo - dy) > 40.0 || (dy - yo) > 40.0 || cyc - t0 != ITER + 2) begin
      failures++;
      if (failures < 6) $display("got %0d %0d exp %f %f latency %0d", xo, yo, dx, dy, cyc - t0);
    end
  end

  initial begin
    repeat (3) @(posedge clk); rst = 0;
    for (int i = 0; i < 504; i++) begin
      real a, fx, fy;
      @(negedge clk);
      if ($urandom_range(0, 4) == 0) begin in_valid = 0; @(negedge clk); end
      x = W'($signed($urandom_range(0, 2 * 3000000)) - 3000000);
      y = W'($signed($urandom_range(0, 2 * 3000000)) - 3000000);
      phase = (i < 4) ? PW'(i) << (PW - 2) : PW'($urandom);
      a = 2.0 * 3.14159265358979 * real'(phase) / real'(longint'(1) << PW);
      fx = real'(x) * $cos(a) - real'(y) * $sin(a);
      fy = real'(x) * $sin(a) + real'(y) * $cos(a);
      ex.push_back(fx); ey.push_back(fy); t_in.push_back(cyc);
      in_valid = 1;
    end
    @(negedge clk); in_valid = 0;
    repeat (ITER + 10) @(negedge clk);
    checks++;
    if (ex.size() != 0) begin failures++; $display("%0d results missing", ex.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
