// Testbench of cordic. Vectoring: random vectors in all four quadrants; x must
// be K*|v| and z the angle atan2(y, x) (binary angle). Rotation: x = X1, y = 0
// and random z in [-pi, pi); x, y must be K*X1*cos z and K*X1*sin z. Tolerances
// are a few LSB of the 24-bit datapath and 4 units of the 16-bit angle. The
// result must come ITER+1 cycles after start.
module tb_cordic;
  import psr_pkg::*;
  localparam real PI = 3.14159265358979323846;
  localparam real K  = 1.6467602581;
  logic clk = 1'b0, rst_n = 1'b1, start = 1'b0;
  initial #1 rst_n = 1'b0;   // a falling edge, so the asynchronous reset acts
  cordic_mode_t mode;
  cdata_t xin, yin, xout, yout;
  angle_t zin, zout;
  logic busy, done;
  function automatic real fabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  int checks = 0, failures = 0;

  cordic dut (.*);
  always #5 clk = ~clk;

  task automatic run(output int lat);
    @(negedge clk); start = 1'b1;
    @(posedge clk); #1 start = 1'b0;
    lat = 0;
    while (!done) begin @(posedge clk); #1; lat++; end
  endtask

  initial begin
    int lat, n_left;
    real ex, ey, ez, da, r, a;
    n_left = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 400; t++) begin
      mode = CORDIC_VECTOR;
      r = 1000.0 + ($urandom % 2000000);
      a = 2.0 * PI * ($urandom % 65536) / 65536.0 - PI;
      xin = cdata_t'($rtoi(r * $cos(a)));
      yin = cdata_t'($rtoi(r * $sin(a)));
      zin = '0;
      if (xin < 0) n_left++;
      run(lat);
      ex = K * $sqrt(real'(xin) * real'(xin) + real'(yin) * real'(yin));
      ez = $atan2(real'(yin), real'(xin)) * 65536.0 / (2.0 * PI);
      da = real'($signed(zout)) - ez;
      if (da > 32768.0) da -= 65536.0;
      if (da < -32768.0) da += 65536.0;
      checks += 3;
      if (fabs(real'(xout) - ex) > 8.0 + ex * 1e-4) begin
        failures++; $display("vector (%0d,%0d): x %0d expected %f", xin, yin, xout, ex);
      end
      if (fabs(da) > 4.0 + 2000.0 / r) begin
        failures++; $display("vector (%0d,%0d): z %0d expected %f", xin, yin, $signed(zout), ez);
      end
      if (lat != ITER) begin failures++; $display("latency %0d", lat); end
    end
    checks++;
    if (n_left < 50) begin failures++; $display("too few left half plane vectors"); end
    for (int t = 0; t < 400; t++) begin
      mode = CORDIC_ROTATE;
      xin  = cdata_t'(1 << 20);
      yin  = '0;
      zin  = angle_t'($urandom);
      run(lat);
      a  = 2.0 * PI * real'($signed(zin)) / 65536.0;
      ex = K * 1048576.0 * $cos(a);
      ey = K * 1048576.0 * $sin(a);
      checks += 2;
      if (fabs(real'(xout) - ex) > 120.0) begin
        failures++; $display("rotate z=%0d: x %0d expected %f", $signed(zin), xout, ex);
      end
      if (fabs(real'(yout) - ey) > 120.0) begin
        failures++; $display("rotate z=%0d: y %0d expected %f", $signed(zin), yout, ey);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
