// Testbench of coef_rom: every entry against a Kaiser window (beta = 2)
// evaluated here from the closed form of I0 via numerical integration,
// I0(x) = (1/pi) * integral_0^pi exp(x*cos t) dt, to within 2 LSB.
module tb_coef_rom;
  localparam int N = 256, BIN = 15, COEF_W = 16;
  localparam real PI = 3.14159265358979323846;
  logic clk = 1'b0;
  logic [7:0] addr = '0;
  logic signed [COEF_W-1:0] cos_q, sin_q;
  function automatic real fabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  int checks = 0, failures = 0;

  coef_rom #(.N(N), .BIN(BIN), .COEF_W(COEF_W)) dut (.*);
  always #5 clk = ~clk;

  function automatic real i0_int(input real x);
    real s;
    s = 0.0;
    for (int k = 0; k < 2000; k++) s += $exp(x * $cos(PI * (k + 0.5) / 2000.0));
    return s / 2000.0;
  endfunction

  initial begin
    real w, r, ec, es, i0b;
    i0b = i0_int(2.0);
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      addr = 8'(i);
      @(posedge clk);
      #1;
      r  = 2.0 * i / (N - 1) - 1.0;
      w  = i0_int(2.0 * $sqrt(1.0 - r * r)) / i0b;
      ec = 32767.0 * w * $cos(2.0 * PI * BIN * i / N);
      es = 32767.0 * w * $sin(2.0 * PI * BIN * i / N);
      checks += 2;
      if (fabs(real'(cos_q) - ec) > 2.0) begin
        failures++; $display("cos[%0d] = %0d expected %f", i, cos_q, ec);
      end
      if (fabs(real'(sin_q) - es) > 2.0) begin
        failures++; $display("sin[%0d] = %0d expected %f", i, sin_q, es);
      end
    end
    // window shape: ends at 1/I0(2), centre near 1
    checks++;
    if (!(real'(dut.COS_TAB[0]) > 32767.0 / 2.2796 - 2.0 && real'(dut.COS_TAB[0]) < 32767.0 / 2.2796 + 2.0)) begin
      failures++; $display("window end %0d", dut.COS_TAB[0]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
