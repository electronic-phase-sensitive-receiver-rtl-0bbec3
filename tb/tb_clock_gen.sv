// Testbench of clock_gen: checks the period of sample_tick and bit_tick and that
// each is a single-cycle pulse.
module tb_clock_gen;
  localparam int CLK_HZ = 12_000, FS_HZ = 1_000, SCLK_DIV = 3;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // a falling edge, so the asynchronous reset acts
  logic sample_tick, bit_tick;
  int checks = 0, failures = 0;
  int cyc = 0, last_s = -1, last_b = -1, n_s = 0, n_b = 0;

  clock_gen #(.CLK_HZ(CLK_HZ), .FS_HZ(FS_HZ), .SCLK_DIV(SCLK_DIV)) dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && sample_tick) begin
      if (last_s >= 0) begin
        checks++;
        if (cyc - last_s != CLK_HZ / FS_HZ) begin
          failures++;
          $display("sample_tick period %0d, expected %0d", cyc - last_s, CLK_HZ / FS_HZ);
        end
      end
      last_s = cyc;
      n_s++;
    end
    if (rst_n && bit_tick) begin
      if (last_b >= 0) begin
        checks++;
        if (cyc - last_b != SCLK_DIV) begin
          failures++;
          $display("bit_tick period %0d, expected %0d", cyc - last_b, SCLK_DIV);
        end
      end
      last_b = cyc;
      n_b++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (20 * CLK_HZ / FS_HZ) @(posedge clk);
    checks++;
    if (n_s < 19 || n_b < 19 * CLK_HZ / FS_HZ / SCLK_DIV) begin
      failures++;
      $display("too few ticks: %0d sample, %0d bit", n_s, n_b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
