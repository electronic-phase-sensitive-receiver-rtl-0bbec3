// Testbench of threshold_hyst: a torque that sweeps up and down across both
// thresholds; the output must switch only above thr_high and below thr_low and
// hold in between, and never change without `en`.
module tb_threshold_hyst;
  logic clk = 1'b0, rst_n = 1'b1, en = 1'b0, out;
  initial #1 rst_n = 1'b0;   // a falling edge, so the asynchronous reset acts
  logic signed [47:0] torque, thr_high, thr_low;
  int checks = 0, failures = 0;
  logic expect_out;

  threshold_hyst dut (.*);
  always #5 clk = ~clk;

  initial begin
    int holds;
    holds = 0;
    thr_high = 48'sd1000;
    thr_low  = -48'sd200;
    torque   = '0;
    expect_out = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      en     = ($urandom % 4) != 0;
      torque = 48'($signed($urandom_range(0, 3000)) - 1500);
      if (en && torque > thr_high) expect_out = 1'b1;
      else if (en && torque < thr_low) expect_out = 1'b0;
      else if (en) holds++;
      @(posedge clk); #1;
      checks++;
      if (out != expect_out) begin
        failures++; $display("torque %0d en %0b: out %0b expected %0b", torque, en, out, expect_out);
      end
    end
    checks++;
    if (holds < 100) begin failures++; $display("hysteresis band hit only %0d times", holds); end
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
