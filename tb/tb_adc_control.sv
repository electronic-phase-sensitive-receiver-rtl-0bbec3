// Testbench of adc_control with two serial converter models: random sample
// pairs must come out unchanged, once per sample_tick, and the acquisition time
// (scs low to valid) must match the protocol.
module tb_adc_control;
  localparam int SCLK_DIV = 4, CONV_TICKS = 5, PERIOD = 400;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // a falling edge, so the asynchronous reset acts
  logic sample_tick, bit_tick, sclk, scs, sad1, sad2, valid, overrun;
  logic signed [15:0] sample1, sample2, v1, v2, exp1, exp2;
  int checks = 0, failures = 0, cyc = 0, t_scs = 0, n_valid = 0;

  clock_gen #(.CLK_HZ(PERIOD * 100), .FS_HZ(100), .SCLK_DIV(SCLK_DIV)) u_clk (
    .clk, .rst_n, .sample_tick, .bit_tick);
  adc_control #(.CONV_TICKS(CONV_TICKS)) dut (.*);
  adc_model m1 (.sclk, .scs, .value(v1), .sad(sad1));
  adc_model m2 (.sclk, .scs, .value(v2), .sad(sad2));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    v1 = 16'sh8001;
    v2 = 16'sh7ffe;
  end
  always @(negedge scs) begin
    exp1  = v1;
    exp2  = v2;
    t_scs = cyc;
  end
  always @(posedge scs) begin
    v1 = $urandom;
    v2 = $urandom;
  end

  always @(posedge clk) begin
    if (valid) begin
      n_valid++;
      checks += 3;
      if (sample1 != exp1) begin failures++; $display("sample1 %h expected %h", sample1, exp1); end
      if (sample2 != exp2) begin failures++; $display("sample2 %h expected %h", sample2, exp2); end
      // scs falls one cycle after sample_tick; the conversion wait takes
      // CONV_TICKS+1 bit_ticks, the 16 bits 32 bit_ticks.
      if (cyc - t_scs > (CONV_TICKS + 1 + 32 + 1) * SCLK_DIV + 2 ||
          cyc - t_scs < (CONV_TICKS + 32) * SCLK_DIV) begin
        failures++;
        $display("acquisition took %0d cycles", cyc - t_scs);
      end
    end
    if (rst_n && overrun) begin failures++; $display("unexpected overrun"); end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (40 * PERIOD) @(posedge clk);
    checks++;
    if (n_valid < 38) begin failures++; $display("only %0d samples", n_valid); end
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
