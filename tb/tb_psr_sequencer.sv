// Testbench of psr_sequencer with the datapath replaced by delayed done pulses.
// Checks: no computation during the first N-1 samples, `filled` and the first
// computation at sample N, the order of the steps, the start strobes and the
// CORDIC mode of each step, wptr advancing once per sample, one result_en per
// computation, and the overrun flag for a sample that arrives too early.
module tb_psr_sequencer;
  import psr_pkg::*;
  localparam int N = 16;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // a falling edge, so the asynchronous reset acts
  logic adc_valid = 1'b0, dft_done = 1'b0, cordic_done = 1'b0, torque_done = 1'b0;
  seq_state_t state;
  logic ram_we, dft_start, cordic_start, torque_start, result_en, filled, overrun;
  logic [3:0] wptr;
  cordic_mode_t cordic_mode;
  int checks = 0, failures = 0;
  int n_results = 0, n_dft = 0, n_cordic = 0, n_torque = 0, n_we = 0;
  seq_state_t trace [$];

  psr_sequencer #(.N(N)) dut (.*);
  always #5 clk = ~clk;

  // datapath stand-in: done pulses a few cycles after each start
  always @(posedge clk) begin
    if (dft_start)    begin n_dft++;    fork begin repeat (5) @(posedge clk); #1 dft_done = 1'b1; @(posedge clk); #1 dft_done = 1'b0; end join_none end
    if (cordic_start) begin
      n_cordic++;
      checks++;
      if (cordic_mode != ((state == S_ROT) ? CORDIC_ROTATE : CORDIC_VECTOR)) begin
        failures++; $display("cordic mode %0d in state %0d", cordic_mode, state);
      end
      fork begin repeat (3) @(posedge clk); #1 cordic_done = 1'b1; @(posedge clk); #1 cordic_done = 1'b0; end join_none
    end
    if (torque_start) begin n_torque++; fork begin repeat (1) @(posedge clk); #1 torque_done = 1'b1; @(posedge clk); #1 torque_done = 1'b0; end join_none end
    if (result_en) n_results++;
    if (ram_we) n_we++;
    if (rst_n && (trace.size() == 0 || trace[$] != state)) trace.push_back(state);
  end

  task automatic sample();
    @(negedge clk); adc_valid = 1'b1;
    @(negedge clk); adc_valid = 1'b0;
  endtask

  initial begin
    seq_state_t exp_order [8];
    exp_order = '{S_WRITE, S_DFT_RAIL, S_DFT_REF, S_VEC_RAIL, S_VEC_REF, S_ROT, S_TORQUE, S_OUTPUT};
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < N - 1; i++) begin
      sample();
      repeat (60) @(posedge clk);
    end
    checks += 3;
    if (filled) begin failures++; $display("filled too early"); end
    if (n_dft != 0 || n_results != 0) begin failures++; $display("computed before the buffer was full"); end
    if (wptr != 4'(N - 1)) begin failures++; $display("wptr %0d", wptr); end
    for (int k = 0; k < 5; k++) begin
      trace.delete();
      sample();
      repeat (60) @(posedge clk);
      checks += 2;
      if (!filled) begin failures++; $display("not filled"); end
      if (trace.size() != 10 || trace[0] != S_IDLE || trace[9] != S_IDLE) begin
        failures++; $display("trace length %0d", trace.size());
      end else begin
        for (int s = 0; s < 8; s++) begin
          checks++;
          if (trace[s+1] != exp_order[s]) begin failures++; $display("step %0d is state %0d", s, trace[s+1]); end
        end
      end
    end
    checks += 5;
    if (n_results != 5) begin failures++; $display("%0d results", n_results); end
    if (n_dft != 10)    begin failures++; $display("%0d DFT starts", n_dft); end
    if (n_cordic != 15) begin failures++; $display("%0d CORDIC starts", n_cordic); end
    if (n_torque != 5)  begin failures++; $display("%0d torque starts", n_torque); end
    if (n_we != N + 4)  begin failures++; $display("%0d writes", n_we); end
    // overrun: a second sample while computing
    checks += 2;
    if (overrun) begin failures++; $display("overrun before any"); end
    sample();
    repeat (3) @(posedge clk);
    sample();
    repeat (60) @(posedge clk);
    if (!overrun) begin failures++; $display("overrun not flagged"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
