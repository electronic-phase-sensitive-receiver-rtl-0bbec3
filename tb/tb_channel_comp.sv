// Testbench of channel_comp: equal results pass; each compared item, changed in
// channel B alone, raises `mismatch` one cycle later and sets the sticky
// `fault`; numeric differences within the tolerance pass; phases are compared
// across the +-pi wrap.
module tb_channel_comp;
  import psr_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // a falling edge, so the asynchronous reset acts
  chan_result_t res_a, res_b;
  logic valid_a, valid_b, mismatch, fault;
  logic [AMP_W-1:0] tol_amp;
  angle_t tol_phase;
  torque_t tol_torque;
  int checks = 0, failures = 0;

  channel_comp dut (.*);
  always #5 clk = ~clk;

  task automatic apply(input bit exp_mismatch, input string what);
    @(posedge clk); #1;
    checks++;
    if (mismatch != exp_mismatch) begin
      failures++; $display("%s: mismatch %0b expected %0b", what, mismatch, exp_mismatch);
    end
    if (exp_mismatch) begin
      checks++;
      if (!fault) begin failures++; $display("%s: fault not set", what); end
      rst_n = 1'b0; #1 rst_n = 1'b1;
    end
    res_b = res_a; valid_b = valid_a;
  endtask

  initial begin
    tol_amp = 16'd4; tol_phase = 16'd10; tol_torque = 48'd1000;
    res_a = '0;
    res_a.amp_rail = 16'd5000; res_a.amp_ref = 16'd6000;
    res_a.ph_rail = 16'h7ffc; res_a.ph_ref = 16'h1234;
    res_a.torque = 48'sd123456789; res_a.thr_out = 1'b1; res_a.relay_out = 1'b1;
    res_a.state = S_OUTPUT;
    valid_a = 1'b1;
    res_b = res_a; valid_b = valid_a;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    apply(1'b0, "equal");
    checks++; if (fault) begin failures++; $display("fault without cause"); end
    res_b.amp_rail = res_a.amp_rail + 16'd4;   apply(1'b0, "amp_rail within tolerance");
    res_b.amp_rail = res_a.amp_rail + 16'd5;   apply(1'b1, "amp_rail");
    res_b.amp_ref  = res_a.amp_ref - 16'd9;    apply(1'b1, "amp_ref");
    res_b.ph_rail  = 16'h8004;                 apply(1'b0, "ph_rail across the wrap");
    res_b.ph_rail  = 16'h8010;                 apply(1'b1, "ph_rail");
    res_b.ph_ref   = res_a.ph_ref + 16'd11;    apply(1'b1, "ph_ref");
    res_b.torque   = res_a.torque - 48'sd1000; apply(1'b0, "torque within tolerance");
    res_b.torque   = res_a.torque + 48'sd1001; apply(1'b1, "torque");
    res_b.thr_out  = 1'b0;                     apply(1'b1, "thr_out");
    res_b.relay_out = 1'b0;                    apply(1'b1, "relay_out");
    res_b.true_cnt = 16'd1;                    apply(1'b1, "true_cnt");
    res_b.false_cnt = 16'd2;                   apply(1'b1, "false_cnt");
    res_b.state    = S_IDLE;                   apply(1'b1, "state");
    valid_b        = 1'b0;                     apply(1'b1, "valid");
    // without a common valid the numeric items are not compared
    valid_a = 1'b0; valid_b = 1'b0; res_b.torque = 48'sd0;
    apply(1'b0, "numeric items between results");
    res_b.torque = 48'sd0; res_b.relay_out = 1'b0; apply(1'b1, "relay_out between results");
    // fault stays set after the difference has gone
    res_b.state = S_IDLE;
    @(posedge clk); #1;
    res_b = res_a;
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (!fault || mismatch) begin failures++; $display("fault not sticky"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
