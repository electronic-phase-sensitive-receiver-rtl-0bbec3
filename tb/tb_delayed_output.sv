// Testbench of delayed_output. Directed: from reset the output rises after
// exactly pull_cnt consecutive 1 decisions and, from a steady 1, falls after
// exactly drop_cnt consecutive 0 decisions; isolated glitches shorter than
// that do not switch it. Random: comparison with a reference model of the two
// saturating counters.
module tb_delayed_output;
  logic clk = 1'b0, rst_n = 1'b1, en = 1'b0, din = 1'b0, out;
  initial #1 rst_n = 1'b0;   // a falling edge, so the asynchronous reset acts
  logic [15:0] pull_cnt, drop_cnt, true_cnt, false_cnt;
  int checks = 0, failures = 0;
  int rt, rf;
  logic rout;

  delayed_output dut (.*);
  always #5 clk = ~clk;

  task automatic step(input logic d);
    @(negedge clk); en = 1'b1; din = d;
    @(posedge clk); #1 en = 1'b0;
  endtask

  task automatic model(input logic d);
    if (d) begin
      rt = (rt < pull_cnt) ? rt + 1 : int'(pull_cnt);
      rf = (rf > 0) ? rf - 1 : 0;
      if (rf > drop_cnt) rf = drop_cnt;
    end else begin
      rf = (rf < drop_cnt) ? rf + 1 : int'(drop_cnt);
      rt = (rt > 0) ? rt - 1 : 0;
      if (rt > pull_cnt) rt = pull_cnt;
    end
    if (rt == pull_cnt && rf != drop_cnt) rout = 1'b1;
    else if (rf == drop_cnt && rt != pull_cnt) rout = 1'b0;
  endtask

  initial begin
    pull_cnt = 16'd7;
    drop_cnt = 16'd4;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // pull: out rises on the 7th consecutive 1
    for (int i = 1; i <= 7; i++) begin
      step(1'b1);
      checks++;
      if (out != (i == 7)) begin failures++; $display("pull step %0d: out %0b", i, out); end
    end
    // short dropouts of 3 do not drop the output
    repeat (3) begin
      repeat (3) step(1'b0);
      checks++;
      if (out != 1'b1) begin failures++; $display("dropped on a short dropout"); end
      repeat (7) step(1'b1);
    end
    // drop: out falls on the 4th consecutive 0
    for (int i = 1; i <= 4; i++) begin
      step(1'b0);
      checks++;
      if (out != (i != 4)) begin failures++; $display("drop step %0d: out %0b", i, out); end
    end
    // random against the model
    rst_n = 1'b0; @(posedge clk); #1 rst_n = 1'b1;
    rt = 0; rf = 0; rout = 1'b0;
    for (int t = 0; t < 3000; t++) begin
      if (t % 500 == 0) begin
        pull_cnt = 16'($urandom_range(1, 12));
        drop_cnt = 16'($urandom_range(1, 12));
      end
      din = ($urandom % 8) < ((t / 250) % 2 ? 6 : 2);
      step(din);
      model(din);
      checks++;
      if (out != rout || true_cnt != 16'(rt) || false_cnt != 16'(rf)) begin
        failures++;
        $display("t=%0d out %0b/%0b true %0d/%0d false %0d/%0d", t, out, rout, true_cnt, rt, false_cnt, rf);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
