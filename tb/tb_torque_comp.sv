// Testbench of torque_comp: random and extreme operands, exact product, result
// two cycles after start.
module tb_torque_comp;
  logic clk = 1'b0, rst_n = 1'b1, start = 1'b0;
  initial #1 rst_n = 1'b0;   // a falling edge, so the asynchronous reset acts
  logic [15:0] amp1, amp2;
  logic signed [15:0] sin_phi;
  logic signed [47:0] m;
  logic done;
  int checks = 0, failures = 0;

  torque_comp dut (.*);
  always #5 clk = ~clk;

  initial begin
    longint e;
    int lat;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 300; t++) begin
      amp1 = $urandom; amp2 = $urandom; sin_phi = $urandom;
      if (t == 0) begin amp1 = 16'hffff; amp2 = 16'hffff; sin_phi = -16'sd32768; end
      if (t == 1) begin amp1 = 16'hffff; amp2 = 16'hffff; sin_phi = 16'sd32767; end
      e = longint'({16'd0, amp1}) * longint'({16'd0, amp2}) * longint'(sin_phi);
      @(negedge clk); start = 1'b1;
      @(posedge clk); #1 start = 1'b0;
      lat = 0;
      while (!done) begin @(posedge clk); #1; lat++; end
      checks += 2;
      if (m != 48'(e)) begin failures++; $display("%0d*%0d*%0d = %0d, got %0d", amp1, amp2, sin_phi, e, m); end
      if (lat != 1) begin failures++; $display("latency %0d", lat); end
    end
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
