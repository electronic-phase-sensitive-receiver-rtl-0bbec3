// Testbench of dft1: random samples and coefficients in testbench memories with
// one cycle read latency; re and im must equal the exact sums
// sum x*c and -sum x*s, and done must come N+2 cycles after start.
module tb_dft1;
  localparam int N = 64, AW = 6, ACC_W = 16 + 16 + 6;
  logic clk = 1'b0, rst_n = 1'b1, start = 1'b0;
  initial #1 rst_n = 1'b0;   // a falling edge, so the asynchronous reset acts
  logic [AW-1:0] idx;
  logic busy, done;
  logic signed [15:0] x, c, s;
  logic signed [ACC_W-1:0] re, im;
  logic signed [15:0] xm [N], cm [N], sm [N];
  int checks = 0, failures = 0;

  dft1 #(.N(N)) dut (.*);
  always #5 clk = ~clk;

  always_ff @(posedge clk) begin
    x <= xm[idx];
    c <= cm[idx];
    s <= sm[idx];
  end

  initial begin
    longint ere, eim;
    int t0, lat;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int trial = 0; trial < 20; trial++) begin
      ere = 0; eim = 0;
      for (int i = 0; i < N; i++) begin
        if (trial == 0) begin
          xm[i] = -16'sd32768; cm[i] = -16'sd32768; sm[i] = 16'sd32767;
        end else begin
          xm[i] = $urandom; cm[i] = $urandom; sm[i] = $urandom;
        end
        ere += longint'(xm[i]) * longint'(cm[i]);
        eim -= longint'(xm[i]) * longint'(sm[i]);
      end
      @(negedge clk); start = 1'b1;
      @(posedge clk); t0 = $time; #1 start = 1'b0;
      lat = 0;
      while (!done) begin @(posedge clk); #1; lat++; end
      checks += 3;
      if (re != ACC_W'(ere)) begin failures++; $display("re %0d expected %0d", re, ere); end
      if (im != ACC_W'(eim)) begin failures++; $display("im %0d expected %0d", im, eim); end
      if (lat != N + 1) begin failures++; $display("latency %0d cycles after start edge", lat); end
      repeat ($urandom_range(0, 3)) @(posedge clk);
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
