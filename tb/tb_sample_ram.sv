// Testbench of sample_ram: random writes against a reference array, reads with
// one cycle latency, simultaneous read and write of different addresses.
module tb_sample_ram;
  localparam int DEPTH = 64, W = 16, AW = 6;
  logic clk = 1'b0, we = 1'b0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [W-1:0]  wdata = '0, rdata;
  logic [W-1:0]  ref_mem [DEPTH];
  int checks = 0, failures = 0;

  sample_ram #(.DEPTH(DEPTH), .W(W)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      we = 1'b1; waddr = AW'(i); wdata = W'($urandom); ref_mem[i] = wdata;
    end
    for (int k = 0; k < 1000; k++) begin
      @(negedge clk);
      raddr = AW'($urandom);
      we    = $urandom_range(0, 1) == 1;
      waddr = AW'($urandom);
      if (waddr == raddr) waddr = waddr + 1'b1;
      wdata = W'($urandom);
      @(posedge clk);
      #1;
      checks++;
      if (rdata != ref_mem[raddr]) begin
        failures++;
        $display("addr %0d read %h expected %h", raddr, rdata, ref_mem[raddr]);
      end
      if (we) ref_mem[waddr] = wdata;
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
