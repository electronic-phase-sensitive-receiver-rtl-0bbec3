// Sample buffer (RAM1 holds the rail signal, RAM2 the reference signal).
//
// A simple dual-port RAM of DEPTH words: one write port, one read port with a
// registered output (one cycle read latency), as an FPGA block RAM provides. The
// sequencer uses it as a circular buffer: new samples overwrite the oldest, and
// the DFT reads the DEPTH most recent samples oldest first. Contents are not
// reset; the sequencer does not compute until the buffer has been filled once.
module sample_ram #(
  parameter int DEPTH = 1024,
  parameter int W     = psr_pkg::SAMPLE_W
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [W-1:0]             wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [W-1:0]             rdata
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
