// Behavioural model of a 16-bit serial successive-approximation A/D converter
// (testbench only). It takes `value` at the falling edge of the active-low chip
// select `scs`, puts the MSB on `sad` at once and the next bit after every
// falling edge of `sclk` while scs is low. The conversion itself is not modelled.
module adc_model (
  input  logic               sclk,
  input  logic               scs,
  input  logic signed [15:0] value,
  output logic               sad
);
  logic [15:0] sh;
  initial begin
    sh  = '0;
    sad = 1'b0;
  end
  always @(negedge scs) begin
    sh  = value;
    sad = sh[15];
  end
  always @(negedge sclk) begin
    if (!scs) begin
      sh  = sh << 1;
      sad = sh[15];
    end
  end
endmodule
