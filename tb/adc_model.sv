// adc_model: behavioural model of a conversion-on-demand ADC (testbench only).
//
// A conv_start pulse starts a conversion; LAT clocks later valid is high for
// one clock with the next value of a deterministic test sequence: a constant
// level plus a small repeating ripple, value(k) = LEVEL + ((k * 37) % 101) - 50
// for the k-th conversion. No timing of a particular converter is modelled.
module adc_model #(
  parameter int W     = 18,
  parameter int LAT   = 10,
  parameter int LEVEL = 1000
) (
  input  logic                clk,
  input  logic                conv_start,
  output logic                valid,
  output logic signed [W-1:0] data
);
  int k = 0;
  initial begin valid = 0; data = '0; end
  always @(posedge clk) begin
    if (conv_start) begin
      fork begin
        int v;
        v = LEVEL + ((k * 37) % 101) - 50;
        k++;
        repeat (LAT - 1) @(posedge clk);
        valid <= 1'b1;
        data  <= W'(v);
        @(posedge clk);
        valid <= 1'b0;
      end join_none
    end
  end
endmodule
