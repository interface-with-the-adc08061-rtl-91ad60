// wattfast: the fast wattmeter, meant for an ADC that converts faster.
//
// watts2_ctrl and booth_fast_datapath merge the Booth add/sub/nop with the shift,
// so a product takes 1 load clock (RD high) plus 8 multiply clocks: 9 clocks.
// Timing of the pins is as in watt: samples are captured in the load clock, where
// DAC_OUT also takes bits 14..7 of the previous product. With RD_STATES = 2 and a
// 35 MHz clock a product takes 10 clocks, 286 ns, with RD high for 57 ns.
module wattfast
  import wattmeter_pkg::*;
#(
  parameter int unsigned WIDTH     = SAMPLE_W,
  parameter int unsigned RD_STATES = 1
) (
  input  logic             clk,
  input  logic             reset,
  input  logic [WIDTH-1:0] adc_in_1,
  input  logic [WIDTH-1:0] adc_in_2,
  output logic [WIDTH-1:0] dac_out,
  output logic             rd
);

  logic done, multiply, load;

  watts2_ctrl #(.RD_STATES(RD_STATES)) u_ctrl (
    .clk, .reset, .done, .multiply, .load, .rd
  );

  booth_fast_datapath #(.WIDTH(WIDTH)) u_dp (
    .clk, .reset, .load, .multiply, .adc_in_1, .adc_in_2, .dac_out, .done
  );

endmodule
