// wattmeter_top: the two wattmeter designs side by side.
//
// The main design (watt: three-state controller, 17 clocks per product) and the
// fast design (wattfast: two-state controller, 9 clocks per product) are separate
// circuits for separate boards; each has its own ADC data inputs, RD output and DAC
// output, and they share only the clock and reset pins here. The ADCs (two per
// design, chip select tied low) and the DAC are external parts.
module wattmeter_top
  import wattmeter_pkg::*;
#(
  parameter int unsigned WIDTH       = SAMPLE_W,
  parameter int unsigned WAIT_STATES = 0,
  parameter int unsigned RD_STATES   = 1
) (
  input  logic             clk,
  input  logic             reset,
  // main design
  input  logic [WIDTH-1:0] adc_in_1,
  input  logic [WIDTH-1:0] adc_in_2,
  output logic [WIDTH-1:0] dac_out,
  output logic             rd,
  // fast design
  input  logic [WIDTH-1:0] fast_adc_in_1,
  input  logic [WIDTH-1:0] fast_adc_in_2,
  output logic [WIDTH-1:0] fast_dac_out,
  output logic             fast_rd
);

  watt #(.WIDTH(WIDTH), .WAIT_STATES(WAIT_STATES)) u_watt (
    .clk, .reset, .adc_in_1, .adc_in_2, .dac_out, .rd
  );

  wattfast #(.WIDTH(WIDTH), .RD_STATES(RD_STATES)) u_wattfast (
    .clk, .reset,
    .adc_in_1 (fast_adc_in_1),
    .adc_in_2 (fast_adc_in_2),
    .dac_out  (fast_dac_out),
    .rd       (fast_rd)
  );

endmodule
