// watt: the main wattmeter, a three-state Booth multiplier between two ADCs and a DAC.
//
// watts_ctrl sequences booth_datapath through one load clock (RD high) and eight
// add/sub/nop + shift pairs (RD low), 17 clocks per product. In the load clock the
// samples ADC_IN_1 (multiplicand) and ADC_IN_2 (multiplier) are captured and
// DAC_OUT is updated with bits 14..7 of the previous product, so DAC_OUT changes
// once per 17 clocks and lags the samples by one frame. At a 20 MHz clock RD is
// high 50 ns and low 800 ns, 850 ns per product. The ADC chip select is assumed tied
// low outside, so RD alone starts and reads the conversions.
// WAIT_STATES adds RD-low clocks per frame (see watts_ctrl).
module watt
  import wattmeter_pkg::*;
#(
  parameter int unsigned WIDTH       = SAMPLE_W,
  parameter int unsigned WAIT_STATES = 0
) (
  input  logic             clk,
  input  logic             reset,
  input  logic [WIDTH-1:0] adc_in_1,
  input  logic [WIDTH-1:0] adc_in_2,
  output logic [WIDTH-1:0] dac_out,
  output logic             rd
);

  logic done, do_asn, do_shift, load;

  watts_ctrl #(.WAIT_STATES(WAIT_STATES)) u_ctrl (
    .clk, .reset, .done, .do_asn, .do_shift, .load, .rd
  );

  booth_datapath #(.WIDTH(WIDTH)) u_dp (
    .clk, .reset, .load, .do_asn, .do_shift, .adc_in_1, .adc_in_2, .dac_out, .done
  );

endmodule
