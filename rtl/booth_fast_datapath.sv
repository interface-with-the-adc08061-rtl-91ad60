// booth_fast_datapath: datapath of the fast wattmeter, one Booth step per clock.
//
// Same registers as booth_datapath: DREG (multiplicand), AREG = {accumulator
// AREG[2W:W+1], multiplier AREG[W:1], Q-1 AREG[0]} and the counter CREG. A
// combinational SUM is AREG with its accumulator replaced by accumulator - DREG
// (AREG[1:0] = 10), accumulator + DREG (01) or left as is (00, 11).
//   load     : DAC_OUT <= AREG[2W-1:W], AREG <= {0, ADC2, 0}, DREG <= ADC1,
//              CREG <= WIDTH-1.
//   multiply : AREG <= SUM shifted right one place with its sign bit kept,
//              CREG <= CREG - 1.
// DONE is high while CREG is zero; the controller's last MULT_STATE clock is the
// one in which DONE is seen, so exactly WIDTH steps are done. As in booth_datapath
// the accumulator is WIDTH bits, so a multiplicand of 0x80 gives a wrong product,
// and resetting the data registers is this design's choice.
module booth_fast_datapath
  import wattmeter_pkg::*;
#(
  parameter int unsigned WIDTH = SAMPLE_W
) (
  input  logic             clk,
  input  logic             reset,
  input  logic             load,
  input  logic             multiply,
  input  logic [WIDTH-1:0] adc_in_1,
  input  logic [WIDTH-1:0] adc_in_2,
  output logic [WIDTH-1:0] dac_out,
  output logic             done
);

  localparam int unsigned CW = $clog2(WIDTH);

  logic [WIDTH-1:0] dreg;
  logic [2*WIDTH:0] areg;
  logic [2*WIDTH:0] sum;
  logic [CW-1:0]    creg;
  logic [WIDTH-1:0] acc;

  assign acc = areg[2*WIDTH:WIDTH+1];

  always_comb begin
    sum = areg;
    unique case (booth_op_t'(areg[1:0]))
      BOOTH_SUB:              sum[2*WIDTH:WIDTH+1] = acc - dreg;
      BOOTH_ADD:              sum[2*WIDTH:WIDTH+1] = acc + dreg;
      BOOTH_NOP0, BOOTH_NOP1: ;
    endcase
  end

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      dreg    <= '0;
      areg    <= '0;
      creg    <= '0;
      dac_out <= '0;
    end else if (load) begin
      dac_out <= areg[2*WIDTH-1:WIDTH];
      areg    <= {{WIDTH{1'b0}}, adc_in_2, 1'b0};
      dreg    <= adc_in_1;
      creg    <= CW'(WIDTH - 1);
    end else if (multiply) begin
      areg <= {sum[2*WIDTH], sum[2*WIDTH:1]};
      creg <= creg - 1'b1;
    end
  end

  assign done = (creg == '0);

  initial assert (WIDTH == (1 << CW))
    else $error("booth_fast_datapath: WIDTH must be a power of two");

  a_one_cmd: assert property (@(posedge clk) !(load && multiply));

endmodule
