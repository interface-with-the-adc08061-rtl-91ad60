// booth_datapath: datapath of the main wattmeter, a sequential radix-2 Booth multiplier.
//
// Registers: DREG holds the multiplicand (ADC 1). AREG (2*WIDTH+1 bits) holds, from
// the top, the accumulator (AREG[2W:W+1]), the multiplier (ADC 2, AREG[W:1]) and the
// Booth bit Q-1 (AREG[0]); at the end AREG[2W:1] is the signed product. CREG is a
// log2(WIDTH)-bit step counter and DONE is high while it is zero.
//
// Commands (one per clock, from watts_ctrl):
//   load     : DAC_OUT <= AREG[2W-1:W] (product bits 2W-2..W-1 of the previous
//              multiplication), AREG <= {0, ADC2, 0}, DREG <= ADC1, CREG <= 0.
//   do_asn   : by AREG[1:0], 10 -> accumulator - DREG, 01 -> accumulator + DREG,
//              else unchanged; CREG <= CREG - 1.
//   do_shift : AREG shifted right one place, the sign bit AREG[2W] kept.
// After load, 8 do_asn/do_shift pairs bring CREG back to 0 and leave the product.
// Samples are treated as two's complement. The accumulator is WIDTH bits wide, as in
// the original design, so a multiplicand of -2^(W-1) (0x80) overflows it and gives a
// wrong product; every other pair is exact. The DAC byte drops the product's sign bit
// (bit 2W-1), which only matters for (-128)*(-128).
// Resetting the data registers is this design's choice; the original resets only
// the controller. WIDTH must be a power of two so that CREG wraps back to 0.
module booth_datapath
  import wattmeter_pkg::*;
#(
  parameter int unsigned WIDTH = SAMPLE_W
) (
  input  logic             clk,
  input  logic             reset,
  input  logic             load,
  input  logic             do_asn,
  input  logic             do_shift,
  input  logic [WIDTH-1:0] adc_in_1,
  input  logic [WIDTH-1:0] adc_in_2,
  output logic [WIDTH-1:0] dac_out,
  output logic             done
);

  localparam int unsigned CW = $clog2(WIDTH);

  logic [WIDTH-1:0]   dreg;
  logic [2*WIDTH:0]   areg;
  logic [CW-1:0]      creg;
  logic [WIDTH-1:0]   acc;
  booth_op_t          op;

  assign acc = areg[2*WIDTH:WIDTH+1];
  assign op  = booth_op_t'(areg[1:0]);

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      dreg    <= '0;
      areg    <= '0;
      creg    <= '0;
      dac_out <= '0;
    end else begin
      if (load) begin
        dac_out <= areg[2*WIDTH-1:WIDTH];
        areg    <= {{WIDTH{1'b0}}, adc_in_2, 1'b0};
        dreg    <= adc_in_1;
        creg    <= '0;
      end
      if (do_asn) begin
        if (op == BOOTH_SUB) areg[2*WIDTH:WIDTH+1] <= acc - dreg;
        if (op == BOOTH_ADD) areg[2*WIDTH:WIDTH+1] <= acc + dreg;
        creg <= creg - 1'b1;
      end
      if (do_shift) areg <= {areg[2*WIDTH], areg[2*WIDTH:1]};
    end
  end

  assign done = (creg == '0);

  initial assert (WIDTH == (1 << CW))
    else $error("booth_datapath: WIDTH must be a power of two");

  // The controller issues at most one command per clock.
  a_one_cmd: assert property (@(posedge clk)
                              $onehot0({load, do_asn, do_shift}));

endmodule
