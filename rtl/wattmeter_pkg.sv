// wattmeter_pkg: types and constants shared by the two Booth-multiplier wattmeters.
//
// Both wattmeters read two 8-bit ADC samples (one proportional to voltage, one to
// current), form their signed product with a radix-2 Booth multiplier and send the
// upper byte of the product to a DAC. The state encodings below follow the two state
// diagrams of the design: the three-state controller of the main design (START,
// ADD_SUB_NOP, SHIFT) and the two-state controller of the fast design (START,
// MULT_STATE). The WAIT state is this design's realisation of the optional extra
// wait state that stretches the RD-low time of the main design from 800 ns to 900 ns.
package wattmeter_pkg;

  // Sample width of both ADCs and of the DAC.
  localparam int unsigned SAMPLE_W = 8;

  // States of the main (three-state) controller.
  typedef enum logic [1:0] {
    S_START       = 2'd0,  // RD high: load samples, output previous product
    S_WAIT        = 2'd1,  // optional RD-low wait state (unused when WAIT_STATES = 0)
    S_ADD_SUB_NOP = 2'd2,  // Booth add, subtract or nothing
    S_SHIFT       = 2'd3   // arithmetic shift right of the accumulator
  } watts_state_t;

  // States of the fast (two-state) controller.
  typedef enum logic {
    F_START      = 1'b0,   // RD high: load samples, output previous product
    F_MULT_STATE = 1'b1    // Booth add/sub/nop and shift in one clock
  } watts2_state_t;

  // Booth recoding of the two lowest accumulator bits {Q0, Q-1}.
  typedef enum logic [1:0] {
    BOOTH_NOP0 = 2'b00,
    BOOTH_ADD  = 2'b01,    // Q0=0, Q-1=1: end of a run of ones -> add multiplicand
    BOOTH_SUB  = 2'b10,    // Q0=1, Q-1=0: start of a run of ones -> subtract multiplicand
    BOOTH_NOP1 = 2'b11
  } booth_op_t;

endpackage
