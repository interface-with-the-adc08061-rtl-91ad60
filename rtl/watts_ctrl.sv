// watts_ctrl: controller of the main wattmeter (state diagram WATTS).
//
// Moore machine with the states START, ADD_SUB_NOP and SHIFT. Reset puts it in
// START. START asserts LOAD and RD for one clock: the datapath takes the new ADC
// samples, outputs the previous product and initialises the multiplication. The
// machine then alternates ADD_SUB_NOP (DO_ASN) and SHIFT (DO_SHIFT); after each
// SHIFT it returns to START when DONE is high and to ADD_SUB_NOP otherwise. With the
// datapath's 3-bit counter this makes 8 iterations, 17 clocks per product: RD is high
// for 1 clock and low for 16 (50 ns and 800 ns at a 20 MHz clock).
//
// WAIT_STATES (default 0, as in the state diagram) inserts that many RD-low clocks
// between START and the first ADD_SUB_NOP, for an ADC that needs RD low longer:
// one extra wait state makes a frame 18 clocks (900 ns at 50 ns), two keep RD low
// for a full 900 ns. The wait state is an option the original design mentions;
// its position, and the asynchronous active-high reset, are this design's choices.
module watts_ctrl
  import wattmeter_pkg::*;
#(
  parameter int unsigned WAIT_STATES = 0
) (
  input  logic clk,
  input  logic reset,
  input  logic done,      // datapath counter has reached zero
  output logic do_asn,    // perform a Booth add/subtract/no-op step
  output logic do_shift,  // shift the accumulator right
  output logic load,      // load samples and output the product
  output logic rd         // RD to the ADCs, high only in START
);

  localparam int unsigned WCW = (WAIT_STATES > 1) ? $clog2(WAIT_STATES) : 1;

  watts_state_t state, next;
  logic [WCW-1:0] wait_cnt;

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      state    <= S_START;
      wait_cnt <= '0;
    end else begin
      state <= next;
      if (state == S_START) wait_cnt <= '0;
      else if (state == S_WAIT) wait_cnt <= wait_cnt + 1'b1;
    end
  end

  always_comb begin
    next = state;
    unique case (state)
      S_START:       next = (WAIT_STATES > 0) ? S_WAIT : S_ADD_SUB_NOP;
      S_WAIT:        next = (32'(wait_cnt) == WAIT_STATES - 1) ? S_ADD_SUB_NOP : S_WAIT;
      S_ADD_SUB_NOP: next = S_SHIFT;
      S_SHIFT:       next = done ? S_START : S_ADD_SUB_NOP;
    endcase
  end

  // Moore outputs
  assign load     = (state == S_START);
  assign rd       = (state == S_START);
  assign do_asn   = (state == S_ADD_SUB_NOP);
  assign do_shift = (state == S_SHIFT);

endmodule
