// watts2_ctrl: controller of the fast wattmeter (state diagram WATTS2).
//
// Moore machine with two states. Reset puts it in START, which asserts RD (and
// LOAD); it then goes unconditionally to MULT_STATE, which asserts MULTIPLY and is
// left for START when DONE is high. The datapath's counter starts at 7 and DONE
// rises when it reaches 0, so MULT_STATE lasts 8 clocks and a product takes 9.
//
// RD_STATES (default 1, as in the state diagram) keeps the machine in START for that
// many clocks so RD stays high longer at a fast clock (2 at 35 MHz gives 57 ns).
// Only the first START clock asserts LOAD: a second load would overwrite the
// DAC output with the freshly loaded samples. That split, and the asynchronous
// active-high reset, are this design's choices.
module watts2_ctrl
  import wattmeter_pkg::*;
#(
  parameter int unsigned RD_STATES = 1
) (
  input  logic clk,
  input  logic reset,
  input  logic done,      // datapath counter has reached zero
  output logic multiply,  // combined Booth add/sub/nop and shift
  output logic load,      // load samples and output the product
  output logic rd         // RD to the ADCs, high in START
);

  localparam int unsigned RCW = (RD_STATES > 1) ? $clog2(RD_STATES) : 1;

  watts2_state_t  state, next;
  logic [RCW-1:0] rd_cnt;     // clocks already spent in START
  logic           rd_last;

  assign rd_last = (RD_STATES <= 1) || (32'(rd_cnt) == RD_STATES - 1);

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      state  <= F_START;
      rd_cnt <= '0;
    end else begin
      state <= next;
      if (state == F_START && !rd_last) rd_cnt <= rd_cnt + 1'b1;
      else                              rd_cnt <= '0;
    end
  end

  always_comb begin
    next = state;
    unique case (state)
      F_START:      next = rd_last ? F_MULT_STATE : F_START;
      F_MULT_STATE: next = done ? F_START : F_MULT_STATE;
    endcase
  end

  assign rd       = (state == F_START);
  assign load     = (state == F_START) && (rd_cnt == '0);
  assign multiply = (state == F_MULT_STATE);

endmodule
