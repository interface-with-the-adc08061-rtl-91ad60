// tb_frame_checker: pin-level checker for one wattmeter (main or fast design).
//
// It watches RD, the two ADC inputs and DAC_OUT at every falling clock edge. The
// first clock of each RD-high period is a load clock: the samples present then are
// the operands of the next product. DAC_OUT must be 0 until the second load after
// reset and afterwards hold bits 14..7 of the product of the operands taken two
// loads earlier, changing only at loads. The number of clocks between loads must
// be FRAME and RD must stay high for RD_CLOCKS clocks.
// Inputs must change away from the falling edge (the testbenches drive them just
// after the rising edge).
module tb_frame_checker #(
  parameter int FRAME     = 17,
  parameter int RD_CLOCKS = 1
) (
  input  logic       clk,
  input  logic       reset,
  input  logic       rd,
  input  logic [7:0] adc_in_1,
  input  logic [7:0] adc_in_2,
  input  logic [7:0] dac_out,
  output int         checks,
  output int         failures,
  output int         frames
);
  import tb_wattmeter_ref_pkg::*;

  logic       rd_prev = 1'b0;
  logic       was_load = 1'b0;
  logic [7:0] a_q [2];
  logic [7:0] b_q [2];
  int         n_loads = 0;
  int         since = 0;
  int         rd_len = 0;
  logic [7:0] expect_dac = '0;

  initial begin
    checks = 0; failures = 0; frames = 0;
    a_q = '{8'h00, 8'h00};
    b_q = '{8'h00, 8'h00};
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %m %s at %0t", what, $time);
    end
  endtask

  always @(negedge clk) begin
    if (reset) begin
      rd_prev  <= 1'b0;
      was_load <= 1'b0;
      n_loads  = 0;
      expect_dac = '0;
    end else begin
      if (was_load) begin
        // the load clock just ended: DAC_OUT shows the product of two loads ago
        expect_dac = (n_loads >= 2) ? ref_dac(a_q[0], b_q[0]) : 8'h00;
      end
      check(dac_out === expect_dac, "dac_out");
      if (rd && !rd_prev) begin
        if (n_loads >= 1) begin
          check(since == FRAME, "frame length");
          frames++;
        end
        a_q[0] = a_q[1]; b_q[0] = b_q[1];
        a_q[1] = adc_in_1; b_q[1] = adc_in_2;
        n_loads++;
        since = 0;
        rd_len = 0;
      end
      if (rd) rd_len++;
      if (!rd && rd_prev) check(rd_len == RD_CLOCKS, "rd high time");
      since++;
      was_load <= rd && !rd_prev;
      rd_prev  <= rd;
    end
  end
endmodule
