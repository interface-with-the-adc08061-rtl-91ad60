// tb_booth_fast_datapath: exhaustive test of the fast wattmeter's datapath.
//
// The testbench plays the controller: one load, then multiply held for as long as
// DONE is low plus the clock in which DONE is seen (as the two-state controller
// does), for all 65536 sample pairs. It checks that this takes exactly 8 multiply
// clocks and that the next load puts bits 14..7 of the product on DAC_OUT.
module tb_booth_fast_datapath;
  import tb_wattmeter_ref_pkg::*;

  logic clk = 1'b0, reset = 1'b1;
  logic load = 1'b0, multiply = 1'b0;
  logic [7:0] adc_in_1 = '0, adc_in_2 = '0, dac_out;
  logic done;
  int checks = 0, failures = 0;

  booth_fast_datapath dut (.*);

  always #5 clk = ~clk;

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    logic [7:0] pa, pb;
    logic       have_prev, last;
    int         steps;
    have_prev = 1'b0;
    pa = '0; pb = '0;
    repeat (2) @(negedge clk);
    reset = 1'b0;
    for (int i = 0; i <= 65536; i++) begin
      adc_in_1 = 8'(i >> 8);
      adc_in_2 = 8'(i);
      @(negedge clk);
      load = 1'b1;
      @(posedge clk);
      #1;
      load = 1'b0;
      if (have_prev) check(dac_out === ref_dac(pa, pb), "dac_out");
      check(done === 1'b0, "done low after load");
      pa = adc_in_1; pb = adc_in_2; have_prev = 1'b1;
      if (i == 65536) break;
      adc_in_1 = ~adc_in_1; adc_in_2 = ~adc_in_2;   // must not be sampled
      steps = 0;
      do begin
        @(negedge clk);
        last = done;
        multiply = 1'b1;
        @(posedge clk);
        #1;
        multiply = 1'b0;
        steps++;
      end while (!last && steps < 20);
      check(steps == 8, "eight multiply clocks");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
