// tb_booth_datapath: exhaustive test of the main wattmeter's Booth datapath.
//
// The testbench plays the controller: one load, then eight do_asn/do_shift pairs,
// for every one of the 65536 sample pairs. At each following load it checks that
// DAC_OUT holds bits 14..7 of the previous product (tb_wattmeter_ref_pkg), and
// it checks DONE: high right after the load, low during the steps, high again
// after the eighth do_asn.
module tb_booth_datapath;
  import tb_wattmeter_ref_pkg::*;

  logic clk = 1'b0, reset = 1'b1;
  logic load = 1'b0, do_asn = 1'b0, do_shift = 1'b0;
  logic [7:0] adc_in_1 = '0, adc_in_2 = '0, dac_out;
  logic done;
  int checks = 0, failures = 0;

  booth_datapath dut (.*);

  always #5 clk = ~clk;

  initial begin
    #40_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cmd(input logic l, input logic a, input logic s);
    @(negedge clk);
    load = l; do_asn = a; do_shift = s;
    @(posedge clk);
    #1;
    load = 1'b0; do_asn = 1'b0; do_shift = 1'b0;
  endtask

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    logic [7:0] pa, pb;
    logic       have_prev;
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
      check(done === 1'b1, "done after load");
      pa = adc_in_1; pb = adc_in_2; have_prev = 1'b1;
      if (i == 65536) break;
      adc_in_1 = ~adc_in_1; adc_in_2 = ~adc_in_2;   // must not be sampled
      for (int k = 0; k < 8; k++) begin
        check(done === (k == 0), "done before step");
        cmd(1'b0, 1'b1, 1'b0);
        check(done === (k == 7), "done after step");
        cmd(1'b0, 1'b0, 1'b1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
