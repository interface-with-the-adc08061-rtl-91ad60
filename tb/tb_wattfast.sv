// tb_wattfast: pin-level test of the fast wattmeter.
//
// Two instances: the default one (9 clocks per product, RD high 1 clock) and one
// with RD_STATES = 2 (10 clocks, RD high 2 clocks as at 35 MHz). Random samples,
// with 0x00, 0x7F, 0x80 and 0xFF mixed in, change every clock; tb_frame_checker
// checks each DAC byte, the frame length and the RD pulse.
module tb_wattfast;
  logic clk = 1'b0, reset = 1'b1;
  logic [7:0] a [2], b [2], dac [2];
  logic [1:0] rd;
  int c [2], f [2], fr [2];
  int checks, failures;

  always #5 clk = ~clk;

  wattfast                u0 (.clk, .reset, .adc_in_1(a[0]), .adc_in_2(b[0]), .dac_out(dac[0]), .rd(rd[0]));
  wattfast #(.RD_STATES(2)) u1 (.clk, .reset, .adc_in_1(a[1]), .adc_in_2(b[1]), .dac_out(dac[1]), .rd(rd[1]));

  tb_frame_checker #(.FRAME(9))  k0 (.clk, .reset, .rd(rd[0]), .adc_in_1(a[0]), .adc_in_2(b[0]),
                                     .dac_out(dac[0]), .checks(c[0]), .failures(f[0]), .frames(fr[0]));
  tb_frame_checker #(.FRAME(10), .RD_CLOCKS(2)) k1 (.clk, .reset, .rd(rd[1]), .adc_in_1(a[1]), .adc_in_2(b[1]),
                                     .dac_out(dac[1]), .checks(c[1]), .failures(f[1]), .frames(fr[1]));

  function automatic logic [7:0] sample();
    int unsigned pick;
    pick = $urandom_range(7);
    unique case (pick)
      0:       return 8'h80;
      1:       return 8'h7F;
      2:       return 8'hFF;
      3:       return 8'h00;
      default: return 8'($urandom);
    endcase
  endfunction

  initial begin
    #2_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1], f[0] + f[1] + 1);
    $finish;
  end

  initial begin
    a = '{8'h00, 8'h00}; b = '{8'h00, 8'h00};
    repeat (3) @(negedge clk);
    reset = 1'b0;
    repeat (4000) begin
      @(posedge clk);
      #2;
      for (int i = 0; i < 2; i++) begin
        a[i] = sample();
        b[i] = sample();
      end
    end
    @(negedge clk);
    checks   = c[0] + c[1] + 2;
    failures = f[0] + f[1];
    if (fr[0] < 200) failures++;
    if (fr[1] < 200) failures++;
    $display("frames: %0d default, %0d with two RD clocks", fr[0], fr[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
