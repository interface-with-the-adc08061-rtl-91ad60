// tb_wattmeter_top: end-to-end test of both wattmeters at their default sizes.
//
// wattmeter_top runs with its default parameters (8-bit samples, one RD clock, no
// extra wait state) on a 20 MHz clock. Beside it, a main wattmeter with one extra
// wait state (WAIT_STATES = 1, 20 MHz) and a fast one with two RD clocks
// (RD_STATES = 2, 35 MHz) cover the two timing options. Random samples with 0x00,
// 0x7F, 0x80 and 0xFF mixed in change every clock, and tb_frame_checker checks
// every DAC byte, frame length (17, 9, 18 and 10 clocks) and RD pulse. The frame
// period and RD-high time are also measured in nanoseconds: 850/50 ns for the
// main design, 450/50 ns for the fast one, 900/50 ns with the wait state and
// 286/57.2 ns for the fast design with two RD clocks at 35 MHz.
// It also counts how often each mechanism occurred, and counts a failure for any
// that never did: Booth add, subtract and no-op steps and shifts in the main
// design, combined steps of each kind in the fast design, returns to START on DONE,
// a 0x80 multiplicand (the accumulator overflow case), the wait state and the
// second RD clock.
module tb_wattmeter_top;
  timeunit 1ns;
  timeprecision 1ps;

  logic clk = 1'b0, clk35 = 1'b0, reset = 1'b1, reset35 = 1'b1;
  logic [7:0] a [4], b [4], dac [4];
  logic [3:0] rd;
  int c [4], f [4], fr [4];
  int checks = 0, failures = 0;

  always #25 clk = ~clk;         // 50 ns, 20 MHz
  always #14.3 clk35 = ~clk35;   // 28.6 ns, 35 MHz
  always @(posedge clk35) reset35 <= reset;   // reset released on its own clock

  wattmeter_top dut (
    .clk, .reset,
    .adc_in_1(a[0]), .adc_in_2(b[0]), .dac_out(dac[0]), .rd(rd[0]),
    .fast_adc_in_1(a[1]), .fast_adc_in_2(b[1]), .fast_dac_out(dac[1]), .fast_rd(rd[1])
  );
  watt     #(.WAIT_STATES(1)) u_wait (.clk, .reset, .adc_in_1(a[2]), .adc_in_2(b[2]),
                                      .dac_out(dac[2]), .rd(rd[2]));
  wattfast #(.RD_STATES(2))   u_rd2  (.clk(clk35), .reset(reset35), .adc_in_1(a[3]), .adc_in_2(b[3]),
                                      .dac_out(dac[3]), .rd(rd[3]));

  localparam int FRAME [4] = '{17, 9, 18, 10};
  localparam int RDCLK [4] = '{1, 1, 1, 2};
  for (genvar g = 0; g < 4; g++) begin : g_chk
    tb_frame_checker #(.FRAME(FRAME[g]), .RD_CLOCKS(RDCLK[g])) k (
      .clk(g == 3 ? clk35 : clk), .reset(g == 3 ? reset35 : reset),
      .rd(rd[g]), .adc_in_1(a[g]), .adc_in_2(b[g]), .dac_out(dac[g]),
      .checks(c[g]), .failures(f[g]), .frames(fr[g]));
  end

  // ---- frame period and RD-high time in ns, against the original figures
  localparam realtime PERIOD_NS [4] = '{850.0, 450.0, 900.0, 286.0};
  localparam realtime RDHIGH_NS [4] = '{50.0, 50.0, 50.0, 57.2};
  int tchecks = 0, tfails = 0;

  function automatic bit near(input realtime x, input realtime want);
    return (x - want < 0.01) && (want - x < 0.01);
  endfunction
  for (genvar g = 0; g < 4; g++) begin : g_time
    realtime t_rise = 0.0;
    wire rst = (g == 3) ? reset35 : reset;
    always @(posedge rd[g]) if (!rst) begin
      if (t_rise > 0.0) begin
        tchecks++;
        if (!near($realtime - t_rise, PERIOD_NS[g])) begin
          tfails++;
          $display("FAIL period of design %0d: %0.1f ns", g, $realtime - t_rise);
        end
      end
      t_rise = $realtime;
    end
    always @(negedge rd[g]) if (!rst && t_rise > 0.0) begin
      tchecks++;
      if (!near($realtime - t_rise, RDHIGH_NS[g])) begin
        tfails++;
        $display("FAIL RD high of design %0d: %0.1f ns", g, $realtime - t_rise);
      end
    end
  end

  // ---- mechanism counters, from the internal command signals
  typedef enum int {M_ADD, M_SUB, M_NOP, M_SHIFT, M_DONE, M_F_ADD, M_F_SUB, M_F_NOP,
                    M_F_DONE, M_OVF, M_WAIT, M_RD2, M_N} mech_t;
  int mech [M_N];
  string mech_name [M_N] = '{"main add", "main subtract", "main no-op", "main shift",
                             "main done->START", "fast add", "fast subtract", "fast no-op",
                             "fast done->START", "0x80 multiplicand", "wait state",
                             "second RD clock"};

  initial foreach (mech[i]) mech[i] = 0;

  always @(posedge clk) if (!reset) begin
    if (dut.u_watt.u_ctrl.do_asn) begin
      if (dut.u_watt.u_dp.areg[1:0] == 2'b01)      mech[M_ADD]++;
      else if (dut.u_watt.u_dp.areg[1:0] == 2'b10) mech[M_SUB]++;
      else                                         mech[M_NOP]++;
    end
    if (dut.u_watt.u_ctrl.do_shift) begin
      mech[M_SHIFT]++;
      if (dut.u_watt.u_dp.done) mech[M_DONE]++;
    end
    if (dut.u_watt.u_ctrl.load && a[0] == 8'h80) mech[M_OVF]++;
    if (dut.u_wattfast.u_ctrl.multiply) begin
      if (dut.u_wattfast.u_dp.areg[1:0] == 2'b01)      mech[M_F_ADD]++;
      else if (dut.u_wattfast.u_dp.areg[1:0] == 2'b10) mech[M_F_SUB]++;
      else                                             mech[M_F_NOP]++;
      if (dut.u_wattfast.u_dp.done) mech[M_F_DONE]++;
    end
    if (!u_wait.rd && !u_wait.u_ctrl.do_asn && !u_wait.u_ctrl.do_shift) mech[M_WAIT]++;
  end

  always @(posedge clk35) if (!reset35 && u_rd2.rd && !u_rd2.u_ctrl.load) mech[M_RD2]++;

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
    #5_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1] + c[2] + c[3],
             f[0] + f[1] + f[2] + f[3] + 1);
    $finish;
  end

  // the 35 MHz design gets its samples just after its own clock edge
  always @(posedge clk35) begin
    #2;
    a[3] = sample();
    b[3] = sample();
  end

  initial begin
    a = '{default: 8'h00}; b = '{default: 8'h00};
    repeat (3) @(negedge clk);
    reset = 1'b0;
    repeat (5000) begin
      @(posedge clk);
      #2;
      for (int i = 0; i < 3; i++) begin
        a[i] = sample();
        b[i] = sample();
      end
    end
    @(negedge clk);
    checks   += tchecks + 1;
    failures += tfails;
    if (tchecks < 1000) failures++;
    $display("timing checks in ns: %0d", tchecks);
    for (int i = 0; i < 4; i++) begin
      checks   += c[i] + 1;
      failures += f[i];
      if (fr[i] < 200) failures++;
    end
    $display("frames: main %0d, fast %0d, main+wait %0d, fast+2RD %0d", fr[0], fr[1], fr[2], fr[3]);
    foreach (mech[i]) begin
      checks++;
      $display("  %-20s %0d", mech_name[i], mech[i]);
      if (mech[i] == 0) begin
        failures++;
        $display("FAIL mechanism never occurred: %s", mech_name[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
