// tb_watts_ctrl: sequence test of the main controller.
//
// Two controllers run side by side: the default one and one with WAIT_STATES = 2
// (the 900 ns option). DONE comes from a counter model in the testbench that, like
// the datapath's 3-bit counter, is cleared on LOAD and decremented on DO_ASN. The
// outputs of each clock are compared with the expected frame
// START, [WAIT x W], (ADD_SUB_NOP, SHIFT) x 8, and the frame length (17 and 19
// clocks) and the single-clock RD pulse are checked. Exactly one output is high in
// ADD_SUB_NOP and SHIFT, and LOAD equals RD.
module tb_watts_ctrl;

  logic clk = 1'b0, reset = 1'b1;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin
    #100_000;
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

  // ---- instance 0: default, instance 1: two wait states
  logic [1:0] done, do_asn, do_shift, load, rd;
  logic [2:0] cnt [2];

  watts_ctrl                   u0 (.clk, .reset, .done(done[0]), .do_asn(do_asn[0]),
                                   .do_shift(do_shift[0]), .load(load[0]), .rd(rd[0]));
  watts_ctrl #(.WAIT_STATES(2)) u1 (.clk, .reset, .done(done[1]), .do_asn(do_asn[1]),
                                   .do_shift(do_shift[1]), .load(load[1]), .rd(rd[1]));

  for (genvar g = 0; g < 2; g++) begin : g_cnt
    always_ff @(posedge clk) begin
      if (reset)          cnt[g] <= '0;
      else if (load[g])   cnt[g] <= '0;
      else if (do_asn[g]) cnt[g] <= cnt[g] - 1'b1;
    end
    assign done[g] = (cnt[g] == '0);
  end

  // expected output of clock t (t = 0 is START) of a frame with w wait states
  function automatic logic [3:0] expect_out(input int t, input int w);
    // {rd, load, do_asn, do_shift}
    if (t == 0) return 4'b1100;
    if (t <= w) return 4'b0000;
    return ((t - w) % 2 == 1) ? 4'b0010 : 4'b0001;
  endfunction

  initial begin
    int t [2];
    int frames [2];
    int w;
    t = '{0, 0};
    frames = '{0, 0};
    repeat (2) @(negedge clk);
    reset = 1'b0;
    repeat (200) begin
      #1;
      for (int i = 0; i < 2; i++) begin
        w = (i == 0) ? 0 : 2;
        check({rd[i], load[i], do_asn[i], do_shift[i]} === expect_out(t[i], w), "outputs");
        t[i]++;
        if (t[i] == 17 + w) begin
          t[i] = 0;
          frames[i]++;
        end
      end
      @(negedge clk);
    end
    check(frames[0] >= 11 && frames[1] >= 10, "frames completed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
