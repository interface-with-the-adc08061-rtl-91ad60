// tb_watts2_ctrl: sequence test of the fast controller.
//
// Two controllers run side by side: the default one (one RD clock, 9 clocks per
// frame) and one with RD_STATES = 2 (the 35 MHz option, 10 clocks per frame). DONE
// comes from a counter model that is set to 7 on LOAD and decremented on
// MULTIPLY. Each clock's outputs are compared with the expected frame; LOAD must
// be high only in the first RD clock.
module tb_watts2_ctrl;

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

  logic [1:0] done, multiply, load, rd;
  logic [2:0] cnt [2];

  watts2_ctrl                 u0 (.clk, .reset, .done(done[0]), .multiply(multiply[0]),
                                  .load(load[0]), .rd(rd[0]));
  watts2_ctrl #(.RD_STATES(2)) u1 (.clk, .reset, .done(done[1]), .multiply(multiply[1]),
                                  .load(load[1]), .rd(rd[1]));

  for (genvar g = 0; g < 2; g++) begin : g_cnt
    always_ff @(posedge clk) begin
      if (reset)            cnt[g] <= '0;
      else if (load[g])     cnt[g] <= 3'd7;
      else if (multiply[g]) cnt[g] <= cnt[g] - 1'b1;
    end
    assign done[g] = (cnt[g] == '0);
  end

  // {rd, load, multiply} in clock t of a frame with r RD clocks
  function automatic logic [2:0] expect_out(input int t, input int r);
    if (t == 0) return 3'b110;
    if (t < r)  return 3'b100;
    return 3'b001;
  endfunction

  initial begin
    int t [2];
    int frames [2];
    int r;
    t = '{0, 0};
    frames = '{0, 0};
    repeat (2) @(negedge clk);
    reset = 1'b0;
    repeat (200) begin
      #1;
      for (int i = 0; i < 2; i++) begin
        r = i + 1;
        check({rd[i], load[i], multiply[i]} === expect_out(t[i], r), "outputs");
        t[i]++;
        if (t[i] == 8 + r) begin
          t[i] = 0;
          frames[i]++;
        end
      end
      @(negedge clk);
    end
    check(frames[0] >= 22 && frames[1] >= 20, "frames completed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
