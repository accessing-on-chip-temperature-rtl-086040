// ctrl_logic_tb: self-checking test of the vector-playing control logic.
// Checks that a run starts on the rising edge of test_en and on start_i,
// that playing_o is high for exactly LEN consecutive cycles, the order
// start/clear -> play -> flush -> done and its cycle count, that returned
// bits are logged only in Shift-DR, that start_i is ignored in OFFchip mode
// and while busy, and that dropping test_en aborts a run.
module ctrl_logic_tb;
  localparam int LEN = 79;

  logic clk = 1'b0, rst_n = 1'b0, test_en = 1'b0, start_i = 1'b0, shift_dr_i = 1'b0;
  logic mem_start_o, mem_adv_o, playing_o, resp_clr_o, resp_shift_o, resp_flush_o, busy_o, done_o;
  int   checks = 0, failures = 0;

  ctrl_logic #(.LEN(LEN)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  initial begin
    #1000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // observe one run that begins at the current negedge; returns cycles to done
  task automatic observe_run();
    int c, play, first_play, logged, sh;
    c = 0; play = 0; first_play = -1; logged = 0; sh = 0;
    while (!done_o && c < 200) begin
      shift_dr_i = 1'($urandom);
      #1;
      if (mem_start_o) check(resp_clr_o && c == 1, "load cycle one cycle after the start condition");
      if (playing_o) begin
        if (first_play < 0) first_play = c;
        play++;
        check(mem_adv_o, "advance while playing");
        check(resp_shift_o == shift_dr_i, "log only in Shift-DR");
        if (shift_dr_i) sh++;
      end else check(!resp_shift_o && !mem_adv_o, "idle outside run");
      if (resp_flush_o) check(c == LEN + 2, "flush after the last bit");
      check(busy_o == (c >= 1), "busy during run");
      @(negedge clk);
      start_i = 1'b0;
      c++;
    end
    check(play == LEN, $sformatf("played %0d bits", play));
    check(first_play == 2, "playback starts two cycles after the start condition");
    check(c == LEN + 3, $sformatf("done after %0d cycles", c));
    @(negedge clk);
    check(!done_o && !busy_o, "done is a one-cycle pulse");
  endtask

  initial begin
    #12 rst_n = 1'b1;
    @(negedge clk);
    start_i = 1'b1;
    repeat (3) begin @(negedge clk); check(!busy_o, "no run in OFFchip mode"); end
    start_i = 1'b0;
    test_en = 1'b1;
    observe_run();
    repeat (5) begin @(negedge clk); check(!busy_o, "single run per test_en edge"); end
    start_i = 1'b1;
    observe_run();
    start_i = 1'b0;
    // abort
    @(negedge clk) start_i = 1'b1;
    @(negedge clk) start_i = 1'b0;
    repeat (20) @(negedge clk);
    check(playing_o, "running before abort");
    test_en = 1'b0;
    @(negedge clk);
    check(!busy_o && !playing_o, "test_en low aborts");
    test_en = 1'b1;
    observe_run();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
