// tap_ctrl_tb: self-checking test of the TAP controller.
//
// A reference model of the IEEE 1149.1 state diagram (written as a table of
// successor pairs) follows a random TMS stream alongside the design; every
// cycle the state and all decoded enables are compared with the model.
// Directed checks cover the five-ones reset, the Run-Test/Idle -> Shift-DR
// path used by the vector programme, the serial data paths and trst_n.
module tap_ctrl_tb;
  import ijtag_pkg::*;

  logic       tck = 1'b0;
  logic       trst_n = 1'b0;
  logic       tms = 1'b1, si = 1'b0, do_i = 1'b0, ir_so_i = 1'b0;
  logic       so_o, di_o;
  scan_ctrl_t dr_o, ir_o;
  tap_state_e state_o;
  int         checks = 0, failures = 0;
  int         cyc = 0;

  tap_ctrl dut (.*);

  always #5 tck = ~tck;
  always @(posedge tck) cyc <= cyc + 1;

  // successors {tms=0, tms=1}, indexed by state number
  int succ0 [16] = '{1, 1, 3, 4, 4, 6, 6, 4, 1, 10, 11, 11, 13, 13, 11, 1};
  int succ1 [16] = '{0, 2, 9, 5, 5, 8, 7, 8, 2, 0, 12, 12, 15, 14, 15, 2};
  int ref_st;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL @%0d: %s (state=%0d ref=%0d)", cyc, what, state_o, ref_st);
    end
  endtask

  task automatic compare();
    check(int'(state_o) == ref_st, "state");
    check(dr_o.ce  == (ref_st == 3),  "CaptureEn-DR");
    check(dr_o.se  == (ref_st == 4),  "ShiftEn-DR");
    check(dr_o.ue  == (ref_st == 8),  "UpdateEn-DR");
    check(dr_o.sel == (ref_st >= 3 && ref_st <= 8), "SelectEn-DR");
    check(ir_o.ce  == (ref_st == 10), "CaptureEn-IR");
    check(ir_o.se  == (ref_st == 11), "ShiftEn-IR");
    check(ir_o.ue  == (ref_st == 15), "UpdateEn-IR");
    check(ir_o.sel == (ref_st >= 10), "SelectEn-IR");
    check(dr_o.rst == (ref_st == 0),  "RST");
  endtask

  task automatic step(bit t);
    tms = t;
    @(posedge tck);
    ref_st = t ? succ1[ref_st] : succ0[ref_st];
    #1;
    compare();
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_st = 0;
    #12 trst_n = 1'b1;
    #1 compare();
    // reset, then to Shift-DR
    repeat (5) step(1);
    check(state_o == TLR, "five ones reach Test-Logic-Reset");
    step(0); check(state_o == RTI, "Run-Test/Idle");
    step(1); step(0); step(0);
    check(state_o == SHIFT_DR, "Shift-DR after 1,0,0");
    do_i = 1'b1; si = 1'b1; #1;
    check(so_o == 1'b1 && di_o == 1'b1, "serial data in Shift-DR");
    do_i = 1'b0; si = 1'b0; #1;
    check(so_o == 1'b0 && di_o == 1'b0, "serial data follows");
    // Shift-IR picks the IR return
    repeat (5) step(1);
    step(0); step(1); step(1); step(0); step(0);
    check(state_o == SHIFT_IR, "Shift-IR after 1,1,0,0");
    ir_so_i = 1'b1; do_i = 1'b0; #1;
    check(so_o == 1'b1, "IR return on so in Shift-IR");
    ir_so_i = 1'b0;
    // random walk
    repeat (3000) step(1'($urandom));
    // asynchronous reset
    repeat (3) step(0);
    trst_n = 1'b0; ref_st = 0; #1;
    check(state_o == TLR, "trst_n resets to Test-Logic-Reset");
    @(negedge tck) trst_n = 1'b1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
