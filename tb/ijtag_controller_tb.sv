// ijtag_controller_tb: self-checking test of the IJTAG controller with a
// random bit source standing in for the network's scan output.
//
// OFFchip mode: the tms/tdi pins steer the TAP directly and tdo shows the
// network output. ONchip mode: raising test_en plays the stored programme;
// the testbench follows the TAP through it and checks the expected shape
// (79 vector bits, three DR scans of 3, 14 and 14 bits, each with one
// capture and one update, ending in Run-Test/Idle), the TDI bits applied in
// each scan ('001', then the enable and SIB bits, then zeros) and that the
// response memory holds exactly the network bits of the Shift-DR cycles.
// Finally the TMS memory is rewritten with all ones through the load port
// and a rerun must keep the TAP in Test-Logic-Reset.
module ijtag_controller_tb;
  import ijtag_pkg::*;

  logic       tck = 1'b0, rst_n = 1'b0;
  logic       tdi = 1'b0, tms = 1'b1, test_en = 1'b0, start_i = 1'b0;
  logic       tdo, busy_o, done_o;
  logic       vec_wr_en = 1'b0, vec_wr_sel = 1'b0;
  logic [3:0] vec_wr_addr = '0;
  logic [7:0] vec_wr_data = '0;
  logic [1:0] resp_rd_addr = '0;
  logic [7:0] resp_rd_data;
  logic [5:0] resp_nbits_o;
  logic       resp_overflow_o;
  logic       di_o, do_i = 1'b0, ir_so_i = 1'b0, tms_2_o, tdi_2_o;
  scan_ctrl_t dr_o, ir_o;
  tap_state_e tap_state_o;
  int         checks = 0, failures = 0;

  ijtag_controller dut (.*);
  always #5 tck = ~tck;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  initial begin
    #2000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic pin_step(bit m, bit d);
    @(negedge tck) tms = m; tdi = d;
  endtask

  initial begin
    int          played, nscan, shifts [3], caps, upds;
    logic [63:0] tdi_seen [3];
    logic [31:0] logged;
    int          nlog;
    #12 rst_n = 1'b1;
    // ---------------- OFFchip ----------------
    repeat (5) pin_step(1, 0);
    pin_step(0, 0);
    @(posedge tck) #1 check(tap_state_o == RTI, "OFFchip: TMS pin drives the TAP");
    pin_step(1, 0); pin_step(0, 0); pin_step(0, 1);
    @(posedge tck) #1 check(tap_state_o == SHIFT_DR, "OFFchip: Shift-DR");
    check(di_o == 1'b1, "OFFchip: TDI pin reaches the network");
    do_i = 1'b1; #1 check(tdo == 1'b1, "OFFchip: network output on TDO");
    do_i = 1'b0; #1 check(tdo == 1'b0, "OFFchip: network output on TDO (0)");
    pin_step(1, 0); pin_step(1, 0); pin_step(0, 0);
    // ---------------- ONchip ----------------
    @(negedge tck) test_en = 1'b1; tms = 1'b1;
    played = 0; nscan = 0; caps = 0; upds = 0; nlog = 0; logged = '0;
    for (int i = 0; i < 3; i++) begin shifts[i] = 0; tdi_seen[i] = '0; end
    while (!done_o) begin
      @(negedge tck);
      do_i = 1'($urandom);
      #1;
      if (busy_o) played++;
      if (dr_o.ce) caps++;
      if (dr_o.ue) begin upds++; nscan++; end
      if (dr_o.se && nscan < 3) begin
        tdi_seen[nscan][shifts[nscan]] = di_o;
        shifts[nscan]++;
        logged[nlog] = do_i;
        nlog++;
      end
      check(tdo == do_i, "ONchip: network output on TDO");
    end
    check(played == VEC_LEN + 2, $sformatf("busy for %0d cycles (load, 79 bits, flush)", played));
    check(caps == 3 && upds == 3, "three captures and updates");
    check(shifts[0] == 3 && shifts[1] == 14 && shifts[2] == 14, "scan lengths 3, 14, 14");
    check(tdi_seen[0][2:0] == 3'b100, "first scan shifts 0,0,1");
    check(tdi_seen[1][13:0] == 14'b11_0000_0000_0000, "second scan: enable and SIB-0 bits last");
    check(tdi_seen[2][13:0] == '0, "third scan shifts zeros");
    @(negedge tck);
    check(tap_state_o == RTI, "programme ends in Run-Test/Idle");
    check(int'(resp_nbits_o) == nlog && nlog == 31, "31 bits logged");
    for (int w = 0; w < 4; w++) begin
      resp_rd_addr = 2'(w); #1;
      for (int b = 0; b < 8; b++)
        if (w * 8 + b < nlog) check(resp_rd_data[b] == logged[w*8+b], "logged bit");
    end
    // parked: TAP stays in Run-Test/Idle
    repeat (10) @(negedge tck);
    check(tap_state_o == RTI && !busy_o, "parked in Run-Test/Idle");
    // ---------------- reload TMS memory with all ones ----------------
    for (int w = 0; w < 10; w++) begin
      @(negedge tck) vec_wr_en = 1'b1; vec_wr_sel = 1'b0; vec_wr_addr = 4'(w); vec_wr_data = 8'hff;
    end
    @(negedge tck) vec_wr_en = 1'b0; start_i = 1'b1;
    @(negedge tck) start_i = 1'b0;
    // from Run-Test/Idle two TMS ones pass Select-DR and Select-IR first
    caps = 0; played = 0;
    while (!done_o) begin
      @(negedge tck);
      if (dr_o.ce || dr_o.se) caps++;
      if (tap_state_o == TLR) played++;
    end
    check(caps == 0 && played >= VEC_LEN - 2, $sformatf("reloaded vector keeps the TAP in reset (caps=%0d tlr=%0d)", caps, played));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
