// ijtag_system_top_tb: end-to-end test of the whole system at its default
// sizes (three monitors, 79-bit vectors).
//
// 1. ONchip run of the stored programme (test_en rising): monitor 0 must be
//    switched on, convert in 11 cycles, and its reading must appear both on
//    tdo and in the response memory; afterwards the monitor is off and all
//    SIBs are closed.
// 2. OFFchip access: the testbench itself acts as the external JTAG master
//    on tms/tdi/tdo and reads monitor 1.
// 3. Reprogramming: the vector memories are reloaded through the load port
//    with the programme for monitor 2, and a start_i pulse reruns ONchip.
// Expected readings are computed here from the bridge equation. Each
// mechanism (ONchip run, OFFchip access, mode switch, SIB open and close,
// monitor conversion, vector reload, rerun on start) is counted, and one
// that never happened counts as a failure.
module ijtag_system_top_tb;
  import ijtag_pkg::*;
  localparam real TC_HI = 0.004, VS = 1.1, GAIN = 5.0, VREF = 1.1;

  logic        tck = 1'b0, rst_n = 1'b0;
  logic        tdi = 1'b0, tms = 1'b1, test_en = 1'b0, start_i = 1'b0;
  logic        tdo, busy_o, done_o;
  logic        vec_wr_en = 1'b0, vec_wr_sel = 1'b0;
  logic [3:0]  vec_wr_addr = '0;
  logic [7:0]  vec_wr_data = '0;
  logic [1:0]  resp_rd_addr = '0;
  logic [7:0]  resp_rd_data;
  logic [5:0]  resp_nbits_o;
  logic        resp_overflow_o;
  logic [15:0] temp_i    [N_TM];
  logic [9:0]  tm_data_o [N_TM];
  logic [10:0] tdr_scn_o [N_TM];
  logic [2:0]  tm_en_o, tm_valid_o, sib_open_o;
  scan_ctrl_t  ir_o;
  logic        ir_so_i = 1'b0, tms_2_o, tdi_2_o;
  tap_state_e  tap_state_o;
  int          checks = 0, failures = 0;

  // mechanism counters
  int n_onchip = 0, n_offchip = 0, n_mode = 0, n_sib_open = 0, n_sib_close = 0;
  int n_conv = 0, n_reload = 0, n_restart = 0;

  ijtag_system_top dut (.*);
  always #5 tck = ~tck;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  function automatic int expected(int t);
    real x, v;
    int  c;
    x = t / 100.0 * TC_HI;
    v = VS * GAIN * (x / (2.0 + x));
    c = int'($floor(v / VREF * 1024.0));
    return (c > 1023) ? 1023 : c;
  endfunction

  // monitor events: conversion latency and SIB changes
  int          en_cyc [N_TM];
  int          cyc = 0;
  logic [2:0]  sib_q = '0, en_q = '0, valid_q = '0;
  always @(posedge tck) begin
    cyc <= cyc + 1;
    sib_q <= sib_open_o; en_q <= tm_en_o; valid_q <= tm_valid_o;
    if (rst_n && cyc > 2) for (int k = 0; k < N_TM; k++) begin
      if (sib_open_o[k] && !sib_q[k]) n_sib_open++;
      if (!sib_open_o[k] && sib_q[k]) n_sib_close++;
      if (tm_en_o[k] && !en_q[k]) en_cyc[k] = cyc;
      if (tm_valid_o[k] && !valid_q[k]) begin
        n_conv++;
        check(cyc - en_cyc[k] == 11, $sformatf("monitor %0d converted in %0d cycles", k, cyc - en_cyc[k]));
      end
    end
  end
  logic te_q = 1'b0;
  always @(posedge tck) begin te_q <= test_en; if (te_q != test_en) n_mode++; end

  initial begin
    #5000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // follow one ONchip run; returns the bits seen on tdo in the last scan
  task automatic onchip_run(int tm, output logic [13:0] last);
    int nsh;
    logic [9:0] r;
    logic en_seen;
    en_seen = 1'b0;
    nsh = 0;
    last = '0;
    while (!done_o) begin
      @(negedge tck);
      if (tm_en_o[tm] && !en_seen) begin
        en_seen = 1'b1;
        check(tdr_scn_o[tm] == 11'b100_0000_0000, "enable word 10000000000 in the TDR shift part");
      end
      if (tap_state_o == SHIFT_DR && nsh == 17)
        check(tdr_scn_o[tm] == {1'b0, 10'(expected(int'(temp_i[tm])))}, "reading captured into the TDR");
      if (tap_state_o == SHIFT_DR) begin
        if (nsh >= 17) last[nsh-17] = tdo;
        nsh++;
      end
    end
    check(en_seen, "monitor was enabled during the run");
    check(nsh == 31, $sformatf("31 shift cycles in a run (%0d)", nsh));
    check(last[10 + (N_TM - 1 - tm)] == 1'b0, "TDR control bit captured as 0");
    r = last[(N_TM - 1 - tm) +: 10];
    check(int'(r) == expected(int'(temp_i[tm])),
          $sformatf("monitor %0d reading on TDO %b want %b", tm, r, 10'(expected(int'(temp_i[tm])))));
    // response memory: reading starts at bit 17 + offset
    check(int'(resp_nbits_o) == 31, "31 bits in the response memory");
    begin
      logic [31:0] m;
      for (int w = 0; w < 4; w++) begin resp_rd_addr = 2'(w); #1; m[w*8 +: 8] = resp_rd_data; end
      check(int'(m[LAST_SCAN_START + read_offset(tm) +: 10]) == expected(int'(temp_i[tm])),
            "reading in the response memory");
    end
    check(sib_open_o == '0 && tm_en_o == '0, "monitor off and SIBs closed after the run");
    n_onchip++;
  endtask

  task automatic pin(bit m, bit d);
    @(negedge tck) tms = m; tdi = d;
  endtask

  // OFFchip DR scan from Run-Test/Idle; din[0] shifted first
  task automatic pin_scan(int n, logic [15:0] din, output logic [15:0] dout);
    pin(1, 0); pin(0, 0); pin(0, 0);           // -> Select, Capture, Shift
    for (int k = 0; k < n; k++) begin
      @(negedge tck) tms = (k == n - 1); tdi = din[k];
      #1 dout[k] = tdo;
    end
    pin(1, 0); pin(0, 0);                       // -> Update -> RTI
    @(negedge tck);                             // let the update edge pass
  endtask

  initial begin
    logic [13:0] last;
    logic [15:0] d;
    logic [VEC_LEN-1:0] vt, vd;
    temp_i[0] = 16'd11769;   // reading 1111001111
    temp_i[1] = 16'd5000;
    temp_i[2] = 16'd9000;
    #12 rst_n = 1'b1;
    // ---- 1. ONchip run on monitor 0 ----
    @(negedge tck) test_en = 1'b1;
    onchip_run(0, last);
    check(last[11:2] == 10'b1111001111, "TDO shows 1111001111");
    // ---- 2. OFFchip access to monitor 1 ----
    @(negedge tck) test_en = 1'b0;
    repeat (5) pin(1, 0);
    pin(0, 0);
    pin_scan(3, 16'b010, d);                     // open SIB-1
    check(sib_open_o == 3'b010, "OFFchip: SIB-1 open");
    d = '0; d[11] = 1'b1; d[12] = 1'b1;          // SIB2, TDR1[0..10], SIB1, SIB0
    pin_scan(14, d, d);
    check(tm_en_o == 3'b010, "OFFchip: monitor 1 enabled");
    repeat (15) pin(0, 0);
    pin_scan(14, 16'b0, d);
    check(int'(d[10:1]) == expected(int'(temp_i[1])), $sformatf("OFFchip: monitor 1 reading %0d", d[10:1]));
    check(sib_open_o == '0 && tm_en_o == '0, "OFFchip: closed again");
    n_offchip++;
    // ---- 3. reload vectors for monitor 2, rerun with start_i ----
    vt = build_vector(2, 1'b0);
    vd = build_vector(2, 1'b1);
    for (int w = 0; w < 10; w++) begin
      @(negedge tck) vec_wr_en = 1'b1; vec_wr_sel = 1'b0; vec_wr_addr = 4'(w);
      vec_wr_data = 8'((80)'(vt) >> (8 * w));
      @(negedge tck) vec_wr_sel = 1'b1; vec_wr_data = 8'((80)'(vd) >> (8 * w));
    end
    @(negedge tck) vec_wr_en = 1'b0;
    n_reload++;
    @(negedge tck) test_en = 1'b1;
    onchip_run(2, last);
    @(negedge tck) start_i = 1'b1;
    @(negedge tck) start_i = 1'b0;
    temp_i[2] = 16'd1234;
    n_restart++;
    onchip_run(2, last);
    // mechanisms
    check(n_onchip >= 1, "ONchip run happened");
    check(n_offchip >= 1, "OFFchip access happened");
    check(n_mode >= 2, "mode switches happened");
    check(n_sib_open >= 3 && n_sib_close >= 3, "SIBs opened and closed");
    check(n_conv >= 4, "monitor conversions happened");
    check(n_reload >= 1 && n_restart >= 1, "reload and restart happened");
    $display("mechanisms: onchip=%0d offchip=%0d mode=%0d sib_open=%0d sib_close=%0d conv=%0d reload=%0d restart=%0d",
             n_onchip, n_offchip, n_mode, n_sib_open, n_sib_close, n_conv, n_reload, n_restart);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
