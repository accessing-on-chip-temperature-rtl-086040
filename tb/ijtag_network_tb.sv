// ijtag_network_tb: self-checking test of the three-SIB scan network,
// driven directly with scan controls (no TAP). It measures the chain
// length for every combination of open SIBs (3 + 11 per open SIB), repeats
// the access sequence of the case study (open SIB-0 with '001', set the
// TDR-0 enable bit, capture and shift out a 10-bit reading, close), and
// checks that a TDR behind a closed SIB neither updates nor captures.
module ijtag_network_tb;
  import ijtag_pkg::*;
  localparam int N = N_TM, W = TDR_W;

  logic         tck = 1'b0, rst_n = 1'b0, si = 1'b0;
  scan_ctrl_t   ctl_i = '0;
  logic         so;
  logic [W-1:0] inst_di_i [N];
  logic [W-1:0] inst_do_o [N];
  logic [W-1:0] scn_o     [N];
  logic [N-1:0] sib_open_o;
  int           checks = 0, failures = 0;

  ijtag_network dut (.*);
  always #5 tck = ~tck;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  // capture, shift n bits (din[0] first), update; dout[k] is the k-th bit out
  task automatic scan(int n, logic [63:0] din, output logic [63:0] dout);
    @(negedge tck) ctl_i = '{sel:1, ce:1, se:0, ue:0, rst:0};
    for (int k = 0; k < n; k++) begin
      @(negedge tck) ctl_i = '{sel:1, ce:0, se:1, ue:0, rst:0}; si = din[k];
      #1 dout[k] = so;
    end
    @(negedge tck) ctl_i = '{sel:1, ce:0, se:0, ue:1, rst:0}; si = 1'b0;
    @(negedge tck) ctl_i = '0;
  endtask

  // chain length: flush with zeros, then push a single one and count
  task automatic length(output int len);
    ctl_i = '{sel:1, ce:0, se:1, ue:0, rst:0};
    si = 1'b0;
    repeat (40) @(negedge tck);
    si = 1'b1;
    @(negedge tck) si = 1'b0;
    len = 1;
    while (!so && len < 60) begin @(negedge tck); len++; end
    ctl_i = '0;
  endtask

  initial begin
    #1000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [63:0] d;
    int len, nopen;
    for (int k = 0; k < N; k++) inst_di_i[k] = '0;
    #12 rst_n = 1'b1;
    check(sib_open_o == '0, "all SIBs closed after reset");
    // chain length for every SIB configuration
    for (int m = 0; m < 8; m++) begin
      // reset the network, then open the SIBs of m in one 3-bit scan
      @(negedge tck) ctl_i = '{sel:0, ce:0, se:0, ue:0, rst:1};
      @(negedge tck) ctl_i = '0;
      scan(3, {61'b0, m[0], m[1], m[2]}, d);
      check(sib_open_o == 3'(m), $sformatf("SIB state %b", m));
      length(len);
      nopen = m[0] + m[1] + m[2];
      check(len == 3 + W * nopen, $sformatf("chain length %0d with SIBs %b", len, m));
    end
    // case-study access of instrument 0
    @(negedge tck) ctl_i = '{sel:0, ce:0, se:0, ue:0, rst:1};
    @(negedge tck) ctl_i = '0;
    scan(3, 64'b100, d);                    // '001' in time order
    check(sib_open_o == 3'b001, "SIB-0 opened by 001");
    // 14 bits: SIB2, SIB1, TDR0[0..10], SIB0
    d = '0; d[12] = 1'b1; d[13] = 1'b1;
    scan(14, d, d);
    check(inst_do_o[0] == 11'b100_0000_0000, "enable bit in TDR-0");
    check(inst_do_o[1] == '0 && inst_do_o[2] == '0, "closed TDRs not updated");
    check(sib_open_o == 3'b001, "SIB-0 still open");
    inst_di_i[0] = {1'b0, 10'b1111001111};
    inst_di_i[1] = 11'h7ff;
    scan(14, 64'b0, d);
    check(d[1:0] == 2'b00, "closed SIB bits first");
    check(d[11:2] == 10'b1111001111, "reading shifted out LSB first");
    check(d[12] == 1'b0 && d[13] == 1'b1, "TDR MSB then SIB-0 state");
    check(inst_do_o[0] == '0 && sib_open_o == '0, "monitor off, SIB closed after update");
    check(scn_o[1] == '0, "TDR-1 behind closed SIB did not capture");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
