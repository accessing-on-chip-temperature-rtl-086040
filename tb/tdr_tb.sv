// tdr_tb: self-checking test of the 11-bit test data register.
// Shifts a word in LSB first, checks it shifts out in the same order,
// that update copies it to the instrument side only with SEL and UE,
// that capture loads the instrument's parallel output, and that RST and
// the asynchronous reset clear both parts.
module tdr_tb;
  import ijtag_pkg::*;
  localparam int W = TDR_W;

  logic         tck = 1'b0, rst_n = 1'b0, si = 1'b0;
  scan_ctrl_t   ctl_i = '0;
  logic         so;
  logic [W-1:0] di_i = '0, do_o, scn_o;
  int           checks = 0, failures = 0;

  tdr dut (.*);
  always #5 tck = ~tck;

  localparam scan_ctrl_t SH  = '{sel:1, ce:0, se:1, ue:0, rst:0};
  localparam scan_ctrl_t CAP = '{sel:1, ce:1, se:0, ue:0, rst:0};
  localparam scan_ctrl_t UPD = '{sel:1, ce:0, se:0, ue:1, rst:0};
  localparam scan_ctrl_t IDL = '{sel:1, ce:0, se:0, ue:0, rst:0};

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  task automatic clk1(scan_ctrl_t c, bit d);
    ctl_i = c; si = d; @(posedge tck); #1;
  endtask

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [W-1:0] w, got, prev;
    #12 rst_n = 1'b1;
    check(do_o == '0 && scn_o == '0, "reset clears");
    repeat (20) begin
      w = W'($urandom);
      for (int i = 0; i < W; i++) clk1(SH, w[i]);
      check(scn_o == w, "shift part after W shifts");
      prev = do_o;
      clk1(IDL, 0);
      clk1('{sel:0, ce:0, se:0, ue:1, rst:0}, 0);
      check(do_o == prev, "no update without SEL");
      clk1(UPD, 0);
      check(do_o == w, "update copies shift part");
      // capture and shift out
      di_i = W'($urandom);
      clk1(CAP, 0);
      check(scn_o == di_i, "capture loads instrument output");
      for (int i = 0; i < W; i++) begin
        got[i] = so;
        clk1(SH, 0);
      end
      check(got == di_i, "shift out LSB first");
      check(do_o == w, "update part holds during shift");
    end
    clk1('{sel:0, ce:0, se:0, ue:0, rst:1}, 0);
    check(do_o == '0 && scn_o == '0, "RST clears");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
