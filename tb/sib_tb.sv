// sib_tb: self-checking test of the post-multiplexer segment insertion bit.
// Checks the closed/open routing of SO, the gating of SelectEn towards the
// sub-segment, shift, capture (reads back the update cell), update, the
// synchronous RST and the asynchronous reset. A random phase compares the
// SIB against a two-variable reference model.
module sib_tb;
  import ijtag_pkg::*;

  logic       tck = 1'b0, rst_n = 1'b0, si = 1'b0, from_so = 1'b0;
  scan_ctrl_t ctl_i = '0, to_ctl_o;
  logic       so, to_si, open_o;
  int         checks = 0, failures = 0;
  bit         m_cs, m_u;

  sib dut (.*);
  always #5 tck = ~tck;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  task automatic clk1(scan_ctrl_t c, bit d);
    ctl_i = c; si = d;
    @(posedge tck);
    if (c.rst) begin m_cs = 0; m_u = 0; end
    else if (c.sel) begin
      bit cs_old = m_cs;
      if (c.ce) m_cs = m_u; else if (c.se) m_cs = d;
      if (c.ue) m_u = cs_old;
    end
    #1;
  endtask

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    m_cs = 0; m_u = 0;
    #12 rst_n = 1'b1;
    check(open_o == 0, "closed after reset");
    from_so = 1'b1; #1;
    check(so == to_si, "closed: SO is the SIB bit");
    check(to_ctl_o.sel == 0, "closed: sub-segment not selected");
    // shift a 1 in, update -> open
    clk1('{sel:1, ce:0, se:1, ue:0, rst:0}, 1'b1);
    check(to_si == 1 && so == 1 && open_o == 0, "shifted 1 into SIB bit");
    clk1('{sel:0, ce:0, se:1, ue:0, rst:0}, 1'b0);
    check(to_si == 1, "no shift without SEL");
    clk1('{sel:1, ce:0, se:0, ue:1, rst:0}, 1'b0);
    check(open_o == 1, "open after update");
    ctl_i = '{sel:1, ce:0, se:0, ue:0, rst:0};
    from_so = 1'b0; #1;
    check(so == 0 && to_si == 1, "open: SO is fromSO (0)");
    from_so = 1'b1; #1;
    check(so == 1, "open: SO is fromSO (1)");
    check(to_ctl_o.sel == 1, "open: sub-segment selected");
    // capture reads back U: first clear CS
    clk1('{sel:1, ce:0, se:1, ue:0, rst:0}, 1'b0);
    check(to_si == 0, "CS cleared by shift");
    clk1('{sel:1, ce:1, se:0, ue:0, rst:0}, 1'b0);
    check(to_si == 1, "capture loads update cell value");
    // synchronous RST
    clk1('{sel:0, ce:0, se:0, ue:0, rst:1}, 1'b0);
    check(open_o == 0 && to_si == 0, "RST closes the SIB");
    // random against model
    repeat (2000) begin
      scan_ctrl_t c;
      c = scan_ctrl_t'($urandom);
      c.rst = ($urandom_range(0, 15) == 0);
      from_so = 1'($urandom);
      clk1(c, 1'($urandom));
      check(to_si == m_cs && open_o == m_u, "random: cells");
      check(so == (m_u ? from_so : m_cs), "random: SO");
      check(to_ctl_o.sel == (ctl_i.sel & m_u) && to_ctl_o.se == ctl_i.se &&
            to_ctl_o.ce == ctl_i.ce && to_ctl_o.ue == ctl_i.ue && to_ctl_o.rst == ctl_i.rst,
            "random: controls to sub-segment");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
