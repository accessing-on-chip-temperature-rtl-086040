// sib: segment insertion bit with the multiplexer after the sub-segment
// (the "SIB_mux_post" form of IEEE 1687).
//
// A one-bit shift/capture cell (CS) sits in the scan path between SI and the
// sub-segment's scan input toSI. Its update cell (U) decides the SIB's
// state: U = 0 (closed) makes SO the CS bit, so the sub-segment is
// bypassed; U = 1 (open) makes SO the sub-segment's return fromSO, so the
// sub-segment is spliced into the chain after the SIB bit. toSEL is SEL
// gated by U, so a closed segment neither captures, shifts nor updates;
// CaptureEn, ShiftEn, UpdateEn, reset and clock are passed on unchanged.
//
// Timing: on a rising tck edge with SEL high, CE loads CS from U (this
// design's choice of capture value: it reads back the SIB state), SE shifts
// SI into CS, UE copies CS into U. RST (synchronous, from the TAP's
// Test-Logic-Reset) and the asynchronous rst_n clear both cells, closing
// the SIB.
module sib
  import ijtag_pkg::*;
(
  input  logic       tck,
  input  logic       rst_n,
  input  logic       si,
  input  scan_ctrl_t ctl_i,     // SEL, CE, SE, UE, RST from the parent
  output logic       so,
  // sub-segment side
  output logic       to_si,
  output scan_ctrl_t to_ctl_o,
  input  logic       from_so,
  output logic       open_o     // state of the update cell
);

  logic cs_q, u_q;

  always_ff @(posedge tck or negedge rst_n) begin
    if (!rst_n) begin
      cs_q <= 1'b0;
      u_q  <= 1'b0;
    end else if (ctl_i.rst) begin
      cs_q <= 1'b0;
      u_q  <= 1'b0;
    end else if (ctl_i.sel) begin
      if (ctl_i.ce)      cs_q <= u_q;
      else if (ctl_i.se) cs_q <= si;
      if (ctl_i.ue)      u_q  <= cs_q;
    end
  end

  assign to_si        = cs_q;
  assign so           = u_q ? from_so : cs_q;
  assign to_ctl_o.sel = ctl_i.sel & u_q;
  assign to_ctl_o.ce  = ctl_i.ce;
  assign to_ctl_o.se  = ctl_i.se;
  assign to_ctl_o.ue  = ctl_i.ue;
  assign to_ctl_o.rst = ctl_i.rst;
  assign open_o       = u_q;

endmodule
