// tdr: instrument test data register with parallel I/O for an IEEE 1687
// network.
//
// The register has a shift part (the scan cells) and an update part that
// drives the instrument's control inputs in parallel. Scan data enters at
// the most significant cell and leaves from cell 0, so a word is shifted in
// and out least significant bit first.
//
// Timing, all on the rising tck edge and only while SEL is high:
//   CE  loads the shift part from the instrument's parallel output di_i,
//   SE  shifts: shift <= {si, shift[W-1:1]},
//   UE  copies the shift part into the update part, do_o.
// RST (synchronous) and the asynchronous rst_n clear both parts, so the
// instrument starts disabled. The width (11 = one enable bit on top of a
// 10-bit reading) follows the case study; the bit order is this design's
// choice.
module tdr
  import ijtag_pkg::*;
#(
  parameter int unsigned W = TDR_W
) (
  input  logic         tck,
  input  logic         rst_n,
  input  logic         si,
  input  scan_ctrl_t   ctl_i,
  output logic         so,
  input  logic [W-1:0] di_i,    // from the instrument (captured)
  output logic [W-1:0] do_o,    // to the instrument (updated)
  output logic [W-1:0] scn_o    // shift part, for observation
);

  logic [W-1:0] sh_q, up_q;

  always_ff @(posedge tck or negedge rst_n) begin
    if (!rst_n) begin
      sh_q <= '0;
      up_q <= '0;
    end else if (ctl_i.rst) begin
      sh_q <= '0;
      up_q <= '0;
    end else if (ctl_i.sel) begin
      if (ctl_i.ce)      sh_q <= di_i;
      else if (ctl_i.se) sh_q <= {si, sh_q[W-1:1]};
      if (ctl_i.ue)      up_q <= sh_q;
    end
  end

  // The TAP never asks for capture and shift in the same cycle.
  a_ce_se: assert property (@(posedge tck) disable iff (!rst_n) !(ctl_i.sel && ctl_i.ce && ctl_i.se));

  assign so    = sh_q[0];
  assign do_o  = up_q;
  assign scn_o = sh_q;

endmodule
