// ijtag_network: the scan network of the case study, a chain of N segment
// insertion bits (the gateway) where SIB-k, when open, splices test data
// register TDR-k into the chain right after its own bit:
//
//   si -> SIB-0 [-> TDR-0] -> SIB-1 [-> TDR-1] -> ... -> SIB-(N-1) [-> TDR-(N-1)] -> so
//
// With every SIB closed the chain is N bits long; each open SIB adds W
// bits. TDR-k's update part drives instrument k's control inputs
// (inst_do_o[k]) and its capture input reads the instrument's outputs
// (inst_di_i[k]). All registers act on the rising tck edge under the scan
// controls of the TAP (ctl_i); see sib and tdr for the cycle behaviour.
module ijtag_network
  import ijtag_pkg::*;
#(
  parameter int unsigned N = N_TM,
  parameter int unsigned W = TDR_W
) (
  input  logic         tck,
  input  logic         rst_n,
  input  logic         si,
  input  scan_ctrl_t   ctl_i,
  output logic         so,
  input  logic [W-1:0] inst_di_i [N],
  output logic [W-1:0] inst_do_o [N],
  output logic [W-1:0] scn_o     [N],
  output logic [N-1:0] sib_open_o
);

  logic       chain  [N+1];
  logic       to_si  [N];
  logic       tdr_so [N];
  scan_ctrl_t to_ctl [N];

  assign chain[0] = si;

  for (genvar k = 0; k < N; k++) begin : g_seg
    sib u_sib (
      .tck     (tck),
      .rst_n   (rst_n),
      .si      (chain[k]),
      .ctl_i   (ctl_i),
      .so      (chain[k+1]),
      .to_si   (to_si[k]),
      .to_ctl_o(to_ctl[k]),
      .from_so (tdr_so[k]),
      .open_o  (sib_open_o[k])
    );

    tdr #(.W(W)) u_tdr (
      .tck  (tck),
      .rst_n(rst_n),
      .si   (to_si[k]),
      .ctl_i(to_ctl[k]),
      .so   (tdr_so[k]),
      .di_i (inst_di_i[k]),
      .do_o (inst_do_o[k]),
      .scn_o(scn_o[k])
    );
  end

  assign so = chain[N];

endmodule
