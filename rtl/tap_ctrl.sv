// tap_ctrl: IEEE 1149.1 TAP controller that drives an IEEE 1687 scan network.
//
// The 16-state TAP state machine advances on every rising clock edge under
// the TMS input. From its state it decodes the IJTAG control signals for
// the data-register (DR) side and the instruction-register (IR) side:
// SelectEn is high in every state of the corresponding scan column from
// Capture to Update, CaptureEn, ShiftEn and UpdateEn are high in the
// Capture, Shift and Update states. A register in the network acts on the
// rising edge at which its enable is high, so all scan activity is on one
// clock edge (this design's choice: the standard updates on the falling
// edge; using one edge lets the network run from the system clock). RST
// is high in Test-Logic-Reset and resets the network.
//
// Serial data: di_o (the network's scan input) is the TDI bit; so_o is
// the network's scan output do_i during Shift-DR, and the IR scan output
// ir_so_i during Shift-IR. The instruction register itself is not part of
// this design; its enables are brought out.
//
// trst_n is an asynchronous reset to Test-Logic-Reset.
module tap_ctrl
  import ijtag_pkg::*;
(
  input  logic       tck,
  input  logic       trst_n,
  input  logic       tms,
  input  logic       si,        // serial data into the TAP (TDI)
  output logic       so_o,      // serial data out of the TAP (towards TDO)
  // network (DR) side
  output logic       di_o,      // to the network's scan input
  input  logic       do_i,      // from the network's scan output
  output scan_ctrl_t dr_o,      // SelectEn/CaptureEn/ShiftEn/UpdateEn-DR, RST
  // instruction register side
  output scan_ctrl_t ir_o,
  input  logic       ir_so_i,
  output tap_state_e state_o
);

  tap_state_e state, nxt;

  always_comb begin
    unique case (state)
      TLR:        nxt = tms ? TLR       : RTI;
      RTI:        nxt = tms ? SEL_DR    : RTI;
      SEL_DR:     nxt = tms ? SEL_IR    : CAPTURE_DR;
      CAPTURE_DR: nxt = tms ? EXIT1_DR  : SHIFT_DR;
      SHIFT_DR:   nxt = tms ? EXIT1_DR  : SHIFT_DR;
      EXIT1_DR:   nxt = tms ? UPDATE_DR : PAUSE_DR;
      PAUSE_DR:   nxt = tms ? EXIT2_DR  : PAUSE_DR;
      EXIT2_DR:   nxt = tms ? UPDATE_DR : SHIFT_DR;
      UPDATE_DR:  nxt = tms ? SEL_DR    : RTI;
      SEL_IR:     nxt = tms ? TLR       : CAPTURE_IR;
      CAPTURE_IR: nxt = tms ? EXIT1_IR  : SHIFT_IR;
      SHIFT_IR:   nxt = tms ? EXIT1_IR  : SHIFT_IR;
      EXIT1_IR:   nxt = tms ? UPDATE_IR : PAUSE_IR;
      PAUSE_IR:   nxt = tms ? EXIT2_IR  : PAUSE_IR;
      EXIT2_IR:   nxt = tms ? UPDATE_IR : SHIFT_IR;
      UPDATE_IR:  nxt = tms ? SEL_DR    : RTI;
      default:    nxt = TLR;
    endcase
  end

  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n) state <= TLR;
    else         state <= nxt;
  end

  always_comb begin
    dr_o.sel = state inside {CAPTURE_DR, SHIFT_DR, EXIT1_DR, PAUSE_DR, EXIT2_DR, UPDATE_DR};
    dr_o.ce  = (state == CAPTURE_DR);
    dr_o.se  = (state == SHIFT_DR);
    dr_o.ue  = (state == UPDATE_DR);
    dr_o.rst = (state == TLR);
    ir_o.sel = state inside {CAPTURE_IR, SHIFT_IR, EXIT1_IR, PAUSE_IR, EXIT2_IR, UPDATE_IR};
    ir_o.ce  = (state == CAPTURE_IR);
    ir_o.se  = (state == SHIFT_IR);
    ir_o.ue  = (state == UPDATE_IR);
    ir_o.rst = (state == TLR);
  end

  // At most one capture/shift/update enable is active in any state.
  a_one_enable: assert property (@(posedge tck) disable iff (!trst_n)
    $onehot0({dr_o.ce, dr_o.se, dr_o.ue, ir_o.ce, ir_o.se, ir_o.ue}));

  assign di_o    = si;
  assign so_o    = (state == SHIFT_IR) ? ir_so_i : do_i;
  assign state_o = state;

endmodule
