// ijtag_pkg: types, sizes and vector-building functions shared by the
// on-chip IEEE 1687 (IJTAG) temperature-monitor access system.
//
// The system stores the TMS and TDI bit streams that operate the scan
// network in on-chip memories and plays them into a standard TAP, so a
// temperature reading can be taken in the field without an external PC.
// The sizes here follow the described case study: three temperature
// monitors, each behind one segment insertion bit (SIB) and one 11-bit
// test data register (TDR), a 10-bit SAR ADC per monitor and a 79-bit
// TMS vector. The encoding of the TAP states, the memory word width and the
// exact order of TAP moves inside the 79-bit vector are this design's own
// choices.
package ijtag_pkg;

  // ---- case-study sizes -------------------------------------------------
  localparam int unsigned N_TM      = 3;   // temperature monitors / SIBs
  localparam int unsigned ADC_BITS  = 10;  // SAR ADC resolution
  localparam int unsigned TDR_W     = 11;  // 1 control bit + 10 data bits
  localparam int unsigned VEC_LEN   = 79;  // TMS/TDI vector length in bits
  localparam int unsigned MEM_WORD  = 8;   // memory word width (own choice)
  localparam int unsigned RESP_BITS = 32;  // response-memory capacity (own choice)

  // ---- TAP controller states (IEEE 1149.1 state diagram) ---------------
  typedef enum logic [3:0] {
    TLR        = 4'd0,   // Test-Logic-Reset
    RTI        = 4'd1,   // Run-Test/Idle
    SEL_DR     = 4'd2,
    CAPTURE_DR = 4'd3,
    SHIFT_DR   = 4'd4,
    EXIT1_DR   = 4'd5,
    PAUSE_DR   = 4'd6,
    EXIT2_DR   = 4'd7,
    UPDATE_DR  = 4'd8,
    SEL_IR     = 4'd9,
    CAPTURE_IR = 4'd10,
    SHIFT_IR   = 4'd11,
    EXIT1_IR   = 4'd12,
    PAUSE_IR   = 4'd13,
    EXIT2_IR   = 4'd14,
    UPDATE_IR  = 4'd15
  } tap_state_e;

  // IJTAG scan-control bundle that the TAP hands to the network and that a
  // SIB passes on to its sub-segment (SelectEn, CaptureEn, ShiftEn,
  // UpdateEn, reset). The serial data and the clock travel separately.
  typedef struct packed {
    logic sel;
    logic ce;
    logic se;
    logic ue;
    logic rst;
  } scan_ctrl_t;

  // ---- default vector programme -----------------------------------------
  // The vector built below accesses, enables and reads one monitor:
  //   5 x TMS=1                    TAP to Test-Logic-Reset
  //   1 x TMS=0                    to Run-Test/Idle
  //   DR scan of  N_TM bits        open the SIB of monitor `tm`
  //   DR scan of  N_TM+TDR_W bits  set the enable bit of its TDR
  //   IDLE_CYC x TMS=0             wait in Run-Test/Idle for the ADC
  //   DR scan of  N_TM+TDR_W bits  capture and shift out the reading,
  //                                shifting in zeros (monitor off, SIB shut)
  // A DR scan of n bits from Run-Test/Idle back to Run-Test/Idle costs
  // n + 5 TMS bits, so the total is 5+1+(3+5)+(14+5)+IDLE_CYC+(14+5) = 79
  // with IDLE_CYC = 27.
  localparam int unsigned IDLE_CYC = VEC_LEN - (6 + (N_TM + 5) + 2 * (N_TM + TDR_W + 5));

  // Position (counted from the first bit shifted in) of the reading's LSB
  // in the bits that leave the network during the last scan: the SIBs
  // behind monitor `tm` come first.
  function automatic int unsigned read_offset(int unsigned tm);
    return N_TM - 1 - tm;
  endfunction

  // Bits that leave the network during one run of the default programme,
  // before the last scan: used to locate the reading in the response memory.
  localparam int unsigned LAST_SCAN_START = N_TM + (N_TM + TDR_W);

  // Build the TMS (sel_tdi = 0) or TDI (sel_tdi = 1) stream for monitor `tm`.
  // Bit i of the result is applied at clock i.
  function automatic logic [VEC_LEN-1:0] build_vector(int unsigned tm, bit sel_tdi);
    logic [VEC_LEN-1:0] tms, tdi;
    int unsigned p;
    int unsigned n2;
    logic [N_TM+TDR_W-1:0] d2;
    tms = '0;
    tdi = '0;
    p   = 0;
    for (int i = 0; i < 5; i++) begin tms[p] = 1'b1; p++; end
    p++;                                   // TMS=0: to Run-Test/Idle
    // scan 1: chain is SIB[0]..SIB[N_TM-1]; first bit in ends in the last SIB
    tms[p] = 1'b1; p += 3;                 // RTI->SelDR, ->Capture, ->Shift
    for (int unsigned k = 0; k < N_TM; k++) begin
      tdi[p] = (N_TM - 1 - k == tm);
      if (k == N_TM - 1) tms[p] = 1'b1;    // last shift bit exits Shift-DR
      p++;
    end
    tms[p] = 1'b1; p++;                    // Exit1 -> Update
    p++;                                   // Update -> RTI
    // scan 2: SIB[tm] open, its TDR inside. Bits in shift order:
    //   SIBs after tm (far end first), TDR bit 0..TDR_W-1, SIB[tm], SIBs before tm
    n2 = N_TM + TDR_W;
    d2 = '0;
    d2[(N_TM - 1 - tm) + TDR_W - 1] = 1'b1;   // TDR enable bit (MSB)
    d2[(N_TM - 1 - tm) + TDR_W]     = 1'b1;   // keep SIB[tm] open
    tms[p] = 1'b1; p += 3;
    for (int unsigned k = 0; k < n2; k++) begin
      tdi[p] = d2[k];
      if (k == n2 - 1) tms[p] = 1'b1;
      p++;
    end
    tms[p] = 1'b1; p++;
    p++;
    p += IDLE_CYC;                         // conversion time in Run-Test/Idle
    // scan 3: read out, shift in zeros
    tms[p] = 1'b1; p += 3;
    for (int unsigned k = 0; k < n2; k++) begin
      if (k == n2 - 1) tms[p] = 1'b1;
      p++;
    end
    tms[p] = 1'b1; p++;
    p++;
    return sel_tdi ? tdi : tms;
  endfunction

endpackage
