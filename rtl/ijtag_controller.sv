// ijtag_controller: IJTAG controller that can operate the scan network
// either from outside (OFFchip mode) or from its own memories (ONchip mode).
//
// Parts: MEMORY-3 (vec_mem) holds the TMS stream, MEMORY-2 (vec_mem) the
// TDI stream, MEMORY-1 (resp_mem) collects the bits returned by the
// network; the control logic (ctrl_logic) plays the streams; two
// multiplexers selected by test_en feed the TAP (tap_ctrl):
//   test_en = 0 (OFFchip): TAP TMS = tms pin (TMS_1), TAP TDI = tdi pin (TDI_1)
//   test_en = 1 (ONchip) : TAP TMS = MEMORY-3 bit (TMS_2), TAP TDI = MEMORY-2 bit (TDI_2)
// TDO always shows the TAP's serial output.
//
// Timing: one vector bit per rising tck edge. In ONchip mode a run starts on
// the rising edge of test_en or on a start_i pulse; it takes LEN + 3 cycles
// from the start condition to done_o (start, load, LEN bits, flush). The
// default programme (from ijtag_pkg::build_vector) opens SIB-0, enables
// temperature monitor 0, waits for its conversion and reads it out;
// software reads the result from MEMORY-1 through resp_rd_addr/resp_rd_data.
// The write port (vec_wr_*) reloads either vector memory (vec_wr_sel = 0:
// TMS, 1: TDI). tck is the system clock; rst_n resets everything and also
// acts as TRST. The word width, capacities and ports are this design's choices.
module ijtag_controller
  import ijtag_pkg::*;
#(
  parameter int unsigned    LEN       = VEC_LEN,
  parameter int unsigned    WORD      = MEM_WORD,
  parameter int unsigned    RESP      = RESP_BITS,
  parameter logic [LEN-1:0] TMS_INIT  = build_vector(0, 1'b0),
  parameter logic [LEN-1:0] TDI_INIT  = build_vector(0, 1'b1),
  localparam int unsigned   VAW       = ((LEN + WORD - 1) / WORD > 1) ? $clog2((LEN + WORD - 1) / WORD) : 1,
  localparam int unsigned   RAW       = ((RESP + WORD - 1) / WORD > 1) ? $clog2((RESP + WORD - 1) / WORD) : 1
) (
  input  logic                      tck,
  input  logic                      rst_n,
  // external test port
  input  logic                      tdi,
  input  logic                      tms,
  input  logic                      test_en,
  output logic                      tdo,
  // on-chip run control
  input  logic                      start_i,
  output logic                      busy_o,
  output logic                      done_o,
  // vector memory load port
  input  logic                      vec_wr_en,
  input  logic                      vec_wr_sel,
  input  logic [VAW-1:0]            vec_wr_addr,
  input  logic [WORD-1:0]           vec_wr_data,
  // response memory read port
  input  logic [RAW-1:0]            resp_rd_addr,
  output logic [WORD-1:0]           resp_rd_data,
  output logic [$clog2(RESP+1)-1:0] resp_nbits_o,
  output logic                      resp_overflow_o,
  // network side
  output logic                      di_o,
  input  logic                      do_i,
  output scan_ctrl_t                dr_o,
  output scan_ctrl_t                ir_o,
  input  logic                      ir_so_i,
  output tap_state_e                tap_state_o,
  output logic                      tms_2_o,
  output logic                      tdi_2_o
);

  logic mem_start, mem_adv, playing, resp_clr, resp_shift, resp_flush;
  logic tms_mem, tdi_mem, tms_2, tdi_2, tms_tap, tdi_tap;

  ctrl_logic #(.LEN(LEN)) u_ctrl (
    .clk         (tck),
    .rst_n       (rst_n),
    .test_en     (test_en),
    .start_i     (start_i),
    .shift_dr_i  (dr_o.se),
    .mem_start_o (mem_start),
    .mem_adv_o   (mem_adv),
    .playing_o   (playing),
    .resp_clr_o  (resp_clr),
    .resp_shift_o(resp_shift),
    .resp_flush_o(resp_flush),
    .busy_o      (busy_o),
    .done_o      (done_o)
  );

  // MEMORY-3: TMS vectors
  vec_mem #(.LEN(LEN), .WORD(WORD), .INIT(TMS_INIT)) u_mem3 (
    .clk    (tck),
    .rst_n  (rst_n),
    .wr_en  (vec_wr_en && !vec_wr_sel),
    .wr_addr(vec_wr_addr),
    .wr_data(vec_wr_data),
    .start_i(mem_start),
    .adv_i  (mem_adv),
    .bit_o  (tms_mem)
  );

  // MEMORY-2: TDI vectors
  vec_mem #(.LEN(LEN), .WORD(WORD), .INIT(TDI_INIT)) u_mem2 (
    .clk    (tck),
    .rst_n  (rst_n),
    .wr_en  (vec_wr_en && vec_wr_sel),
    .wr_addr(vec_wr_addr),
    .wr_data(vec_wr_data),
    .start_i(mem_start),
    .adv_i  (mem_adv),
    .bit_o  (tdi_mem)
  );

  // MEMORY-1: responses
  resp_mem #(.BITS(RESP), .WORD(WORD)) u_mem1 (
    .clk       (tck),
    .rst_n     (rst_n),
    .clr_i     (resp_clr),
    .shift_i   (resp_shift),
    .bit_i     (do_i),
    .flush_i   (resp_flush),
    .rd_addr   (resp_rd_addr),
    .rd_data   (resp_rd_data),
    .nbits_o   (resp_nbits_o),
    .overflow_o(resp_overflow_o)
  );

  assign tms_2   = playing && tms_mem;
  assign tdi_2   = playing && tdi_mem;
  assign tms_tap = test_en ? tms_2 : tms;
  assign tdi_tap = test_en ? tdi_2 : tdi;

  tap_ctrl u_tap (
    .tck    (tck),
    .trst_n (rst_n),
    .tms    (tms_tap),
    .si     (tdi_tap),
    .so_o   (tdo),
    .di_o   (di_o),
    .do_i   (do_i),
    .dr_o   (dr_o),
    .ir_o   (ir_o),
    .ir_so_i(ir_so_i),
    .state_o(tap_state_o)
  );

  assign tms_2_o = tms_2;
  assign tdi_2_o = tdi_2;

endmodule
