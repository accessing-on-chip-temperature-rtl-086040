// ijtag_system_top: on-chip access to three temperature health monitors
// through an IEEE 1687 (IJTAG) network.
//
// The IJTAG controller (TAP, vector memories, response memory, control
// logic, mode multiplexers) drives a network of three SIBs, each gating an
// 11-bit TDR, and each TDR is the parallel interface of one temperature
// monitor:
//   TDR-k bit 10 (update part)  -> monitor k enable (EN)
//   {1'b0, monitor k reading}   -> TDR-k capture input
// In OFFchip mode (test_en = 0) the pins tms/tdi/tdo operate the network as
// a normal JTAG port. In ONchip mode (test_en = 1) the controller plays the
// stored 79-bit programme, which opens SIB-0, sets the enable bit in TDR-0,
// waits for monitor 0's 11-cycle conversion, captures and shifts the
// reading out (it appears on tdo and in the response memory), and finally
// turns the monitor off and closes the SIB.
//
// All logic runs from one clock, tck, which is the system clock (the
// monitors' ADC clock included). rst_n is an asynchronous active-low reset.
// The instruction register is not part of this design: the TAP's IR
// enables are outputs and its serial return is the input ir_so_i.
// temp_i[k] is the temperature rise seen by monitor k, in 0.01 K units; it
// feeds the behavioural model of the monitors' analog front end.
module ijtag_system_top
  import ijtag_pkg::*;
#(
  parameter int unsigned  N    = N_TM,
  parameter int unsigned  LEN  = VEC_LEN,
  parameter int unsigned  WORD = MEM_WORD,
  parameter int unsigned  RESP = RESP_BITS,
  localparam int unsigned W    = TDR_W,
  localparam int unsigned VAW  = ((LEN + WORD - 1) / WORD > 1) ? $clog2((LEN + WORD - 1) / WORD) : 1,
  localparam int unsigned RAW  = ((RESP + WORD - 1) / WORD > 1) ? $clog2((RESP + WORD - 1) / WORD) : 1
) (
  input  logic                      tck,
  input  logic                      rst_n,
  input  logic                      tdi,
  input  logic                      tms,
  input  logic                      test_en,
  output logic                      tdo,
  input  logic                      start_i,
  output logic                      busy_o,
  output logic                      done_o,
  input  logic                      vec_wr_en,
  input  logic                      vec_wr_sel,
  input  logic [VAW-1:0]            vec_wr_addr,
  input  logic [WORD-1:0]           vec_wr_data,
  input  logic [RAW-1:0]            resp_rd_addr,
  output logic [WORD-1:0]           resp_rd_data,
  output logic [$clog2(RESP+1)-1:0] resp_nbits_o,
  output logic                      resp_overflow_o,
  input  logic [15:0]               temp_i     [N],
  output logic [ADC_BITS-1:0]       tm_data_o  [N],
  output logic [N-1:0]              tm_en_o,
  output logic [N-1:0]              tm_valid_o,
  output logic [N-1:0]              sib_open_o,
  output logic [TDR_W-1:0]          tdr_scn_o  [N],
  output scan_ctrl_t                ir_o,
  input  logic                      ir_so_i,
  output tap_state_e                tap_state_o,
  output logic                      tms_2_o,
  output logic                      tdi_2_o
);

  logic           di, dout;
  scan_ctrl_t     dr;
  logic [W-1:0]   inst_di [N];
  logic [W-1:0]   inst_do [N];

  ijtag_controller #(.LEN(LEN), .WORD(WORD), .RESP(RESP)) u_ctrl (
    .tck            (tck),
    .rst_n          (rst_n),
    .tdi            (tdi),
    .tms            (tms),
    .test_en        (test_en),
    .tdo            (tdo),
    .start_i        (start_i),
    .busy_o         (busy_o),
    .done_o         (done_o),
    .vec_wr_en      (vec_wr_en),
    .vec_wr_sel     (vec_wr_sel),
    .vec_wr_addr    (vec_wr_addr),
    .vec_wr_data    (vec_wr_data),
    .resp_rd_addr   (resp_rd_addr),
    .resp_rd_data   (resp_rd_data),
    .resp_nbits_o   (resp_nbits_o),
    .resp_overflow_o(resp_overflow_o),
    .di_o           (di),
    .do_i           (dout),
    .dr_o           (dr),
    .ir_o           (ir_o),
    .ir_so_i        (ir_so_i),
    .tap_state_o    (tap_state_o),
    .tms_2_o        (tms_2_o),
    .tdi_2_o        (tdi_2_o)
  );

  ijtag_network #(.N(N), .W(W)) u_net (
    .tck       (tck),
    .rst_n     (rst_n),
    .si        (di),
    .ctl_i     (dr),
    .so        (dout),
    .inst_di_i (inst_di),
    .inst_do_o (inst_do),
    .scn_o     (tdr_scn_o),
    .sib_open_o(sib_open_o)
  );

  for (genvar k = 0; k < N; k++) begin : g_tm
    assign tm_en_o[k] = inst_do[k][W-1];
    assign inst_di[k] = {1'b0, tm_data_o[k]};

    temp_monitor #(.N(ADC_BITS)) u_tm (
      .clk    (tck),
      .rst_n  (rst_n),
      .en     (tm_en_o[k]),
      .temp_i (temp_i[k]),
      .data_o (tm_data_o[k]),
      .valid_o(tm_valid_o[k])
    );
  end

endmodule
