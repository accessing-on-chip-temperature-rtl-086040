// ctrl_logic: control logic of the IJTAG controller, the small state machine
// that executes the stored vectors in the field.
//
// In ONchip mode (test_en high) a run starts when test_en rises, and again
// on every start_i pulse while test_en stays high and no run is going on.
// A run first restarts both vector memories (mem_start_o) and empties the
// response memory (resp_clr_o), then plays LEN vector bits, one per clock:
// playing_o is high for exactly LEN cycles and mem_adv_o steps the
// memories. During those cycles every bit the TAP shifts out of the network
// (shift_dr_i high) is logged into the response memory (resp_shift_o).
// After the last bit the partial response word is flushed and done_o pulses
// for one cycle. Dropping test_en aborts a run. Outside a run playing_o is
// low, and the controller then drives TMS low, parking the TAP in
// Run-Test/Idle. Start conditions and abort are this design's choices.
module ctrl_logic #(
  parameter int unsigned LEN = 79
) (
  input  logic clk,
  input  logic rst_n,
  input  logic test_en,
  input  logic start_i,
  input  logic shift_dr_i,
  output logic mem_start_o,
  output logic mem_adv_o,
  output logic playing_o,
  output logic resp_clr_o,
  output logic resp_shift_o,
  output logic resp_flush_o,
  output logic busy_o,
  output logic done_o
);

  typedef enum logic [1:0] {C_IDLE, C_LOAD, C_RUN, C_FLUSH} ctl_state_e;

  ctl_state_e                 state;
  logic                       test_en_q;
  logic [$clog2(LEN+1)-1:0]   cnt_q;
  logic                       go;

  assign go = test_en && (!test_en_q || start_i);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= C_IDLE;
      test_en_q <= 1'b0;
      cnt_q     <= '0;
      done_o    <= 1'b0;
    end else begin
      test_en_q <= test_en;
      done_o    <= 1'b0;
      if (!test_en) begin
        state <= C_IDLE;
      end else begin
        unique case (state)
          C_IDLE: if (go) state <= C_LOAD;
          C_LOAD: begin
            state <= C_RUN;
            cnt_q <= '0;
          end
          C_RUN: begin
            if (32'(cnt_q) == LEN - 1) state <= C_FLUSH;
            cnt_q <= cnt_q + 1'b1;
          end
          C_FLUSH: begin
            state  <= C_IDLE;
            done_o <= 1'b1;
          end
          default: state <= C_IDLE;
        endcase
      end
    end
  end

  // Leaving ONchip mode ends a run at the next edge, and done follows the flush.
  a_abort: assert property (@(posedge clk) disable iff (!rst_n) !test_en |=> !busy_o);
  a_done_after_flush: assert property (@(posedge clk) disable iff (!rst_n)
    resp_flush_o && test_en |=> done_o);

  assign mem_start_o  = (state == C_LOAD);
  assign resp_clr_o   = (state == C_LOAD);
  assign playing_o    = (state == C_RUN);
  assign mem_adv_o    = playing_o;
  assign resp_shift_o = playing_o && shift_dr_i;
  assign resp_flush_o = (state == C_FLUSH);
  assign busy_o       = (state != C_IDLE);

endmodule
