// sar_adc: digital successive-approximation register of the temperature
// monitor's 10-bit ADC.
//
// When the master enable `en` is seen high, the converter spends one clock
// cycle sampling (sample_o is high during that cycle, and the analog side
// holds its input at the end of it) and then one cycle per bit, most
// significant bit first: the trial code dac_o (bits already decided plus
// the bit under test) goes to the DAC, and the comparator answer cmp_i
// (1 when the held input is at or above the DAC level) keeps or drops that
// bit at the clock edge. After 1 + N clock edges the word is complete,
// valid_o rises and the word stays on data_o while `en` stays high. data_o
// shows only the bits already decided, so the bits of the result appear
// one clock after another, MSB first. Taking `en` low turns the converter
// off and clears its output. One conversion is made per rising edge of
// `en` (this design's choice). Reset is asynchronous, active low.
module sar_adc #(
  parameter int unsigned N = 10
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  output logic         sample_o,
  output logic [N-1:0] dac_o,
  input  logic         cmp_i,
  output logic [N-1:0] data_o,
  output logic         valid_o
);

  typedef enum logic [1:0] {S_IDLE, S_CONV, S_DONE} sar_state_e;

  sar_state_e               state;
  logic [N-1:0]             res_q;
  logic [$clog2(N)-1:0]     idx_q;

  assign sample_o = (state == S_IDLE) && en;
  assign dac_o    = (state == S_CONV) ? (res_q | (N'(1) << idx_q)) : res_q;
  assign data_o   = res_q;
  assign valid_o  = (state == S_DONE);

  // Sampling lasts exactly one cycle per conversion.
  a_single_sample: assert property (@(posedge clk) disable iff (!rst_n) sample_o |=> !sample_o);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      res_q <= '0;
      idx_q <= '0;
    end else if (!en) begin
      state <= S_IDLE;
      res_q <= '0;
      idx_q <= '0;
    end else begin
      unique case (state)
        S_IDLE: begin
          state <= S_CONV;
          res_q <= '0;
          idx_q <= ($clog2(N))'(N - 1);
        end
        S_CONV: begin
          if (cmp_i) res_q[idx_q] <= 1'b1;
          if (idx_q == '0) state <= S_DONE;
          else             idx_q <= idx_q - 1'b1;
        end
        default: ;
      endcase
    end
  end

endmodule
