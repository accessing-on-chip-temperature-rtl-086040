// temp_monitor: BEHAVIOURAL MODEL of one temperature health monitor, the
// analog front end (tm_frontend, a model) joined to the synthesizable SAR
// logic (sar_adc).
//
// Interface: the master enable `en` powers all sub-blocks; while it is high
// the monitor makes one 10-bit conversion of the temperature rise temp_i
// (0.01 K units) and holds it on data_o; valid_o marks the finished word.
// Timing: the word is complete 11 clock cycles after `en` is first seen
// high (1 sampling cycle, 10 conversion cycles). With `en` low the monitor
// is off and data_o is zero.
module temp_monitor #(
  parameter int unsigned N = 10
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [15:0]  temp_i,
  output logic [N-1:0] data_o,
  output logic         valid_o
);

  logic         sample, cmp;
  logic [N-1:0] dac;

  tm_frontend #(.N(N)) u_afe (
    .clk     (clk),
    .en      (en),
    .temp_i  (temp_i),
    .sample_i(sample),
    .dac_i   (dac),
    .cmp_o   (cmp)
  );

  sar_adc #(.N(N)) u_sar (
    .clk     (clk),
    .rst_n   (rst_n),
    .en      (en),
    .sample_o(sample),
    .dac_o   (dac),
    .cmp_i   (cmp),
    .data_o  (data_o),
    .valid_o (valid_o)
  );

endmodule
