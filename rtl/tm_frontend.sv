// tm_frontend: BEHAVIOURAL MODEL of the analog part of the temperature
// health monitor. It is not synthesizable logic: it stands in for a
// Wheatstone bridge, a linear amplifier, an anti-alias filter, the
// sample-and-hold, the DAC and the comparator of a SAR ADC.
//
// The bridge has two resistor types: R2 and R3 with a high temperature
// coefficient TC_HI, R1 and R4 with a low one TC_LO. For a temperature rise
// dT above the reference, the differential bridge output relative to the
// supply VS is
//   v_b = (1 + dT*TC2)/(2 + dT*TC1 + dT*TC2) - (1 + dT*TC4)/(2 + dT*TC3 + dT*TC4)
// (zero at dT = 0 and rising almost linearly with dT). The amplifier
// multiplies by GAIN; the filter is a one-pole low pass updated once per
// clock, y += ALPHA*(x - y) (ALPHA = 1 passes a static input straight
// through); the sample-and-hold takes the filter output on the clock edge
// at which sample_i is high; the comparator reports held >= dac_i*VREF/2^N.
// All parts are powered by the master enable: with en low the amplifier and
// filter output are zero and cmp_o is low.
//
// Input temperature: temp_i is the rise dT in units of 0.01 K.
// The coefficient, supply, gain and reference values are this design's
// assumptions; they put full scale near dT = 129 K.
module tm_frontend #(
  parameter int unsigned N     = 10,
  parameter real         TC_HI = 0.004,   // 1/K
  parameter real         TC_LO = 0.0,     // 1/K
  parameter real         VS    = 1.1,     // V
  parameter real         GAIN  = 5.0,
  parameter real         VREF  = 1.1,     // V, ADC full scale
  parameter real         ALPHA = 1.0
) (
  input  logic         clk,
  input  logic         en,
  input  logic [15:0]  temp_i,
  input  logic         sample_i,
  input  logic [N-1:0] dac_i,
  output logic         cmp_o
);

  real dt, vb, vamp, vfilt, vhold, vdac;

  always_comb begin
    dt   = real'(temp_i) / 100.0;
    vb   = (1.0 + dt * TC_HI) / (2.0 + dt * TC_LO + dt * TC_HI)
         - (1.0 + dt * TC_LO) / (2.0 + dt * TC_HI + dt * TC_LO);
    vamp = en ? VS * vb * GAIN : 0.0;
  end

  initial begin
    vfilt = 0.0;
    vhold = 0.0;
  end

  always @(posedge clk) begin
    vfilt <= en ? vfilt + ALPHA * (vamp - vfilt) : 0.0;
    if (sample_i) vhold <= vfilt + ALPHA * (vamp - vfilt);
  end

  always_comb begin
    vdac  = real'(dac_i) * VREF / real'(2 ** N);
    cmp_o = en && (vhold >= vdac);
  end

endmodule
