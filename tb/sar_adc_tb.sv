// sar_adc_tb: self-checking test of the SAR register logic.
// The testbench plays an ideal comparator for a held input level `lvl`
// (cmp = 1 when the DAC code is at or below lvl), so a correct conversion
// returns lvl. It checks the result, the latency of 1 sampling + 10
// conversion cycles, that the decided bits appear MSB first one per clock,
// that sample_o is a one-cycle pulse, and that EN low clears the output.
module sar_adc_tb;
  localparam int N = 10;

  logic         clk = 1'b0, rst_n = 1'b0, en = 1'b0, cmp_i;
  logic         sample_o, valid_o;
  logic [N-1:0] dac_o, data_o;
  int           checks = 0, failures = 0;
  int           lvl;

  sar_adc #(.N(N)) dut (.*);
  always #5 clk = ~clk;
  assign cmp_i = (int'(dac_o) <= lvl);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %0t: %s lvl=%0d data=%0d", $time, what, lvl, data_o); end
  endtask

  initial begin
    #1000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic convert(int level);
    int samples;
    lvl = level;
    @(negedge clk) en = 1'b1;
    #1 check(sample_o == 1'b1, "sample_o high in the first enabled cycle");
    samples = 0;
    for (int k = 1; k <= 11; k++) begin
      @(posedge clk); #1;
      if (sample_o) samples++;
      // after k edges, k-1 bits are decided
      if (k >= 2) check(data_o == ((N)'(level) & ~((N'(1) << (N - (k - 1))) - 1'b1)),
                        "decided bits appear MSB first");
      check(valid_o == (k == 11), "valid exactly after 11 cycles");
    end
    check(samples == 0, "single sampling cycle");
    check(data_o == N'(level), "conversion result");
    repeat (5) @(posedge clk);
    #1 check(data_o == N'(level) && valid_o, "result held while enabled");
    @(negedge clk) en = 1'b0;
    @(posedge clk); #1;
    check(data_o == '0 && !valid_o, "EN low turns the monitor off");
  endtask

  initial begin
    lvl = 0;
    #12 rst_n = 1'b1;
    convert(10'b1111001111);
    convert(0);
    convert(1023);
    convert(512);
    convert(511);
    repeat (200) convert($urandom_range(0, 1023));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
