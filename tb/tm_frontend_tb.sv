// tm_frontend_tb: test of the analog front-end model. For a set of
// temperature rises the expected ADC code is worked out here from the
// bridge equation, gain and reference; the testbench then runs its own
// binary search over dac_i against cmp_o and checks that it lands on that
// code. Also checks that the comparator is silent when EN is low.
module tm_frontend_tb;
  localparam int  N     = 10;
  localparam real TC_HI = 0.004, TC_LO = 0.0, VS = 1.1, GAIN = 5.0, VREF = 1.1;

  logic         clk = 1'b0, en = 1'b0, sample_i = 1'b0;
  logic [15:0]  temp_i = '0;
  logic [N-1:0] dac_i = '0;
  logic         cmp_o;
  int           checks = 0, failures = 0;

  tm_frontend #(.N(N)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  function automatic int expected(int t);
    real x, y, v;
    int  c;
    x = t / 100.0 * TC_HI;
    y = t / 100.0 * TC_LO;
    v = VS * GAIN * ((1.0 + x) / (2.0 + x + y) - (1.0 + y) / (2.0 + x + y));
    c = int'($floor(v / VREF * 1024.0));
    if (c > 1023) c = 1023;
    if (c < 0) c = 0;
    return c;
  endfunction

  initial begin
    #1000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int ts [8] = '{0, 100, 2500, 5000, 9000, 11769, 12500, 20000};
    int code;
    for (int i = 0; i < 8; i++) begin
      temp_i = 16'(ts[i]);
      @(negedge clk) en = 1'b1; sample_i = 1'b1;
      @(negedge clk) sample_i = 1'b0;
      code = 0;
      for (int b = N - 1; b >= 0; b--) begin
        dac_i = N'(code | (1 << b));
        #1;
        if (cmp_o) code |= (1 << b);
      end
      check(code == expected(ts[i]), $sformatf("code for dT=%0d: got %0d want %0d", ts[i], code, expected(ts[i])));
      dac_i = '0; #1;
      check(cmp_o == 1'b1, "code 0 always at or below the input");
      @(negedge clk) en = 1'b0;
      #1 check(cmp_o == 1'b0, "comparator off when disabled");
    end
    check(expected(11769) == 10'b1111001111, "reference point");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
