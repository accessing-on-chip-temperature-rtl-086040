// temp_monitor_tb: end-to-end test of one temperature monitor (front-end
// model plus SAR logic). For each temperature rise the expected code is
// computed here from the bridge equation; the test checks the word after
// exactly 11 clock cycles from EN, that it is not complete earlier, and
// that EN low turns the monitor off. The first case (dT = 117.69 K) gives
// the word 1111001111.
module temp_monitor_tb;
  localparam int  N     = 10;
  localparam real TC_HI = 0.004, VS = 1.1, GAIN = 5.0, VREF = 1.1;

  logic         clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [15:0]  temp_i = '0;
  logic [N-1:0] data_o;
  logic         valid_o;
  int           checks = 0, failures = 0;

  temp_monitor #(.N(N)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  function automatic int expected(int t);
    real x, v;
    int  c;
    x = t / 100.0 * TC_HI;
    v = VS * GAIN * (x / (2.0 + x));
    c = int'($floor(v / VREF * 1024.0));
    return (c > 1023) ? 1023 : c;
  endfunction

  initial begin
    #1000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic measure(int t);
    int lat;
    temp_i = 16'(t);
    @(negedge clk) en = 1'b1;
    lat = 0;
    while (!valid_o && lat < 40) begin @(posedge clk); #1; lat++; end
    check(lat == 11, $sformatf("latency %0d cycles", lat));
    check(int'(data_o) == expected(t), $sformatf("dT=%0d code %0d want %0d", t, data_o, expected(t)));
    @(negedge clk) en = 1'b0;
    @(posedge clk); #1;
    check(data_o == '0 && !valid_o, "off when EN low");
  endtask

  initial begin
    #12 rst_n = 1'b1;
    measure(11769);
    check(expected(11769) == 10'b1111001111, "reference word");
    for (int t = 0; t <= 14000; t += 700) measure(t);
    repeat (20) measure($urandom_range(0, 13000));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
