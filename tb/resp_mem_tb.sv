// resp_mem_tb: self-checking test of the response memory. Streams random
// bits in with gaps, flushes a partial word, and reads back through the
// read port, comparing with the stream; then overfills it and checks the
// overflow flag and that clr_i empties it.
module resp_mem_tb;
  localparam int BITS = 32, WORD = 8;

  logic            clk = 1'b0, rst_n = 1'b0;
  logic            clr_i = 1'b0, shift_i = 1'b0, bit_i = 1'b0, flush_i = 1'b0;
  logic [1:0]      rd_addr = '0;
  logic [WORD-1:0] rd_data;
  logic [5:0]      nbits_o;
  logic            overflow_o;
  int              checks = 0, failures = 0;

  resp_mem #(.BITS(BITS), .WORD(WORD)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  initial begin
    #1000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [31:0] s;
    int n;
    #12 rst_n = 1'b1;
    repeat (10) begin
      n = $urandom_range(1, 32);
      s = $urandom;
      @(negedge clk) clr_i = 1'b1;
      @(negedge clk) clr_i = 1'b0;
      for (int i = 0; i < n; i++) begin
        if ($urandom_range(0, 2) == 0) @(negedge clk);
        shift_i = 1'b1; bit_i = s[i];
        @(negedge clk) shift_i = 1'b0;
      end
      flush_i = 1'b1;
      @(negedge clk) flush_i = 1'b0;
      check(int'(nbits_o) == n, "bit count");
      for (int w = 0; w < (n + 7) / 8; w++) begin
        rd_addr = 2'(w); #1;
        for (int b = 0; b < 8; b++)
          if (w * 8 + b < n) check(rd_data[b] == s[w*8+b], $sformatf("bit %0d of %0d", w*8+b, n));
      end
      check(!overflow_o, "no overflow");
    end
    // overfill
    @(negedge clk) clr_i = 1'b1;
    @(negedge clk) clr_i = 1'b0;
    repeat (33) begin shift_i = 1'b1; bit_i = 1'b1; @(negedge clk); end
    shift_i = 1'b0;
    check(overflow_o, "overflow after 33 bits");
    check(int'(nbits_o) == 32, "32 bits kept");
    @(negedge clk) clr_i = 1'b1;
    @(negedge clk) clr_i = 1'b0;
    check(!overflow_o && nbits_o == 0, "clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
