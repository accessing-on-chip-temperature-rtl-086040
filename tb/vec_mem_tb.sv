// vec_mem_tb: self-checking test of the vector memory. Plays back the
// reset contents (a random 79-bit INIT) bit by bit and compares with INIT,
// checks that playback pauses when adv_i is low, rewrites every word
// through the load port and plays the new stream back.
module vec_mem_tb;
  localparam int LEN = 79, WORD = 8, DEPTH = (LEN + WORD - 1) / WORD;
  localparam logic [LEN-1:0] INIT = 79'h5A_C3F0_1E2D_3C4B_5A69;

  logic            clk = 1'b0, rst_n = 1'b0;
  logic            wr_en = 1'b0, start_i = 1'b0, adv_i = 1'b0;
  logic [3:0]      wr_addr = '0;
  logic [WORD-1:0] wr_data = '0;
  logic            bit_o;
  int              checks = 0, failures = 0;

  vec_mem #(.LEN(LEN), .WORD(WORD), .INIT(INIT)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  task automatic play(logic [DEPTH*WORD-1:0] exp, bit pauses);
    @(negedge clk) start_i = 1'b1;
    @(negedge clk) start_i = 1'b0;
    for (int i = 0; i < LEN; i++) begin
      check(bit_o == exp[i], $sformatf("stream bit %0d", i));
      if (pauses && ($urandom_range(0, 3) == 0)) begin
        adv_i = 1'b0;
        @(negedge clk);
        check(bit_o == exp[i], "holds while adv_i low");
      end
      adv_i = 1'b1;
      @(negedge clk);
      adv_i = 1'b0;
    end
  endtask

  initial begin
    #1000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [DEPTH*WORD-1:0] nv;
    #12 rst_n = 1'b1;
    play((DEPTH*WORD)'(INIT), 1'b0);
    play((DEPTH*WORD)'(INIT), 1'b1);
    for (int w = 0; w < DEPTH; w++) nv[w*WORD +: WORD] = WORD'($urandom);
    for (int w = 0; w < DEPTH; w++) begin
      @(negedge clk) wr_en = 1'b1; wr_addr = 4'(w); wr_data = nv[w*WORD +: WORD];
    end
    @(negedge clk) wr_en = 1'b0;
    play(nv, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
