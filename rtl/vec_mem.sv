// vec_mem: vector memory with an output shift register (MEMORY-2 holds the
// TDI stream, MEMORY-3 the TMS stream of the IJTAG controller).
//
// The stream of LEN bits is kept in DEPTH words of WORD bits, bit i of the
// stream in word i/WORD, bit i%WORD. Reset loads the words from the INIT
// parameter (the programme built at design time); the write port lets the
// system replace them with other vectors.
//
// Playback: start_i loads word 0 into the shift register; from the next
// cycle bit_o is stream bit 0, and each cycle with adv_i high moves to the
// next stream bit, reloading the shift register from the next word after
// every WORD bits. The controller decides how many bits to play. The word
// width and the playback handshake are this design's choices.
module vec_mem #(
  parameter int unsigned          LEN   = 79,
  parameter int unsigned          WORD  = 8,
  parameter logic [LEN-1:0]       INIT  = '0,
  localparam int unsigned         DEPTH = (LEN + WORD - 1) / WORD,
  localparam int unsigned         AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  // load port
  input  logic            wr_en,
  input  logic [AW-1:0]   wr_addr,
  input  logic [WORD-1:0] wr_data,
  // playback
  input  logic            start_i,
  input  logic            adv_i,
  output logic            bit_o
);

  localparam logic [DEPTH*WORD-1:0] INIT_EXT = (DEPTH*WORD)'(INIT);

  logic [WORD-1:0]         mem [DEPTH];
  logic [WORD-1:0]         sh_q;
  logic [AW-1:0]           widx_q;
  logic [$clog2(WORD)-1:0] bcnt_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) mem[i] <= INIT_EXT[i*WORD +: WORD];
    end else if (wr_en && (32'(wr_addr) < DEPTH)) begin
      mem[wr_addr] <= wr_data;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh_q   <= '0;
      widx_q <= '0;
      bcnt_q <= '0;
    end else if (start_i) begin
      sh_q   <= mem[0];
      widx_q <= AW'(1);
      bcnt_q <= '0;
    end else if (adv_i) begin
      if (32'(bcnt_q) == WORD - 1) begin
        sh_q   <= (32'(widx_q) < DEPTH) ? mem[widx_q] : '0;
        widx_q <= widx_q + 1'b1;
        bcnt_q <= '0;
      end else begin
        sh_q   <= sh_q >> 1;
        bcnt_q <= bcnt_q + 1'b1;
      end
    end
  end

  assign bit_o = sh_q[0];

endmodule
