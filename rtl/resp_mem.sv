// resp_mem: response memory with an input shift register (MEMORY-1 of the
// IJTAG controller). It keeps the bits that come back from the scan
// network, among them the instruments' readings, for software to read.
//
// clr_i empties it. Every cycle with shift_i high, bit_i enters the shift
// register from the top; when WORD bits have arrived the completed word is
// written to the next memory word, so stream bit i ends up in word
// i/WORD, bit i%WORD. flush_i writes a partly filled shift register,
// aligned to bit 0. Bits beyond DEPTH*WORD are dropped and set overflow_o.
// nbits_o counts the bits kept. The read port is combinational.
// The capacity, word width and read port are this design's choices.
module resp_mem #(
  parameter int unsigned  BITS  = 32,
  parameter int unsigned  WORD  = 8,
  localparam int unsigned DEPTH = (BITS + WORD - 1) / WORD,
  localparam int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       clr_i,
  input  logic                       shift_i,
  input  logic                       bit_i,
  input  logic                       flush_i,
  input  logic [AW-1:0]              rd_addr,
  output logic [WORD-1:0]            rd_data,
  output logic [$clog2(BITS+1)-1:0]  nbits_o,
  output logic                       overflow_o
);

  logic [WORD-1:0]         mem [DEPTH];
  logic [WORD-1:0]         sh_q;
  logic [AW:0]             widx_q;
  logic [$clog2(WORD)-1:0] bcnt_q;
  logic [WORD-1:0]         sh_in;

  assign sh_in = {bit_i, sh_q[WORD-1:1]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
      sh_q       <= '0;
      widx_q     <= '0;
      bcnt_q     <= '0;
      nbits_o    <= '0;
      overflow_o <= 1'b0;
    end else if (clr_i) begin
      sh_q       <= '0;
      widx_q     <= '0;
      bcnt_q     <= '0;
      nbits_o    <= '0;
      overflow_o <= 1'b0;
    end else if (shift_i) begin
      if (32'(widx_q) >= DEPTH) begin
        overflow_o <= 1'b1;
      end else begin
        nbits_o <= nbits_o + 1'b1;
        if (32'(bcnt_q) == WORD - 1) begin
          mem[widx_q[AW-1:0]] <= sh_in;
          widx_q <= widx_q + 1'b1;
          bcnt_q <= '0;
          sh_q   <= '0;
        end else begin
          sh_q   <= sh_in;
          bcnt_q <= bcnt_q + 1'b1;
        end
      end
    end else if (flush_i && bcnt_q != '0 && 32'(widx_q) < DEPTH) begin
      mem[widx_q[AW-1:0]] <= sh_q >> (WORD - 32'(bcnt_q));
      widx_q <= widx_q + 1'b1;
      bcnt_q <= '0;
      sh_q   <= '0;
    end
  end

  assign rd_data = (32'(rd_addr) < DEPTH) ? mem[rd_addr] : '0;

endmodule
