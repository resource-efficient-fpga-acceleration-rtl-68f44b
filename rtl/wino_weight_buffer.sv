// wino_weight_buffer: on-chip store of pre-transformed Winograd weight tiles.
//
// Weights are transformed (V = G g G^T) and quantized to 16 bits before they
// are written, so no weight transform logic is needed on chip. There is one
// bank per row of the PE array; a word holds the omega x omega tiles of Q
// input channels for one output channel (omega^2 * Q * 16 bits), which is the
// width the WinoCNN BRAM model gives each array row. All banks are read at the
// same address in one cycle, giving every array row its weights.
//
// Interface: wr_row selects the bank written by wr_en/wr_addr/wr_data.
// rd_en/rd_addr read all banks; rd_data is valid one cycle later.
module wino_weight_buffer
  import wino_pkg::*;
#(
  parameter int M     = 8,     // array rows
  parameter int Q     = 4,
  parameter int DEPTH = 1024   // one BRAM depth
) (
  input  logic                           clk,
  input  logic                           wr_en,
  input  logic [$clog2(M)-1:0]           wr_row,
  input  logic [$clog2(DEPTH)-1:0]       wr_addr,
  input  logic signed [WT_W-1:0]         wr_data [Q][OMEGA][OMEGA],
  input  logic                           rd_en,
  input  logic [$clog2(DEPTH)-1:0]       rd_addr,
  output logic signed [WT_W-1:0]         rd_data [M][Q][OMEGA][OMEGA]
);

  localparam int WORD = Q*OMEGA*OMEGA*WT_W;

  logic [WORD-1:0] wr_word;
  always_comb begin
    for (int q = 0; q < Q; q++)
      for (int i = 0; i < OMEGA; i++)
        for (int j = 0; j < OMEGA; j++)
          wr_word[((q*OMEGA + i)*OMEGA + j)*WT_W +: WT_W] = wr_data[q][i][j];
  end

  for (genvar r = 0; r < M; r++) begin : g_bank
    logic [WORD-1:0] mem [DEPTH];
    logic [WORD-1:0] q_word;
    always_ff @(posedge clk) begin
      if (wr_en && wr_row == ($clog2(M))'(r)) mem[wr_addr] <= wr_word;
      if (rd_en) q_word <= mem[rd_addr];
    end
    always_comb begin
      for (int q = 0; q < Q; q++)
        for (int i = 0; i < OMEGA; i++)
          for (int j = 0; j < OMEGA; j++)
            rd_data[r][q][i][j] = q_word[((q*OMEGA + i)*OMEGA + j)*WT_W +: WT_W];
    end
  end

endmodule
