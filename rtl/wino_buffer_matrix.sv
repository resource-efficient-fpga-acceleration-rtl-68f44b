// wino_buffer_matrix: input feature-map buffer folded into HB x WB BRAM banks.
//
// Pixel in[id][r][c] lives in bank (r % HB, c % WB) at address
//   addr = { r / HB , (c / WB) * ID + id }
// (the WinoCNN address mapping): banks in one bank-row share the high address
// bits, banks in one bank-column share the low address bits. Because every
// bank has its own address port, any HB x WB window of the feature map can be
// read in one cycle, wherever it starts: bank (h,w) serves the unique window
// row r' in [r, r+HB) with r' % HB = h and the unique column c' in [c, c+WB)
// with c' % WB = w. The window comes out in bank order; the planar access
// stage rotates it back into feature-map order using rd_roff/rd_coff.
//
// One bank word holds one pixel position for Q input channels of B images
// (Q*B*8 bits), so that a read supplies a whole channel group: here `id`
// counts channel groups of Q, and ID (cfg_n_idg) is the number of groups.
// Grouping Q channels per word is this design's choice; the WinoCNN resource
// model sizes each bank for B pixels only.
//
// Interface: one pixel word written per cycle (wr_*). A read (rd_en with the
// window corner rd_r/rd_c and group rd_idg) returns rd_data one cycle later,
// like a BRAM with registered output, with rd_valid and the rotations.
module wino_buffer_matrix
  import wino_pkg::*;
#(
  parameter int HB   = 4,     // bank rows (4 for F4)
  parameter int WB   = 8,     // bank columns: smallest power of 2 >= 2*omega
  parameter int DIN  = 8192,  // depth of each bank (D_in)
  parameter int Q    = 4,
  parameter int B    = 2,
  parameter int LO_W = 10,    // low (column/channel) address bits
  parameter int ROW_W = $clog2(DIN) - LO_W + $clog2(HB),
  parameter int COL_W = LO_W
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [LO_W-1:0]               cfg_n_idg,  // ID: channel groups in the layer
  // write port
  input  logic                          wr_en,
  input  logic [ROW_W-1:0]              wr_r,
  input  logic [COL_W-1:0]              wr_c,
  input  logic [LO_W-1:0]               wr_idg,
  input  logic [Q*B*PIX_W-1:0]          wr_data,
  // window read port
  input  logic                          rd_en,
  input  logic [ROW_W-1:0]              rd_r,
  input  logic [COL_W-1:0]              rd_c,
  input  logic [LO_W-1:0]               rd_idg,
  output logic [Q*B*PIX_W-1:0]          rd_data [HB][WB],
  output logic                          rd_valid,
  output logic [$clog2(HB)-1:0]         rd_roff,
  output logic [$clog2(WB)-1:0]         rd_coff
);

  localparam int AW  = $clog2(DIN);
  localparam int HBW = $clog2(HB);
  localparam int WBW = $clog2(WB);
  localparam int WORD = Q*B*PIX_W;

  function automatic logic [AW-1:0] map_addr(logic [ROW_W-1:0] r, logic [COL_W-1:0] c,
                                             logic [LO_W-1:0] idg, logic [LO_W-1:0] n_idg);
    logic [AW-LO_W-1:0] hi;
    logic [LO_W-1:0]    lo;
    hi = (AW-LO_W)'(r >> HBW);
    lo = LO_W'(32'(c >> WBW) * 32'(n_idg) + 32'(idg));
    return {hi, lo};
  endfunction

  logic [HB-1:0][WB-1:0] wr_sel;
  logic [AW-1:0]         wr_addr;
  logic [AW-1:0]         rd_addr [HB][WB];

  always_comb begin
    wr_addr = map_addr(wr_r, wr_c, wr_idg, cfg_n_idg);
    for (int h = 0; h < HB; h++) begin
      for (int w = 0; w < WB; w++) begin
        wr_sel[h][w] = wr_en && (wr_r[HBW-1:0] == HBW'(h)) && (wr_c[WBW-1:0] == WBW'(w));
        rd_addr[h][w] = map_addr(rd_r + ROW_W'(HBW'(HBW'(h) - rd_r[HBW-1:0])),
                                 rd_c + COL_W'(WBW'(WBW'(w) - rd_c[WBW-1:0])),
                                 rd_idg, cfg_n_idg);
      end
    end
  end

  for (genvar h = 0; h < HB; h++) begin : g_h
    for (genvar w = 0; w < WB; w++) begin : g_w
      logic [WORD-1:0] mem [DIN];
      always_ff @(posedge clk) begin
        if (wr_sel[h][w]) mem[wr_addr] <= wr_data;
        if (rd_en) rd_data[h][w] <= mem[rd_addr[h][w]];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_valid <= 1'b0;
      rd_roff  <= '0;
      rd_coff  <= '0;
    end else begin
      rd_valid <= rd_en;
      if (rd_en) begin
        rd_roff <= rd_r[HBW-1:0];
        rd_coff <= rd_c[WBW-1:0];
      end
    end
  end

endmodule
