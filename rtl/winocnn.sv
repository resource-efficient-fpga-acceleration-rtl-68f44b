// winocnn: Winograd systolic convolution engine with kernel-size sharing.
//
// Data path (one request per cycle, fully pipelined):
//   controller -> input buffer matrix (HB x WB banks, 1 cycle)
//              -> planar access (row/column multiplexers, 3 cycles)
//              -> input transform B^T d B for N tiles x Q channels x B images
//              -> M x N systolic WinoPE array
//   controller -> weight buffer (address delayed 3 cycles, 1 cycle read)
//              -> array rows
// The array column j computes output tile (rt, cg*N + j) for M output
// channels of group og; each PE accumulates the Q-channel groups and emits
// its output tile with its tag {og, rt, cg}.
//
// Use: set cfg_n_idg first (the input buffer address mapping depends on
// it), then write the input feature-map block (already padded, pixel words of Q
// channels x B images, row/column relative to the block) through in_wr_*,
// write pre-transformed weights through w_wr_* at address og*n_idg + idg in
// bank (output channel % M), set cfg_* and pulse start. For kernel
// selection KSEL_1X1 an output tile is 4x4, for KSEL_3X3 it is 2x2 (top-left
// of y). Weights must be scaled so that V = 4 * G g G^T is an integer; the
// outputs are then 4x the convolution. done pulses once the last output tile
// has left the array. Larger and irregular kernels are split into 3x3 or 1x1
// pieces by the software that schedules the engine.
// Two outputs of sub-blocks stay unconnected on purpose and show up as unused
// signals in lint: the buffer's rd_valid (the tile control word already
// travels alongside the data) and the array's y_ksel (the kernel mode of a
// result is known to whoever started the layer).
module winocnn
  import wino_pkg::*;
#(
  parameter int M    = 8,      // PE array rows
  parameter int N    = 2,      // PE array columns
  parameter int Q    = 4,      // input channels per PE per cycle
  parameter int B    = 2,      // batch
  parameter int HB   = 4,
  parameter int WB   = 8,
  parameter int DIN  = 8192,   // input buffer bank depth
  parameter int DW   = 1024,   // weight buffer depth
  parameter int LO_W = 10,
  parameter int ROW_W = $clog2(DIN) - LO_W + $clog2(HB),
  parameter int CNT_W = 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // layer configuration
  input  logic                     start,
  input  ksel_e                    cfg_ksel,
  input  logic [CNT_W-1:0]         cfg_n_og,
  input  logic [CNT_W-1:0]         cfg_n_rt,
  input  logic [CNT_W-1:0]         cfg_n_cg,
  input  logic [LO_W-1:0]          cfg_n_idg,
  output logic                     busy,
  output logic                     done,
  // input feature-map load
  input  logic                     in_wr_en,
  input  logic [ROW_W-1:0]         in_wr_r,
  input  logic [LO_W-1:0]          in_wr_c,
  input  logic [LO_W-1:0]          in_wr_idg,
  input  logic [Q*B*PIX_W-1:0]     in_wr_data,
  // weight load
  input  logic                     w_wr_en,
  input  logic [$clog2(M)-1:0]     w_wr_row,
  input  logic [$clog2(DW)-1:0]    w_wr_addr,
  input  logic signed [WT_W-1:0]   w_wr_data [Q][OMEGA][OMEGA],
  // output tiles
  output logic signed [OUT_W-1:0]  y       [M][N][B][OMEGA][OMEGA],
  output logic                     y_valid [M][N],
  output logic [TAG_W-1:0]         y_tag   [M][N]
);

  localparam int WORD  = Q*B*PIX_W;
  localparam int DRAIN = 4 + (M - 1) + (N - 1) + 2;

  // controller
  logic              c_busy, c_done, req_en;
  logic [ROW_W-1:0]  req_r;
  logic [LO_W-1:0]   req_c, req_idg;
  logic [$clog2(DW)-1:0] req_waddr;
  wino_ctl_t         req_ctl;

  wino_controller #(.N(N), .CNT_W(CNT_W), .ROW_W(ROW_W), .COL_W(LO_W),
                    .IDG_W(LO_W), .WA_W($clog2(DW))) u_ctrl (
    .clk, .rst_n, .start, .cfg_ksel, .cfg_n_og, .cfg_n_rt, .cfg_n_cg, .cfg_n_idg,
    .busy(c_busy), .done(c_done), .req_en, .req_r, .req_c, .req_idg,
    .req_waddr, .req_ctl);

  // input buffer
  logic [WORD-1:0]          rd_data [HB][WB];
  logic                     rd_valid;
  logic [$clog2(HB)-1:0]    rd_roff;
  logic [$clog2(WB)-1:0]    rd_coff;

  wino_buffer_matrix #(.HB(HB), .WB(WB), .DIN(DIN), .Q(Q), .B(B), .LO_W(LO_W)) u_ibuf (
    .clk, .rst_n, .cfg_n_idg,
    .wr_en(in_wr_en), .wr_r(in_wr_r), .wr_c(in_wr_c), .wr_idg(in_wr_idg), .wr_data(in_wr_data),
    .rd_en(req_en), .rd_r(req_r), .rd_c(req_c), .rd_idg(req_idg),
    .rd_data, .rd_valid, .rd_roff, .rd_coff);

  // control word aligned with the buffer read data
  wino_ctl_t ctl_d1;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ctl_d1 <= '0;
    else        ctl_d1 <= req_ctl;
  end

  logic [WORD-1:0] tile_w [N][OMEGA][OMEGA];
  wino_ctl_t       tile_ctl;

  wino_planar_access #(.HB(HB), .WB(WB), .N(N), .WORD(WORD)) u_planar (
    .clk, .rst_n, .in_data(rd_data), .in_roff(rd_roff), .in_coff(rd_coff),
    .in_ctl(ctl_d1), .out_tile(tile_w), .out_ctl(tile_ctl));

  // input transform of every tile, channel and image
  logic signed [U_W-1:0] u_col [N][B][Q][OMEGA][OMEGA];
  for (genvar n = 0; n < N; n++) begin : g_n
    for (genvar b = 0; b < B; b++) begin : g_b
      for (genvar q = 0; q < Q; q++) begin : g_q
        logic signed [PIX_W-1:0] d [OMEGA][OMEGA];
        always_comb begin
          for (int i = 0; i < OMEGA; i++)
            for (int j = 0; j < OMEGA; j++)
              d[i][j] = tile_w[n][i][j][(q*B + b)*PIX_W +: PIX_W];
        end
        wino_input_transform u_it (.d(d), .u(u_col[n][b][q]));
      end
    end
  end

  // weights: read address delayed to meet the tiles
  logic [$clog2(DW)-1:0] wa_d [3];
  logic                  we_d [3];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wa_d <= '{default: '0};
      we_d <= '{default: 1'b0};
    end else begin
      wa_d[0] <= req_waddr; we_d[0] <= req_en;
      for (int k = 1; k < 3; k++) begin
        wa_d[k] <= wa_d[k-1];
        we_d[k] <= we_d[k-1];
      end
    end
  end

  logic signed [WT_W-1:0] v_row [M][Q][OMEGA][OMEGA];
  wino_weight_buffer #(.M(M), .Q(Q), .DEPTH(DW)) u_wbuf (
    .clk, .wr_en(w_wr_en), .wr_row(w_wr_row), .wr_addr(w_wr_addr), .wr_data(w_wr_data),
    .rd_en(we_d[2]), .rd_addr(wa_d[2]), .rd_data(v_row));

  ksel_e y_ksel [M][N];
  wino_systolic_array #(.M(M), .N(N), .Q(Q), .B(B)) u_array (
    .clk, .rst_n, .u_col, .ctl(tile_ctl), .v_row, .y, .y_valid, .y_tag, .y_ksel);

  // completion: wait for the pipeline and the array skew to drain
  logic [$clog2(DRAIN+1)-1:0] drain;
  logic                       draining;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      drain    <= '0;
      draining <= 1'b0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      if (c_done) begin
        draining <= 1'b1;
        drain    <= '0;
      end else if (draining) begin
        drain <= drain + 1'b1;
        if (drain == ($clog2(DRAIN+1))'(DRAIN - 1)) begin
          draining <= 1'b0;
          done     <= 1'b1;
        end
      end
    end
  end
  assign busy = c_busy || draining;

endmodule
