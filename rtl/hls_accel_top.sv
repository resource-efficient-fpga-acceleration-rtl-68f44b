// hls_accel_top: three independent accelerator engines side by side.
//
//  * WinoCNN (winocnn): Winograd systolic convolution engine whose PEs serve
//    1x1 and 3x3 kernels with the same multipliers.
//  * HiKonv (hikonv_conv1d): long 1D convolution of 4-bit data in which each
//    27x18 multiplication does six multiplications and two additions.
//  * LRCN layer IP (lrcn_weight_unpacker feeding lrcn_mac_tile): COO x CII
//    multiply-accumulate tile with ping-pong weights, loaded from a 512-bit
//    memory bus carrying packed 12-bit weights.
//  * LeNet pooling layer (win2d_maxpool): 2D-window max-pooling + ReLU module
//    of the layer-pipelined LeNet design, taking 8-channel 16-bit chunks in
//    its backward-scheduled request order.
//
// The engines share nothing but the clock and reset; each has its own ports,
// prefixed wc_, hk_, lr_ and lp_. External memory, DMA and the host processor that
// feed them are outside this design. All parameters are the engines'
// defaults; timing is that of each engine.
module hls_accel_top
  import wino_pkg::*;
#(
  parameter int WC_M = 8,
  parameter int WC_N = 2,
  parameter int WC_Q = 4,
  parameter int WC_B = 2,
  parameter int HK_P = 4,
  parameter int HK_QB = 4,
  parameter int HK_N = int'(hikonv_pkg::best_nk(27, 18, HK_P, HK_QB) / 256),
  parameter int HK_K = int'(hikonv_pkg::best_nk(27, 18, HK_P, HK_QB) % 256),
  parameter int HK_S = int'(hikonv_pkg::slice_w(HK_P, HK_QB, HK_N, HK_K)),
  parameter int LR_CII = 24,
  parameter int LR_COO = 16,
  parameter int LP_H   = 24,
  parameter int LP_C   = 8
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // ---------------- WinoCNN ----------------
  input  logic                    wc_start,
  input  ksel_e                   wc_cfg_ksel,
  input  logic [7:0]              wc_cfg_n_og,
  input  logic [7:0]              wc_cfg_n_rt,
  input  logic [7:0]              wc_cfg_n_cg,
  input  logic [9:0]              wc_cfg_n_idg,
  output logic                    wc_busy,
  output logic                    wc_done,
  input  logic                    wc_in_wr_en,
  input  logic [4:0]              wc_in_wr_r,
  input  logic [9:0]              wc_in_wr_c,
  input  logic [9:0]              wc_in_wr_idg,
  input  logic [WC_Q*WC_B*PIX_W-1:0] wc_in_wr_data,
  input  logic                    wc_w_wr_en,
  input  logic [$clog2(WC_M)-1:0] wc_w_wr_row,
  input  logic [9:0]              wc_w_wr_addr,
  input  logic signed [WT_W-1:0]  wc_w_wr_data [WC_Q][OMEGA][OMEGA],
  output logic signed [OUT_W-1:0] wc_y       [WC_M][WC_N][WC_B][OMEGA][OMEGA],
  output logic                    wc_y_valid [WC_M][WC_N],
  output logic [TAG_W-1:0]        wc_y_tag   [WC_M][WC_N],
  // ---------------- HiKonv ----------------
  input  logic                    hk_in_valid,
  input  logic                    hk_in_first,
  input  logic                    hk_in_last,
  input  logic signed [HK_P-1:0]  hk_f [HK_N],
  input  logic signed [HK_QB-1:0] hk_g [HK_K],
  output logic                    hk_out_valid,
  output logic signed [HK_S:0]    hk_y_out [HK_N],
  output logic                    hk_tail_valid,
  output logic signed [HK_S:0]    hk_tail_out [HK_K-1],
  // ---------------- LRCN MAC tile ----------------
  input  logic                    lr_beat_valid,
  input  logic [511:0]            lr_beat_data,
  input  logic                    lr_swap,
  output logic                    lr_wl_full,
  input  logic                    lr_in_valid,
  input  logic                    lr_in_first,
  input  logic                    lr_in_last,
  input  logic signed [15:0]      lr_in_data [LR_CII],
  output logic                    lr_out_valid,
  output logic signed [47:0]      lr_out [LR_COO],
  // ---------------- LeNet pooling layer ----------------
  input  logic                    lp_in_valid,
  output logic                    lp_in_ready,
  input  logic signed [15:0]      lp_in_data [LP_C],
  output logic                    lp_out_valid,
  input  logic                    lp_out_ready,
  output logic signed [15:0]      lp_out_data [LP_C]
);

  winocnn #(.M(WC_M), .N(WC_N), .Q(WC_Q), .B(WC_B)) u_winocnn (
    .clk, .rst_n,
    .start(wc_start), .cfg_ksel(wc_cfg_ksel), .cfg_n_og(wc_cfg_n_og),
    .cfg_n_rt(wc_cfg_n_rt), .cfg_n_cg(wc_cfg_n_cg), .cfg_n_idg(wc_cfg_n_idg),
    .busy(wc_busy), .done(wc_done),
    .in_wr_en(wc_in_wr_en), .in_wr_r(wc_in_wr_r), .in_wr_c(wc_in_wr_c),
    .in_wr_idg(wc_in_wr_idg), .in_wr_data(wc_in_wr_data),
    .w_wr_en(wc_w_wr_en), .w_wr_row(wc_w_wr_row), .w_wr_addr(wc_w_wr_addr),
    .w_wr_data(wc_w_wr_data),
    .y(wc_y), .y_valid(wc_y_valid), .y_tag(wc_y_tag));

  hikonv_conv1d #(.BIT_A(27), .BIT_B(18), .P(HK_P), .QB(HK_QB),
                  .N(HK_N), .K(HK_K), .S(HK_S)) u_hikonv (
    .clk, .rst_n,
    .in_valid(hk_in_valid), .in_first(hk_in_first), .in_last(hk_in_last),
    .f(hk_f), .g(hk_g),
    .out_valid(hk_out_valid), .y_out(hk_y_out),
    .tail_valid(hk_tail_valid), .tail_out(hk_tail_out));

  logic                    lr_wl_valid;
  logic signed [11:0]      lr_wl_data [128];

  lrcn_weight_unpacker #(.BUS_W(512), .WT_W(12), .NBEATS(3)) u_lr_unpack (
    .clk, .rst_n, .beat_valid(lr_beat_valid), .beat_data(lr_beat_data),
    .out_valid(lr_wl_valid), .out_w(lr_wl_data));

  lrcn_mac_tile #(.CII(LR_CII), .COO(LR_COO), .DATA_W(16), .WT_W(12),
                  .ACC_W(48), .WL(128)) u_lr_tile (
    .clk, .rst_n,
    .wl_valid(lr_wl_valid), .wl_data(lr_wl_data), .swap(lr_swap), .wl_full(lr_wl_full),
    .in_valid(lr_in_valid), .in_first(lr_in_first), .in_last(lr_in_last),
    .in_data(lr_in_data), .out_valid(lr_out_valid), .out(lr_out));

  win2d_maxpool #(.HI(LP_H), .WI(LP_H), .C(LP_C), .DATA_W(16), .F(2), .S(2), .Z(0)) u_pool (
    .clk, .rst_n,
    .in_valid(lp_in_valid), .in_ready(lp_in_ready), .in_data(lp_in_data),
    .out_valid(lp_out_valid), .out_ready(lp_out_ready), .out_data(lp_out_data));

endmodule
