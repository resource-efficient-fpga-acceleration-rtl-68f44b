// tb_hls_accel_top: end-to-end check of the accelerator top at its default
// sizes (no parameter overrides), through all three engines.
//  * Winograd engine: a 3x3 layer and a 1x1 layer, 8 input channels (two
//    channel groups, so PEs accumulate) and 16 output channels; every output
//    tile is compared with a direct convolution (outputs are 4x the
//    convolution because weights are loaded as (2G) g (2G)^T).
//  * HiKonv engine: random 4-bit sequences of several chunks, streamed
//    outputs and tails against the direct 1D convolution.
//  * LRCN engine: 12-bit weights packed into 512-bit beats, unpacked, loaded
//    into the idle bank while the other bank computes, swapped, then 16-bit
//    multiply-accumulate sequences against a reference.
//  * LeNet pooling layer: a random 24x24x8 map sent in the backward-scheduled
//    request order; outputs against ReLU(2x2 max), the first output due
//    after four input chunks.
// Each mechanism is counted and a failure is recorded for any that never ran.
module tb_hls_accel_top;
  import wino_pkg::*;
  localparam int M = 8, N = 2, Q = 4, B = 2, ID = 8, OD = 16, MAXR = 8, MAXC = 18;
  localparam int HN = 3, HK = 2, CII = 24, COO = 16, WL = 128;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic wc_start = 0, wc_busy, wc_done, wc_in_wr_en = 0, wc_w_wr_en = 0;
  ksel_e wc_cfg_ksel;
  logic [7:0] wc_cfg_n_og, wc_cfg_n_rt, wc_cfg_n_cg;
  logic [9:0] wc_cfg_n_idg, wc_in_wr_c, wc_in_wr_idg, wc_w_wr_addr;
  logic [4:0] wc_in_wr_r;
  logic [Q*B*PIX_W-1:0] wc_in_wr_data;
  logic [2:0] wc_w_wr_row;
  logic signed [WT_W-1:0] wc_w_wr_data [Q][OMEGA][OMEGA];
  logic signed [OUT_W-1:0] wc_y [M][N][B][OMEGA][OMEGA];
  logic wc_y_valid [M][N];
  logic [TAG_W-1:0] wc_y_tag [M][N];
  logic hk_in_valid = 0, hk_in_first = 0, hk_in_last = 0, hk_out_valid, hk_tail_valid;
  logic signed [3:0] hk_f [HN];
  logic signed [3:0] hk_g [HK];
  logic signed [9:0] hk_y_out [HN];
  logic signed [9:0] hk_tail_out [HK-1];
  logic lr_beat_valid = 0, lr_swap = 0, lr_wl_full, lr_in_valid = 0, lr_in_first = 0, lr_in_last = 0;
  logic lr_out_valid;
  logic [511:0] lr_beat_data;
  logic signed [15:0] lr_in_data [CII];
  logic signed [47:0] lr_out [COO];

  logic lp_in_valid = 0, lp_in_ready, lp_out_valid, lp_out_ready = 1;
  logic signed [15:0] lp_in_data [8];
  logic signed [15:0] lp_out_data [8];

  hls_accel_top dut (.*);

  int checks = 0, failures = 0, tiles_seen;
  int n_3x3 = 0, n_1x1 = 0, n_accum = 0, n_hk_overlap = 0, n_hk_tail = 0, n_lr_swap = 0, n_lr_mac = 0;
  int pix [B][ID][MAXR][MAXC];
  int g [OD][ID][3][3];
  int cur_m, cur_k;
  int hk_q [$];

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  `include "tb_top_wino.svh"

  // HiKonv outputs in stream order
  always @(negedge clk) if (rst_n) begin
    if (hk_out_valid) for (int j = 0; j < HN; j++) chk(int'(hk_y_out[j]) == hk_q.pop_front(), "hikonv output");
    if (hk_tail_valid) begin
      n_hk_tail++;
      for (int j = 0; j < HK - 1; j++) chk(int'(hk_tail_out[j]) == hk_q.pop_front(), "hikonv tail");
    end
  end

  task automatic hk_sequence(int x);
    int fs [];
    int gs [HK];
    fs = new[x * HN];
    foreach (fs[i]) fs[i] = $signed($urandom_range(15)) - 8;
    foreach (gs[k]) gs[k] = $signed($urandom_range(15)) - 8;
    for (int n = 0; n < x * HN + HK - 1; n++) begin
      int e;
      e = 0;
      for (int k = 0; k < HK; k++) if (n - k >= 0 && n - k < x * HN) e += fs[n-k] * gs[k];
      hk_q.push_back(e);
      if (n >= HN && n % HN < HK - 1 && n < x * HN) n_hk_overlap++;
    end
    for (int c = 0; c < x; c++) begin
      hk_in_valid = 1; hk_in_first = (c == 0); hk_in_last = (c == x - 1);
      for (int i = 0; i < HN; i++) hk_f[i] = 4'(fs[c*HN + i]);
      for (int k = 0; k < HK; k++) hk_g[k] = 4'(gs[k]);
      @(negedge clk);
    end
    hk_in_valid = 0; hk_in_first = 0; hk_in_last = 0;
  endtask

  // LeNet pooling layer: request order built here, outputs checked in order
  int pm [24][24][8];
  int n_lp_out = 0, lp_sent = 0, lp_first = -1;
  always @(negedge clk) if (rst_n && lp_out_valid) begin
    int x, y, e;
    x = n_lp_out / 12; y = n_lp_out % 12;
    if (n_lp_out == 0) lp_first = lp_sent;
    for (int c = 0; c < 8; c++) begin
      e = 0;
      for (int k = 0; k < 4; k++) if (pm[2*x + k/2][2*y + k%2][c] > e) e = pm[2*x + k/2][2*y + k%2][c];
      chk(int'(lp_out_data[c]) == e, "pooling output");
    end
    n_lp_out++;
  end
  task automatic lp_image();
    foreach (pm[i, j, c]) pm[i][j][c] = $signed($urandom_range(65535)) - 32768;
    // windows do not overlap (F = S = 2): each output's four pixels in turn
    for (int n = 0; n < 576; n++) begin
      int x, y;
      x = 2 * ((n / 4) / 12) + (n % 4) / 2; y = 2 * ((n / 4) % 12) + n % 2;
      lp_in_valid = 1;
      foreach (lp_in_data[c]) lp_in_data[c] = 16'(pm[x][y][c]);
      forever begin
        bit rdy;
        rdy = lp_in_ready;
        @(negedge clk);
        if (rdy) break;
      end
      lp_sent++;
      lp_in_valid = 0;
    end
    wait (n_lp_out == 144);
  endtask

  // LRCN: send one weight tile as beats, overlapped with a MAC sequence that
  // uses the weights swapped in before (w_cur)
  int w_next [COO][CII];
  int w_cur  [COO][CII];
  task automatic lr_tile(bit compute);
    logic [1535:0] grp;
    longint acc [COO];
    int t;
    foreach (w_next[co, ci]) w_next[co][ci] = $signed($urandom_range(4095)) - 2048;
    foreach (acc[co]) acc[co] = 0;
    t = 0;
    for (int ch = 0; ch < COO * CII / WL; ch++) begin
      for (int i = 0; i < WL; i++) grp[12*i +: 12] = 12'(w_next[(ch*WL + i) / CII][(ch*WL + i) % CII]);
      for (int bt = 0; bt < 3; bt++) begin
        lr_beat_valid = 1; lr_beat_data = grp[512*bt +: 512];
        lr_in_valid = compute; lr_in_first = (t == 0); lr_in_last = (t == 8);
        foreach (lr_in_data[ci]) lr_in_data[ci] = 16'($urandom());
        if (compute && t <= 8)
          foreach (acc[co]) for (int ci = 0; ci < CII; ci++) acc[co] += longint'(w_cur[co][ci]) * lr_in_data[ci];
        if (t == 8) lr_in_valid = compute;
        else if (t > 8) lr_in_valid = 0;
        t++;
        @(negedge clk);
        if (compute && t == 9) begin
          chk(lr_out_valid, "lrcn result valid");
          foreach (acc[co]) chk(lr_out[co] == 48'(acc[co]), "lrcn result");
          n_lr_mac++;
        end
      end
    end
    lr_beat_valid = 0; lr_in_valid = 0; lr_in_first = 0; lr_in_last = 0;
    @(negedge clk);
    chk(lr_wl_full, "lrcn bank loaded");
    lr_swap = 1; @(negedge clk); lr_swap = 0;
    n_lr_swap++;
    w_cur = w_next;
  endtask

  initial begin
    wc_cfg_ksel = KSEL_1X1; wc_cfg_n_og = 0; wc_cfg_n_rt = 0; wc_cfg_n_cg = 0; wc_cfg_n_idg = 0;
    wc_in_wr_r = 0; wc_in_wr_c = 0; wc_in_wr_idg = 0; wc_in_wr_data = 0;
    wc_w_wr_row = 0; wc_w_wr_addr = 0; wc_w_wr_data = '{default: '0};
    hk_f = '{default: '0}; hk_g = '{default: '0}; lr_beat_data = 0; lr_in_data = '{default: '0};
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    wino_layer(KSEL_3X3);
    wino_layer(KSEL_1X1);
    for (int s = 0; s < 20; s++) hk_sequence($urandom_range(6, 1));
    lr_tile(0);
    for (int s = 0; s < 3; s++) lr_tile(1);
    lp_in_data = '{default: '0};
    lp_image();
    repeat (6) @(negedge clk);
    chk(hk_q.size() == 0, "hikonv outputs missing");
    chk(n_3x3 > 0, "3x3 mode never ran");
    chk(n_1x1 > 0, "1x1 mode never ran");
    chk(n_accum > 0, "channel accumulation never ran");
    chk(n_hk_overlap > 0, "hikonv overlap-add never ran");
    chk(n_hk_tail == 20, "hikonv tails");
    chk(n_lr_swap > 1, "lrcn ping-pong never ran");
    chk(n_lr_mac > 0, "lrcn accumulation never ran");
    chk(n_lp_out == 144, "pooling outputs");
    chk(lp_first == 4, "pooling did not overlap with its input");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
