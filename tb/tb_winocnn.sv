// tb_winocnn: end-to-end check of the Winograd systolic engine at its default
// size (8 x 2 PEs, 4 channels x 2 images per PE).
//
// Two layers are run from random data: a 3x3 convolution (F4(2x2,3x3)) and a
// 1x1 convolution (F4(4x4,1x1)), each with 8 input channels (two channel
// groups, so every PE accumulates) and 16 output channels (two output-channel
// groups). Weights are transformed here as V = (2G) g (2G)^T, so each output
// is 4x the direct convolution, which this bench computes with plain loops.
// Every output tile of every PE is compared, and the number of cycles from
// start to done is checked against (ID/Q)(OD/M)(RS/m)(OW/(N m)) issue cycles
// plus the fixed pipeline depth.
module tb_winocnn;
  import wino_pkg::*;

  localparam int M = 8, N = 2, Q = 4, B = 2;
  localparam int ID = 8, OD = 16;
  localparam int MAXR = 8, MAXC = 18;
  localparam int PIPE = 4 + (M - 1) + (N - 1) + 2;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0;
  ksel_e cfg_ksel;
  logic [7:0] cfg_n_og, cfg_n_rt, cfg_n_cg;
  logic [9:0] cfg_n_idg;
  logic busy, done;
  logic in_wr_en = 0;
  logic [4:0] in_wr_r;
  logic [9:0] in_wr_c, in_wr_idg;
  logic [Q*B*PIX_W-1:0] in_wr_data;
  logic w_wr_en = 0;
  logic [2:0] w_wr_row;
  logic [9:0] w_wr_addr;
  logic signed [WT_W-1:0] w_wr_data [Q][OMEGA][OMEGA];
  logic signed [OUT_W-1:0] y [M][N][B][OMEGA][OMEGA];
  logic y_valid [M][N];
  logic [TAG_W-1:0] y_tag [M][N];

  winocnn dut (.*);

  int checks = 0, failures = 0;
  int tiles_seen, cyc = 0, t_start, t_done, n_3x3 = 0, n_1x1 = 0, n_accum = 0;

  int pix [B][ID][MAXR][MAXC];
  int g   [OD][ID][3][3];
  int cur_m, cur_k;

  always_ff @(posedge clk) cyc <= cyc + 1;

  // Collect and check every finished output tile.
  always @(posedge clk) begin
    for (int i = 0; i < M; i++) begin
      for (int j = 0; j < N; j++) begin
        if (rst_n && y_valid[i][j]) begin
          int og, rt, cg, oc, tc;
          og = int'(y_tag[i][j][23:16]); rt = int'(y_tag[i][j][15:8]); cg = int'(y_tag[i][j][7:0]);
          oc = og * M + i; tc = cg * N + j;
          tiles_seen++;
          for (int b = 0; b < B; b++) begin
            for (int a = 0; a < cur_m; a++) begin
              for (int e = 0; e < cur_m; e++) begin
                longint ref_v;
                int orow, ocol;
                ref_v = 0; orow = rt * cur_m + a; ocol = tc * cur_m + e;
                for (int ic = 0; ic < ID; ic++)
                  for (int kh = 0; kh < cur_k; kh++)
                    for (int kw = 0; kw < cur_k; kw++)
                      ref_v += pix[b][ic][orow+kh][ocol+kw] * g[oc][ic][kh][kw];
                checks++;
                if (longint'(y[i][j][b][a][e]) != 4 * ref_v) begin
                  failures++;
                  if (failures < 10)
                    $display("MISMATCH pe(%0d,%0d) b%0d oc%0d (%0d,%0d): got %0d exp %0d",
                             i, j, b, oc, orow, ocol, y[i][j][b][a][e], 4 * ref_v);
                end
              end
            end
          end
        end
      end
    end
  end

  // 2G for the two kernel sizes (rows), used for V = (2G) g (2G)^T.
  function automatic int g2(int k, int r, int c);
    int g3 [4][3] = '{'{2, 0, 0}, '{1, 1, 1}, '{1, -1, 1}, '{0, 0, 2}};
    int g1 [4]    = '{2, 1, 1, 2};
    if (k == 3) return g3[r][c];
    return (c == 0) ? g1[r] : 0;
  endfunction

  task automatic run_layer(ksel_e ks);
    int m, k, rows_out, cols_out, rows_in, cols_in, n_rt, n_cg, n_idg, n_og, expect_tiles;
    m = int'(tile_m(ks)); k = (ks == KSEL_3X3) ? 3 : 1;
    cur_m = m; cur_k = k;
    rows_out = 4; cols_out = (ks == KSEL_3X3) ? 8 : 16;
    rows_in = rows_out + k - 1; cols_in = cols_out + k - 1;
    n_rt = rows_out / m; n_cg = cols_out / (N * m); n_idg = ID / Q; n_og = OD / M;
    // random data
    for (int b = 0; b < B; b++)
      for (int ic = 0; ic < ID; ic++)
        for (int r = 0; r < MAXR; r++)
          for (int c = 0; c < MAXC; c++)
            pix[b][ic][r][c] = (r < rows_in && c < cols_in) ? $signed($urandom_range(255)) - 128 : 0;
    for (int oc = 0; oc < OD; oc++)
      for (int ic = 0; ic < ID; ic++)
        for (int kh = 0; kh < 3; kh++)
          for (int kw = 0; kw < 3; kw++)
            g[oc][ic][kh][kw] = (kh < k && kw < k) ? $signed($urandom_range(15)) - 8 : 0;
    // configuration first: the input buffer address mapping uses cfg_n_idg
    cfg_ksel = ks; cfg_n_og = 8'(n_og); cfg_n_rt = 8'(n_rt); cfg_n_cg = 8'(n_cg);
    cfg_n_idg = 10'(n_idg);
    // load input buffer
    @(negedge clk);
    for (int idg = 0; idg < n_idg; idg++)
      for (int r = 0; r < rows_in; r++)
        for (int c = 0; c < cols_in; c++) begin
          in_wr_en = 1; in_wr_r = 5'(r); in_wr_c = 10'(c); in_wr_idg = 10'(idg);
          for (int q = 0; q < Q; q++)
            for (int b = 0; b < B; b++)
              in_wr_data[(q*B + b)*PIX_W +: PIX_W] = 8'(pix[b][idg*Q+q][r][c]);
          @(negedge clk);
        end
    in_wr_en = 0;
    // load transformed weights
    for (int oc = 0; oc < OD; oc++)
      for (int idg = 0; idg < n_idg; idg++) begin
        w_wr_en = 1; w_wr_row = 3'(oc % M); w_wr_addr = 10'((oc / M) * n_idg + idg);
        for (int q = 0; q < Q; q++)
          for (int i = 0; i < OMEGA; i++)
            for (int j = 0; j < OMEGA; j++) begin
              int v = 0;
              for (int a = 0; a < k; a++)
                for (int c = 0; c < k; c++)
                  v += g2(k, i, a) * g[oc][idg*Q+q][a][c] * g2(k, j, c);
              w_wr_data[q][i][j] = 16'(v);
            end
        @(negedge clk);
      end
    w_wr_en = 0;
    // run
    tiles_seen = 0;
    start = 1; t_start = cyc; @(negedge clk); start = 0;
    wait (done); t_done = cyc;
    repeat (3) @(negedge clk);
    expect_tiles = n_og * M * n_rt * n_cg * N;
    checks++;
    if (tiles_seen != expect_tiles) begin
      failures++; $display("tile count %0d expected %0d", tiles_seen, expect_tiles);
    end
    checks++;
    if (t_done - t_start != n_idg * n_og * n_rt * n_cg + PIPE + 2) begin
      failures++;
      $display("latency %0d expected %0d", t_done - t_start, n_idg * n_og * n_rt * n_cg + PIPE + 2);
    end
    if (ks == KSEL_3X3) n_3x3++; else n_1x1++;
    if (n_idg > 1) n_accum++;
  endtask

  initial begin
    cfg_ksel = KSEL_1X1; cfg_n_og = 0; cfg_n_rt = 0; cfg_n_cg = 0; cfg_n_idg = 0;
    in_wr_r = 0; in_wr_c = 0; in_wr_idg = 0; in_wr_data = 0;
    w_wr_row = 0; w_wr_addr = 0; w_wr_data = '{default: '0};
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    run_layer(KSEL_3X3);
    run_layer(KSEL_1X1);
    run_layer(KSEL_3X3);
    // every mechanism must have been exercised
    checks++; if (n_3x3 == 0) begin failures++; $display("3x3 mode never ran"); end
    checks++; if (n_1x1 == 0) begin failures++; $display("1x1 mode never ran"); end
    checks++; if (n_accum == 0) begin failures++; $display("channel accumulation never ran"); end
    $display("runs: 3x3=%0d 1x1=%0d", n_3x3, n_1x1);
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
