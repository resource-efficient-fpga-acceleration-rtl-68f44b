// tb_top_wino.svh: Winograd part of the top-level bench, included inside
// tb_hls_accel_top. It checks every output tile of the Winograd engine
// against a direct convolution (outputs are 4x the convolution because the
// weights are loaded as (2G) g (2G)^T) and provides the layer task
// wino_layer(ksel) that fills the input and weight buffers with random data,
// runs one layer and counts the tiles. It uses the bench's signals.
  // Winograd output tiles
  always @(posedge clk) if (rst_n)
    for (int i = 0; i < M; i++)
      for (int j = 0; j < N; j++)
        if (wc_y_valid[i][j]) begin
          int oc, rt, tc;
          oc = int'(wc_y_tag[i][j][23:16]) * M + i; rt = int'(wc_y_tag[i][j][15:8]);
          tc = int'(wc_y_tag[i][j][7:0]) * N + j;
          tiles_seen++;
          for (int b = 0; b < B; b++)
            for (int a = 0; a < cur_m; a++)
              for (int e = 0; e < cur_m; e++) begin
                longint r;
                r = 0;
                for (int ic = 0; ic < ID; ic++)
                  for (int kh = 0; kh < cur_k; kh++)
                    for (int kw = 0; kw < cur_k; kw++)
                      r += pix[b][ic][rt*cur_m+a+kh][tc*cur_m+e+kw] * g[oc][ic][kh][kw];
                chk(longint'(wc_y[i][j][b][a][e]) == 4 * r, "winograd output");
              end
        end

  function automatic int g2(int k, int r, int c);
    int g3 [4][3] = '{'{2, 0, 0}, '{1, 1, 1}, '{1, -1, 1}, '{0, 0, 2}};
    int g1 [4]    = '{2, 1, 1, 2};
    if (k == 3) return g3[r][c];
    return (c == 0) ? g1[r] : 0;
  endfunction

  task automatic wino_layer(ksel_e ks);
    int m, k, ri, ci, n_rt, n_cg, n_idg;
    m = int'(tile_m(ks)); k = (ks == KSEL_3X3) ? 3 : 1;
    cur_m = m; cur_k = k;
    n_rt = 4 / m; n_cg = ((ks == KSEL_3X3) ? 8 : 16) / (N * m); n_idg = ID / Q;
    ri = 4 + k - 1; ci = n_cg * N * m + k - 1;
    for (int b = 0; b < B; b++) for (int ic = 0; ic < ID; ic++)
      for (int r = 0; r < MAXR; r++) for (int c = 0; c < MAXC; c++)
        pix[b][ic][r][c] = (r < ri && c < ci) ? $signed($urandom_range(255)) - 128 : 0;
    for (int oc = 0; oc < OD; oc++) for (int ic = 0; ic < ID; ic++)
      for (int kh = 0; kh < 3; kh++) for (int kw = 0; kw < 3; kw++)
        g[oc][ic][kh][kw] = (kh < k && kw < k) ? $signed($urandom_range(15)) - 8 : 0;
    wc_cfg_ksel = ks; wc_cfg_n_og = 8'(OD / M); wc_cfg_n_rt = 8'(n_rt); wc_cfg_n_cg = 8'(n_cg);
    wc_cfg_n_idg = 10'(n_idg);
    @(negedge clk);
    for (int idg = 0; idg < n_idg; idg++)
      for (int r = 0; r < ri; r++)
        for (int c = 0; c < ci; c++) begin
          wc_in_wr_en = 1; wc_in_wr_r = 5'(r); wc_in_wr_c = 10'(c); wc_in_wr_idg = 10'(idg);
          for (int q = 0; q < Q; q++) for (int b = 0; b < B; b++)
            wc_in_wr_data[(q*B + b)*PIX_W +: PIX_W] = 8'(pix[b][idg*Q+q][r][c]);
          @(negedge clk);
        end
    wc_in_wr_en = 0;
    for (int oc = 0; oc < OD; oc++)
      for (int idg = 0; idg < n_idg; idg++) begin
        wc_w_wr_en = 1; wc_w_wr_row = 3'(oc % M); wc_w_wr_addr = 10'((oc / M) * n_idg + idg);
        for (int q = 0; q < Q; q++) for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) begin
          int v;
          v = 0;
          for (int a = 0; a < k; a++) for (int c = 0; c < k; c++)
            v += g2(k, i, a) * g[oc][idg*Q+q][a][c] * g2(k, j, c);
          wc_w_wr_data[q][i][j] = 16'(v);
        end
        @(negedge clk);
      end
    wc_w_wr_en = 0;
    tiles_seen = 0;
    wc_start = 1; @(negedge clk); wc_start = 0;
    wait (wc_done);
    repeat (3) @(negedge clk);
    chk(tiles_seen == OD * n_rt * n_cg * N, "winograd tile count");
    if (ks == KSEL_3X3) n_3x3++; else n_1x1++;
    if (n_idg > 1) n_accum++;
  endtask

