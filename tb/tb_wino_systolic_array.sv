// tb_wino_systolic_array: a 3 x 2 array (Q = 2, B = 1) fed with random tile
// streams. Each PE (i,j) must produce A^T (sum_g sum_q U_j (.) V_i) A for its
// column's input stream and its row's weight stream, exactly i + j + 1 cycles
// after the last channel group was presented (the systolic skew).
module tb_wino_systolic_array;
  import wino_pkg::*;
  localparam int M = 3, N = 2, Q = 2, B = 1, G = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic signed [U_W-1:0]   u_col [N][B][Q][OMEGA][OMEGA];
  wino_ctl_t               ctl;
  logic signed [WT_W-1:0]  v_row [M][Q][OMEGA][OMEGA];
  logic signed [OUT_W-1:0] y       [M][N][B][OMEGA][OMEGA];
  logic                    y_valid [M][N];
  logic [TAG_W-1:0]        y_tag   [M][N];
  ksel_e                   y_ksel  [M][N];

  wino_systolic_array #(.M(M), .N(N), .Q(Q), .B(B)) dut (.*);

  int checks = 0, failures = 0, cyc = 0, t_last, seen;
  longint e [M][N][4][4];
  int at1 [4][4] = '{'{1, 1, 1, 0}, '{0, 1, -1, 0}, '{0, 1, 1, 0}, '{0, 1, -1, -1}};
  int at3 [4][4] = '{'{1, 1, 1, 0}, '{0, 1, -1, -1}, '{0, 1, 1, 0}, '{0, 1, -1, -1}};
  ksel_e cur;

  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) begin
    #1;
    for (int i = 0; i < M; i++)
      for (int j = 0; j < N; j++)
        if (rst_n && y_valid[i][j]) begin
          seen++;
          checks++;
          if (cyc != t_last + i + j + 1) begin
            failures++; $display("PE(%0d,%0d) at cycle %0d, expected %0d", i, j, cyc, t_last + i + j + 1);
          end
          for (int a = 0; a < 4; a++)
            for (int c = 0; c < 4; c++) begin
              longint r;
              r = 0;
              for (int x = 0; x < 4; x++)
                for (int z = 0; z < 4; z++)
                  r += longint'(cur == KSEL_3X3 ? at3[a][x] : at1[a][x]) * e[i][j][x][z] *
                       longint'(cur == KSEL_3X3 ? at3[c][z] : at1[c][z]);
              if (cur == KSEL_3X3 && (a > 1 || c > 1)) r = 0;
              checks++;
              if (longint'(y[i][j][0][a][c]) != r) begin
                failures++;
                if (failures < 6) $display("PE(%0d,%0d) y[%0d][%0d]=%0d expected %0d", i, j, a, c, y[i][j][0][a][c], r);
              end
            end
        end
  end

  task automatic run(ksel_e ks);
    cur = ks; seen = 0;
    e = '{default: 0};
    for (int g = 0; g < G; g++) begin
      @(negedge clk);
      for (int j = 0; j < N; j++)
        for (int q = 0; q < Q; q++)
          for (int a = 0; a < 4; a++)
            for (int c = 0; c < 4; c++)
              u_col[j][0][q][a][c] = U_W'($signed($urandom_range(1023)) - 512);
      for (int i = 0; i < M; i++)
        for (int q = 0; q < Q; q++)
          for (int a = 0; a < 4; a++)
            for (int c = 0; c < 4; c++)
              v_row[i][q][a][c] = WT_W'($signed($urandom_range(65535)) - 32768);
      for (int i = 0; i < M; i++)
        for (int j = 0; j < N; j++)
          for (int q = 0; q < Q; q++)
            for (int a = 0; a < 4; a++)
              for (int c = 0; c < 4; c++)
                e[i][j][a][c] += longint'(u_col[j][0][q][a][c]) * longint'(v_row[i][q][a][c]);
      ctl.valid = 1; ctl.first = (g == 0); ctl.last = (g == G - 1); ctl.ksel = ks; ctl.tag = 7;
      if (g == G - 1) t_last = cyc;
    end
    @(negedge clk);
    ctl = '0;
    u_col = '{default: '0}; v_row = '{default: '0};
    repeat (M + N + 3) @(negedge clk);
    checks++;
    if (seen != M * N) begin failures++; $display("%0d PE results, expected %0d", seen, M * N); end
  endtask

  initial begin
    ctl = '0; u_col = '{default: '0}; v_row = '{default: '0};
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(KSEL_1X1);
    run(KSEL_3X3);
    run(KSEL_1X1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
