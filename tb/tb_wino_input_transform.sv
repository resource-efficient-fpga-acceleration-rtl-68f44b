// tb_wino_input_transform: random 4x4 tiles through U = B^T d B, compared
// with a matrix product computed here from the integer B^T matrix.
module tb_wino_input_transform;
  import wino_pkg::*;
  logic signed [PIX_W-1:0] d [OMEGA][OMEGA];
  logic signed [U_W-1:0]   u [OMEGA][OMEGA];
  int checks = 0, failures = 0;
  int bt [4][4] = '{'{1, 0, -1, 0}, '{0, 1, 1, 0}, '{0, -1, 1, 0}, '{0, 1, 0, -1}};

  wino_input_transform dut (.d, .u);

  initial begin
    for (int t = 0; t < 500; t++) begin
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 4; j++)
          d[i][j] = (t == 0) ? -8'sd128 : PIX_W'($urandom_range(255));
      #1;
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 4; j++) begin
          int r;
          r = 0;
          for (int a = 0; a < 4; a++)
            for (int b = 0; b < 4; b++)
              r += bt[i][a] * int'(d[a][b]) * bt[j][b];
          checks++;
          if (int'(u[i][j]) != r) begin
            failures++;
            if (failures < 5) $display("u[%0d][%0d] = %0d, expected %0d", i, j, u[i][j], r);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
