// tb_wino_buffer_matrix: fills the 4 x 8 bank matrix with a random feature
// map of 3 channel groups (12 rows x 24 columns), then reads 300 windows at
// random corners. Every bank output must hold the pixel of the window that
// maps to it (row r + ((h - r) mod 4), column c + ((w - c) mod 8)), one cycle
// after the request, with the corner offsets.
module tb_wino_buffer_matrix;
  import wino_pkg::*;
  localparam int HB = 4, WB = 8, Q = 4, B = 2, WORD = Q*B*PIX_W;
  localparam int NG = 3, ROWS = 12, COLS = 24;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [9:0] cfg_n_idg;
  logic wr_en = 0, rd_en = 0;
  logic [4:0] wr_r, rd_r;
  logic [9:0] wr_c, wr_idg, rd_c, rd_idg;
  logic [WORD-1:0] wr_data;
  logic [WORD-1:0] rd_data [HB][WB];
  logic rd_valid;
  logic [1:0] rd_roff;
  logic [2:0] rd_coff;

  wino_buffer_matrix dut (.*);

  logic [WORD-1:0] img [NG][ROWS][COLS];
  int checks = 0, failures = 0;

  initial begin
    cfg_n_idg = NG;
    wr_r = 0; wr_c = 0; wr_idg = 0; wr_data = 0; rd_r = 0; rd_c = 0; rd_idg = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int g = 0; g < NG; g++)
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < COLS; c++) begin
          img[g][r][c] = {$urandom(), $urandom()};
          wr_en = 1; wr_r = 5'(r); wr_c = 10'(c); wr_idg = 10'(g); wr_data = img[g][r][c];
          @(negedge clk);
        end
    wr_en = 0;
    for (int t = 0; t < 300; t++) begin
      int r0, c0, g0;
      r0 = $urandom_range(ROWS - HB); c0 = $urandom_range(COLS - WB); g0 = $urandom_range(NG - 1);
      rd_en = 1; rd_r = 5'(r0); rd_c = 10'(c0); rd_idg = 10'(g0);
      @(negedge clk);
      rd_en = 0;
      checks++;
      if (!rd_valid || rd_roff != 2'(r0 % HB) || rd_coff != 3'(c0 % WB)) begin
        failures++; $display("valid/offset wrong at read %0d", t);
      end
      for (int h = 0; h < HB; h++)
        for (int w = 0; w < WB; w++) begin
          int rr, cc;
          rr = r0 + ((h - r0 % HB + HB) % HB);
          cc = c0 + ((w - c0 % WB + WB) % WB);
          checks++;
          if (rd_data[h][w] !== img[g0][rr][cc]) begin
            failures++;
            if (failures < 6) $display("bank(%0d,%0d) corner (%0d,%0d) g%0d wrong", h, w, r0, c0, g0);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
