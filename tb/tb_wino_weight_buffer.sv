// tb_wino_weight_buffer: writes random weight tiles into every bank at random
// addresses, then reads addresses back: every array row must see its own
// bank's tile one cycle after the read request.
module tb_wino_weight_buffer;
  import wino_pkg::*;
  localparam int M = 8, Q = 4, DEPTH = 1024, NA = 40;
  logic clk = 0;
  always #5 clk = ~clk;

  logic wr_en = 0, rd_en = 0;
  logic [2:0] wr_row;
  logic [9:0] wr_addr, rd_addr;
  logic signed [WT_W-1:0] wr_data [Q][OMEGA][OMEGA];
  logic signed [WT_W-1:0] rd_data [M][Q][OMEGA][OMEGA];

  wino_weight_buffer dut (.*);

  logic signed [WT_W-1:0] mirror [M][NA][Q][OMEGA][OMEGA];
  int addrs [NA];
  int checks = 0, failures = 0;

  initial begin
    wr_row = 0; wr_addr = 0; rd_addr = 0; wr_data = '{default: '0};
    for (int a = 0; a < NA; a++) addrs[a] = a * 25 + (a % 3);   // spread over the depth
    @(negedge clk);
    for (int r = 0; r < M; r++)
      for (int a = 0; a < NA; a++) begin
        for (int q = 0; q < Q; q++)
          for (int i = 0; i < 4; i++)
            for (int j = 0; j < 4; j++) begin
              mirror[r][a][q][i][j] = WT_W'($urandom());
              wr_data[q][i][j] = mirror[r][a][q][i][j];
            end
        wr_en = 1; wr_row = 3'(r); wr_addr = 10'(addrs[a]);
        @(negedge clk);
      end
    wr_en = 0;
    for (int t = 0; t < 100; t++) begin
      int a;
      a = $urandom_range(NA - 1);
      rd_en = 1; rd_addr = 10'(addrs[a]);
      @(negedge clk);
      rd_en = 0;
      for (int r = 0; r < M; r++) begin
        checks++;
        if (rd_data[r] != mirror[r][a]) begin
          failures++;
          if (failures < 5) $display("row %0d address %0d wrong", r, addrs[a]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
