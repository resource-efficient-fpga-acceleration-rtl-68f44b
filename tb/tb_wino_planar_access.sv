// tb_wino_planar_access: feeds random 4 x 8 windows in bank order with random
// row/column offsets and both kernel modes, and checks that after exactly
// three cycles tile n, element (i,j) is the window pixel at row
// (roff + i) mod 4 and bank column (coff + n*m + j) mod 8, with m = 4 (1x1)
// or 2 (3x3). Back-to-back windows check the pipelining.
module tb_wino_planar_access;
  import wino_pkg::*;
  localparam int HB = 4, WB = 8, N = 2, WORD = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [WORD-1:0] in_data [HB][WB];
  logic [1:0]      in_roff;
  logic [2:0]      in_coff;
  wino_ctl_t       in_ctl;
  logic [WORD-1:0] out_tile [N][OMEGA][OMEGA];
  wino_ctl_t       out_ctl;

  wino_planar_access #(.HB(HB), .WB(WB), .N(N), .WORD(WORD)) dut (.*);

  typedef struct { logic [WORD-1:0] d [HB][WB]; int ro; int co; ksel_e k; } win_t;
  win_t hist [$];
  int checks = 0, failures = 0, sent = 0, got = 0;

  always @(posedge clk) begin
    #1;
    if (rst_n && out_ctl.valid) begin
      win_t w;
      int mm;
      w = hist.pop_front();
      got++;
      mm = (w.k == KSEL_3X3) ? 2 : 4;
      checks++;
      if (out_ctl.tag != TAG_W'(got - 1) || out_ctl.ksel != w.k) begin
        failures++; $display("control word out of order");
      end
      for (int n = 0; n < N; n++)
        for (int i = 0; i < 4; i++)
          for (int j = 0; j < 4; j++) begin
            checks++;
            if (out_tile[n][i][j] !== w.d[(w.ro + i) % HB][(w.co + n * mm + j) % WB]) begin
              failures++;
              if (failures < 6) $display("tile %0d (%0d,%0d) wrong", n, i, j);
            end
          end
    end
  end

  initial begin
    in_ctl = '0; in_roff = 0; in_coff = 0; in_data = '{default: '0};
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      win_t w;
      for (int h = 0; h < HB; h++)
        for (int x = 0; x < WB; x++) w.d[h][x] = WORD'($urandom());
      w.ro = $urandom_range(HB - 1); w.co = $urandom_range(WB - 1);
      w.k = ($urandom_range(1) == 1) ? KSEL_3X3 : KSEL_1X1;
      hist.push_back(w);
      in_data = w.d; in_roff = 2'(w.ro); in_coff = 3'(w.co);
      in_ctl.valid = 1; in_ctl.ksel = w.k; in_ctl.tag = TAG_W'(t);
      // a gap now and then
      @(negedge clk);
      if (t % 7 == 3) begin in_ctl = '0; @(negedge clk); end
    end
    in_ctl = '0;
    repeat (5) @(negedge clk);
    checks++;
    if (got != 200) begin failures++; $display("%0d tiles out, expected 200", got); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // latency: the first window must appear exactly 3 cycles after it entered
  initial begin
    int c0;
    wait (rst_n);
    @(posedge clk);
    c0 = 0;
    while (!out_ctl.valid) begin @(posedge clk); c0++; end
    checks++;
    if (c0 != 3) begin failures++; $display("latency %0d, expected 3", c0); end
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
