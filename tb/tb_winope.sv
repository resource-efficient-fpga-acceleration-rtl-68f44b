// tb_winope: one WinoPE (Q = 4, B = 2) fed with random transformed tiles.
// For several output tiles of 1..3 channel groups, in both kernel modes, the
// PE result is compared with A_sel^T (sum of U (.) V) A_sel computed here from
// the integer matrices, including the zeroed outputs of the 2x2 mode. Also
// checks the one-cycle output latency and the one-cycle systolic forwarding.
module tb_winope;
  import wino_pkg::*;
  localparam int Q = 4, B = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic signed [U_W-1:0]   u_in  [B][Q][OMEGA][OMEGA];
  wino_ctl_t               ctl_in;
  logic signed [WT_W-1:0]  v_in  [Q][OMEGA][OMEGA];
  logic signed [U_W-1:0]   u_out [B][Q][OMEGA][OMEGA];
  wino_ctl_t               ctl_out;
  logic signed [WT_W-1:0]  v_out [Q][OMEGA][OMEGA];
  logic signed [OUT_W-1:0] y     [B][OMEGA][OMEGA];
  logic                    y_valid;
  logic [TAG_W-1:0]        y_tag;
  ksel_e                   y_ksel;

  winope #(.Q(Q), .B(B)) dut (.*);

  int checks = 0, failures = 0;
  longint e [B][4][4];
  int at1 [4][4] = '{'{1, 1, 1, 0}, '{0, 1, -1, 0}, '{0, 1, 1, 0}, '{0, 1, -1, -1}};
  int at3 [4][4] = '{'{1, 1, 1, 0}, '{0, 1, -1, -1}, '{0, 1, 1, 0}, '{0, 1, -1, -1}};

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run_tile(ksel_e ks, int groups, int tag);
    e = '{default: 0};
    for (int gi = 0; gi < groups; gi++) begin
      for (int b = 0; b < B; b++)
        for (int q = 0; q < Q; q++)
          for (int i = 0; i < 4; i++)
            for (int j = 0; j < 4; j++)
              u_in[b][q][i][j] = U_W'($signed($urandom_range(1023)) - 512);
      for (int q = 0; q < Q; q++)
        for (int i = 0; i < 4; i++)
          for (int j = 0; j < 4; j++)
            v_in[q][i][j] = WT_W'($signed($urandom_range(65535)) - 32768);
      for (int b = 0; b < B; b++)
        for (int i = 0; i < 4; i++)
          for (int j = 0; j < 4; j++)
            for (int q = 0; q < Q; q++)
              e[b][i][j] += longint'(u_in[b][q][i][j]) * longint'(v_in[q][i][j]);
      ctl_in.valid = 1; ctl_in.first = (gi == 0); ctl_in.last = (gi == groups - 1);
      ctl_in.ksel = ks; ctl_in.tag = TAG_W'(tag);
      @(posedge clk); #1;
      // systolic forwarding: what went in appears on the outputs one cycle later
      check(u_out == u_in && v_out == v_in && ctl_out == ctl_in, "forwarding");
      check(y_valid == (gi == groups - 1), "y_valid timing");
    end
    ctl_in = '0;
    for (int b = 0; b < B; b++)
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 4; j++) begin
          longint r = 0;
          int mm = (ks == KSEL_3X3) ? 2 : 4;
          for (int a = 0; a < 4; a++)
            for (int c = 0; c < 4; c++)
              r += longint'(ks == KSEL_3X3 ? at3[i][a] : at1[i][a]) * e[b][a][c] *
                   longint'(ks == KSEL_3X3 ? at3[j][c] : at1[j][c]);
          if (i >= mm || j >= mm) r = 0;
          checks++;
          if (longint'(y[b][i][j]) != r) begin
            failures++;
            if (failures < 8) $display("y[%0d][%0d][%0d]=%0d expected %0d", b, i, j, y[b][i][j], r);
          end
        end
    check(y_tag == TAG_W'(tag) && y_ksel == ks, "tag/ksel");
    @(posedge clk); #1;
    check(!y_valid, "y_valid is a pulse");
  endtask

  initial begin
    ctl_in = '0;
    u_in = '{default: '0}; v_in = '{default: '0};
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 20; t++) run_tile(t % 2 ? KSEL_3X3 : KSEL_1X1, 1 + t % 3, t);
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
