// tb_wino_controller: runs the loop sequencer for several layer shapes in both
// kernel modes and compares every issued request (window corner, channel
// group, weight address, first/last flags, tag) with the loop nest
// og -> rt -> cg -> idg written out here. It also checks that exactly
// (OD/M)(RS/m)(OW/(N m))(ID/Q) requests are issued on consecutive cycles
// and that done pulses with the last one.
module tb_wino_controller;
  import wino_pkg::*;
  localparam int N = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0;
  ksel_e cfg_ksel;
  logic [7:0] cfg_n_og, cfg_n_rt, cfg_n_cg;
  logic [9:0] cfg_n_idg;
  logic busy, done, req_en;
  logic [4:0] req_r;
  logic [9:0] req_c, req_idg, req_waddr;
  wino_ctl_t req_ctl;

  wino_controller dut (.*);

  int checks = 0, failures = 0;

  task automatic run(ksel_e ks, int n_og, int n_rt, int n_cg, int n_idg);
    int mm, cnt;
    mm = (ks == KSEL_3X3) ? 2 : 4;
    cfg_ksel = ks; cfg_n_og = 8'(n_og); cfg_n_rt = 8'(n_rt); cfg_n_cg = 8'(n_cg);
    cfg_n_idg = 10'(n_idg);
    start = 1; @(negedge clk); start = 0;
    cnt = 0;
    for (int og = 0; og < n_og; og++)
      for (int rt = 0; rt < n_rt; rt++)
        for (int cg = 0; cg < n_cg; cg++)
          for (int idg = 0; idg < n_idg; idg++) begin
            bit ok;
            ok = req_en && req_ctl.valid && busy
              && req_r == 5'(rt * mm) && req_c == 10'(cg * N * mm) && req_idg == 10'(idg)
              && req_waddr == 10'(og * n_idg + idg)
              && req_ctl.first == (idg == 0) && req_ctl.last == (idg == n_idg - 1)
              && req_ctl.ksel == ks && req_ctl.tag == TAG_W'({8'(og), 8'(rt), 8'(cg)});
            checks++;
            if (!ok) begin
              failures++;
              if (failures < 6) $display("request og%0d rt%0d cg%0d idg%0d wrong", og, rt, cg, idg);
            end
            cnt++;
            @(negedge clk);
            if (cnt == n_og * n_rt * n_cg * n_idg) begin
              checks++;
              if (!done) begin failures++; $display("done missing"); end
            end else begin
              checks++;
              if (done) begin failures++; $display("early done"); end
            end
          end
    checks++;
    if (req_en || busy) begin failures++; $display("extra requests"); end
    @(negedge clk);
  endtask

  initial begin
    cfg_ksel = KSEL_1X1; cfg_n_og = 0; cfg_n_rt = 0; cfg_n_cg = 0; cfg_n_idg = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++;
    if (req_en) begin failures++; $display("request while idle"); end
    run(KSEL_3X3, 2, 2, 3, 4);
    run(KSEL_1X1, 1, 1, 4, 1);
    run(KSEL_1X1, 3, 2, 2, 2);
    run(KSEL_3X3, 1, 3, 1, 1);
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
