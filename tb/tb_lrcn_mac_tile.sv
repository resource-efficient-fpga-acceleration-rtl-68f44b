// tb_lrcn_mac_tile: loads random 12-bit weight tiles (COO x CII, 128 weights
// per beat in consumption order) into the idle bank, swaps, and runs
// accumulation sequences of random length with random 16-bit data against a
// reference dot product. While one tile computes, the next is loaded into the
// other bank (ping-pong); results must still use the old weights until the
// swap. Counts swaps, overlapped loads and multi-cycle accumulations.
module tb_lrcn_mac_tile;
  localparam int CII = 24, COO = 16, DATA_W = 16, WT_W = 12, ACC_W = 48, WL = 128;
  localparam int NCHUNK = COO * CII / WL;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic wl_valid = 0, swap = 0, wl_full, in_valid = 0, in_first = 0, in_last = 0, out_valid;
  logic signed [WT_W-1:0]   wl_data [WL];
  logic signed [DATA_W-1:0] in_data [CII];
  logic signed [ACC_W-1:0]  out [COO];

  lrcn_mac_tile dut (.*);

  int w_next [COO][CII];
  int w_cur  [COO][CII];
  longint acc_ref [COO];
  int checks = 0, failures = 0, n_swap = 0, n_overlap = 0, n_multi = 0;

  // weights for the next tile; loaded chunk by chunk
  task automatic new_tile();
    for (int co = 0; co < COO; co++)
      for (int ci = 0; ci < CII; ci++) w_next[co][ci] = $signed($urandom_range(4095)) - 2048;
  endtask

  function automatic void set_chunk(int c);
    for (int i = 0; i < WL; i++)
      wl_data[i] = WT_W'(w_next[(c * WL + i) / CII][(c * WL + i) % CII]);
  endfunction

  // one accumulation sequence of len cycles; loads chunk `ld` in parallel
  // when ld >= 0 (one chunk per cycle)
  task automatic mac_seq(int len, int ld_from);
    int ld;
    ld = ld_from;
    for (int co = 0; co < COO; co++) acc_ref[co] = 0;
    for (int t = 0; t < len; t++) begin
      in_valid = 1; in_first = (t == 0); in_last = (t == len - 1);
      for (int ci = 0; ci < CII; ci++) in_data[ci] = DATA_W'($urandom());
      for (int co = 0; co < COO; co++)
        for (int ci = 0; ci < CII; ci++)
          acc_ref[co] += longint'(w_cur[co][ci]) * longint'(in_data[ci]);
      wl_valid = (ld >= 0 && ld < NCHUNK);
      if (wl_valid) begin set_chunk(ld); ld++; n_overlap++; end
      @(negedge clk);
    end
    in_valid = 0; in_first = 0; in_last = 0; wl_valid = 0;
    checks++;
    if (!out_valid) begin failures++; $display("no result"); end
    for (int co = 0; co < COO; co++) begin
      checks++;
      if (out[co] != ACC_W'(acc_ref[co])) begin
        failures++;
        if (failures < 6) $display("out[%0d]=%0d expected %0d", co, out[co], acc_ref[co]);
      end
    end
    if (len > 1) n_multi++;
  endtask

  initial begin
    wl_data = '{default: '0}; in_data = '{default: '0};
    repeat (2) @(negedge clk);
    rst_n = 1;
    // first tile: plain load, then swap
    new_tile();
    for (int c = 0; c < NCHUNK; c++) begin
      wl_valid = 1; set_chunk(c); @(negedge clk);
    end
    wl_valid = 0;
    checks++;
    if (!wl_full) begin failures++; $display("wl_full not set"); end
    swap = 1; @(negedge clk); swap = 0; n_swap++;
    w_cur = w_next;
    for (int tile = 0; tile < 12; tile++) begin
      new_tile();
      // load the next tile while computing with the current one
      mac_seq($urandom_range(8, 4), 0);
      checks++;
      if (!wl_full) begin failures++; $display("wl_full not set after overlapped load"); end
      mac_seq($urandom_range(5, 1), -1);
      mac_seq(1, -1);
      swap = 1; @(negedge clk); swap = 0; n_swap++;
      w_cur = w_next;
    end
    checks += 3;
    if (n_swap < 2)    begin failures++; $display("ping-pong swap not exercised"); end
    if (n_overlap == 0) begin failures++; $display("overlapped loading not exercised"); end
    if (n_multi == 0)  begin failures++; $display("accumulation not exercised"); end
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
