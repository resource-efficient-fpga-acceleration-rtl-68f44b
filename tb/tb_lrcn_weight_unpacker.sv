// tb_lrcn_weight_unpacker: packs random 12-bit weight groups back to back
// into 512-bit bus beats (weight i at bits [12i+11:12i] of the three-beat
// group, beat 0 first), sends them with random idle cycles between beats and
// checks every unpacked group of 128 weights and that a group leaves one
// cycle after its third beat, i.e. full bus rate gives 128 weights per three
// cycles.
module tb_lrcn_weight_unpacker;
  localparam int BUS_W = 512, WT_W = 12, NBEATS = 3, NW = 128, NG = 200;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic beat_valid = 0, out_valid;
  logic [BUS_W-1:0] beat_data;
  logic signed [WT_W-1:0] out_w [NW];

  lrcn_weight_unpacker dut (.*);

  logic [WT_W-1:0] exp_q [$];
  int t_q [$];
  int checks = 0, failures = 0, cyc = 0, groups = 0;
  always @(posedge clk) cyc <= cyc + 1;

  always @(negedge clk) if (rst_n && out_valid) begin
    groups++;
    checks++;
    if (cyc - t_q.pop_front() != 1) begin failures++; $display("group %0d late", groups); end
    for (int i = 0; i < NW; i++) begin
      logic [WT_W-1:0] e;
      e = exp_q.pop_front();
      checks++;
      if (out_w[i] != e) begin
        failures++;
        if (failures < 6) $display("group %0d weight %0d wrong", groups, i);
      end
    end
  end

  initial begin
    logic [BUS_W*NBEATS-1:0] grp;
    beat_data = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int g = 0; g < NG; g++) begin
      for (int i = 0; i < NW; i++) begin
        logic [WT_W-1:0] w;
        w = WT_W'($urandom());
        grp[WT_W*i +: WT_W] = w;
        exp_q.push_back(w);
      end
      for (int b = 0; b < NBEATS; b++) begin
        if (g >= NG / 2) repeat ($urandom_range(2)) @(negedge clk);   // idle gaps
        beat_valid = 1;
        beat_data = grp[BUS_W*b +: BUS_W];
        if (b == NBEATS - 1) t_q.push_back(cyc);
        @(negedge clk);
        beat_valid = 0;
      end
    end
    repeat (4) @(negedge clk);
    checks++;
    if (groups != NG) begin failures++; $display("%0d groups of %0d", groups, NG); end
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
