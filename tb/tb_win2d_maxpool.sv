// tb_win2d_maxpool: feeds two random 24x24x8 feature maps, 16-bit signed,
// into the LeNet pooling layer module in the request order of the backward
// schedule (built here with a list and a membership search, as in the
// scheduling algorithm), with random input gaps and random output
// back-pressure. Every output chunk must equal the ReLU of the 2x2 window
// maximum, in row-major order. It also checks that outputs are produced
// while input is still arriving: the first output must come after exactly
// F*F input chunks, not after the whole map.
module tb_win2d_maxpool;
  localparam int HI = 24, WI = 24, C = 8, DATA_W = 16, F = 2, S = 2;
  localparam int HO = HI / S, WO = WI / S;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic signed [DATA_W-1:0] in_data [C];
  logic signed [DATA_W-1:0] out_data [C];

  win2d_maxpool dut (.*);

  int img [HI][WI][C];
  int req_i [$], req_j [$];
  int checks = 0, failures = 0, n_out = 0, n_in = 0, n_stall = 0, first_out_at = -1;

  function automatic bit listed(int i, int j);
    foreach (req_i[n]) if (req_i[n] == i && req_j[n] == j) return 1;
    return 0;
  endfunction

  // choose the back-pressure for the next edge, then check the chunk that
  // edge will transfer (outputs in row-major order)
  always @(negedge clk) begin
    int x, y, e;
    out_ready = ($urandom_range(3) != 0);
    if (rst_n && out_valid && !out_ready) n_stall++;
    if (rst_n && out_valid && out_ready) begin
    x = (n_out % (HO * WO)) / WO; y = n_out % WO;
    if (n_out == 0) first_out_at = n_in;
    for (int c = 0; c < C; c++) begin
      e = 0;
      for (int h = 0; h < F; h++)
        for (int w = 0; w < F; w++)
          if (img[x*S+h][y*S+w][c] > e) e = img[x*S+h][y*S+w][c];
      checks++;
      if (int'(out_data[c]) != e) begin
        failures++;
        if (failures < 6) $display("out (%0d,%0d) ch%0d = %0d expected %0d", x, y, c, out_data[c], e);
      end
    end
    n_out++;
    end
  end

  initial begin
    in_data = '{default: '0};
    // request order of the backward schedule, next layer in row-major order
    for (int x = 0; x < HO; x++)
      for (int y = 0; y < WO; y++)
        for (int h = 0; h < F; h++)
          for (int w = 0; w < F; w++)
            if (!listed(x*S + h, y*S + w)) begin
              req_i.push_back(x*S + h);
              req_j.push_back(y*S + w);
            end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int im = 0; im < 2; im++) begin
      foreach (img[i, j, c]) img[i][j][c] = $signed($urandom_range(65535)) - 32768;
      for (int n = 0; n < HI * WI; n++) begin
        while ($urandom_range(4) == 0) @(negedge clk);
        in_valid = 1;
        for (int c = 0; c < C; c++) in_data[c] = DATA_W'(img[req_i[n]][req_j[n]][c]);
        // in_ready does not depend on in_valid: sample it before the edge
        forever begin
          bit rdy;
          rdy = in_ready;
          @(negedge clk);
          if (rdy) break;
        end
        n_in++;
        in_valid = 0;
      end
      wait (n_out == (im + 1) * HO * WO);
      @(negedge clk);
    end
    checks += 3;
    if (n_out != 2 * HO * WO) begin failures++; $display("%0d outputs", n_out); end
    if (first_out_at != F * F) begin failures++; $display("first output after %0d inputs", first_out_at); end
    if (n_stall == 0) begin failures++; $display("output back-pressure never happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
