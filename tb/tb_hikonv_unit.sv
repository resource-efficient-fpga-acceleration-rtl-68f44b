// tb_hikonv_unit: drives random signed 4-bit feature chunks f[N] and kernels
// g[K] (including the extreme values -8 and 7) into the packed-multiplication
// convolution unit, one per cycle with random gaps, and compares every result
// with the direct convolution y[n] = sum_k f[n-k] g[k]. It also checks the
// three-cycle latency and that the derived sizes are N=3, K=2, S=9 for a
// 27x18 multiplier.
module tb_hikonv_unit;
  import hikonv_pkg::*;
  localparam int P = 4, QB = 4;
  localparam int N = int'(best_nk(27, 18, P, QB) / 256);
  localparam int K = int'(best_nk(27, 18, P, QB) % 256);
  localparam int S = int'(slice_w(P, QB, N, K));
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid = 0, out_valid;
  logic signed [P-1:0]  f [N];
  logic signed [QB-1:0] g [K];
  logic signed [S-1:0]  y [N+K-1];

  hikonv_unit dut (.*);

  int exp_q [$];   // expected values, N+K-1 per result
  int t_q [$];
  int checks = 0, failures = 0, cyc = 0, sent = 0;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic int rnd4();
    int r;
    r = $urandom_range(9);
    if (r == 0) return -8;
    if (r == 1) return 7;
    return $signed($urandom_range(15)) - 8;
  endfunction

  always @(negedge clk) if (rst_n) begin
    if (out_valid) begin
      checks++;
      if (cyc - t_q.pop_front() != 3) begin failures++; $display("latency wrong"); end
      for (int n = 0; n < N + K - 1; n++) begin
        int e;
        e = exp_q.pop_front();
        checks++;
        if (int'(y[n]) != e) begin
          failures++;
          if (failures < 6) $display("y[%0d]=%0d expected %0d", n, y[n], e);
        end
      end
    end
  end

  initial begin
    checks++;
    if (N != 3 || K != 2 || S != 9) begin failures++; $display("sizes N=%0d K=%0d S=%0d", N, K, S); end
    f = '{default: '0}; g = '{default: '0};
    repeat (2) @(negedge clk);
    rst_n = 1;
    while (sent < 3000) begin
      @(negedge clk);
      in_valid = ($urandom_range(3) != 0);
      if (in_valid) begin
        int e;
        for (int i = 0; i < N; i++) f[i] = P'(rnd4());
        for (int k = 0; k < K; k++) g[k] = QB'(rnd4());
        for (int n = 0; n < N + K - 1; n++) begin
          e = 0;
          for (int k = 0; k < K; k++)
            if (n - k >= 0 && n - k < N) e += int'(f[n-k]) * int'(g[k]);
          exp_q.push_back(e);
        end
        t_q.push_back(cyc);
        sent++;
      end
    end
    @(negedge clk); in_valid = 0;
    repeat (6) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d results missing", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
