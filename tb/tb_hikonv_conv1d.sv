// tb_hikonv_conv1d: streams random signed 4-bit sequences of X*N values
// (X from 1 to 12, back to back and with gaps between sequences) against
// random K-value kernels and compares the streamed outputs plus the K-1 tail
// values with the full direct 1D convolution of the whole sequence. It counts
// how many outputs needed the overlap-add between neighbouring chunks and
// fails if that never happened.
module tb_hikonv_conv1d;
  import hikonv_pkg::*;
  localparam int P = 4, QB = 4;
  localparam int N = int'(best_nk(27, 18, P, QB) / 256);
  localparam int K = int'(best_nk(27, 18, P, QB) % 256);
  localparam int S = int'(slice_w(P, QB, N, K));
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid = 0, in_first = 0, in_last = 0, out_valid, tail_valid;
  logic signed [P-1:0]  f [N];
  logic signed [QB-1:0] g [K];
  logic signed [S:0]    y_out [N];
  logic signed [S:0]    tail_out [K-1];

  hikonv_conv1d dut (.*);

  int exp_q [$];     // expected outputs in stream order
  int tail_q [$];    // expected tails, K-1 per sequence
  int lat_q [$];
  int checks = 0, failures = 0, cyc = 0, n_overlap = 0, n_tail = 0;
  always @(posedge clk) cyc <= cyc + 1;

  always @(negedge clk) if (rst_n) begin
    if (out_valid) begin
      checks++;
      if (cyc - lat_q.pop_front() != 4) begin failures++; $display("latency wrong"); end
      for (int j = 0; j < N; j++) begin
        int e;
        e = exp_q.pop_front();
        checks++;
        if (int'(y_out[j]) != e) begin
          failures++;
          if (failures < 6) $display("y_out[%0d]=%0d expected %0d", j, y_out[j], e);
        end
      end
    end
    if (tail_valid) begin
      n_tail++;
      for (int j = 0; j < K - 1; j++) begin
        int e;
        e = tail_q.pop_front();
        checks++;
        if (int'(tail_out[j]) != e) begin
          failures++;
          if (failures < 6) $display("tail[%0d]=%0d expected %0d", j, tail_out[j], e);
        end
      end
    end
  end

  task automatic sequence_run(int x);
    int fs [];
    int gs [K];
    fs = new[x * N];
    for (int i = 0; i < x * N; i++) fs[i] = $signed($urandom_range(15)) - 8;
    for (int k = 0; k < K; k++) gs[k] = $signed($urandom_range(15)) - 8;
    for (int n = 0; n < x * N + K - 1; n++) begin
      int e;
      e = 0;
      for (int k = 0; k < K; k++)
        if (n - k >= 0 && n - k < x * N) e += fs[n-k] * gs[k];
      if (n < x * N) exp_q.push_back(e); else tail_q.push_back(e);
      if (n >= N && (n % N) < K - 1 && n < x * N) n_overlap++;
    end
    for (int c = 0; c < x; c++) begin
      in_valid = 1; in_first = (c == 0); in_last = (c == x - 1);
      for (int i = 0; i < N; i++) f[i] = P'(fs[c * N + i]);
      for (int k = 0; k < K; k++) g[k] = QB'(gs[k]);
      lat_q.push_back(cyc);
      @(negedge clk);
    end
    in_valid = 0; in_first = 0; in_last = 0;
  endtask

  initial begin
    int nseq;
    f = '{default: '0}; g = '{default: '0};
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    nseq = 0;
    for (int s = 0; s < 300; s++) begin
      sequence_run($urandom_range(12, 1));
      nseq++;
      repeat ($urandom_range(2)) @(negedge clk);
    end
    repeat (8) @(negedge clk);
    checks += 3;
    if (exp_q.size() != 0 || tail_q.size() != 0) begin failures++; $display("outputs missing"); end
    if (n_overlap == 0) begin failures++; $display("overlap-add never exercised"); end
    if (n_tail != nseq) begin failures++; $display("tails %0d of %0d", n_tail, nseq); end
    $display("overlap-added outputs %0d, sequences %0d", n_overlap, nseq);
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
