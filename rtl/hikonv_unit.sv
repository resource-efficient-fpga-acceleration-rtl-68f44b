// hikonv_unit: one HiKonv F(N,K) operation, a 1D convolution of N signed
// p-bit features f with K signed q-bit weights in a single BIT_A x BIT_B
// multiplication.
//
// Packing: the features are placed in S-bit slices of operand A, the weights
// in S-bit slices of operand B, so that A*B = sum_m y[m] 2^(S m) with
// y = f * g (N+K-1 values). With signed data, a negative slice borrows one
// from the slice above it; instead of a wide adder, each slice is formed as
// its value minus the sign bit of the slice below (a small decrement):
//   A[S(n+1)-1:Sn] = f[n] - A[Sn-1]
// The product is cut back into slices the same way in reverse:
//   y[m] = Prod[S(m+1)-1:Sm] + Prod[Sm-1]
// The packing/slicing equations and the N, K, S selection follow HiKonv; the
// register placement is this design's choice.
//
// Timing: three pipeline stages (pack, multiply, slice); in_valid to
// out_valid is 3 cycles, one operation per cycle.
module hikonv_unit
  import hikonv_pkg::*;
#(
  parameter int BIT_A = 27,
  parameter int BIT_B = 18,
  parameter int P     = 4,   // feature bits
  parameter int QB    = 4,   // weight bits
  parameter int N     = int'(best_nk(BIT_A, BIT_B, P, QB) / 256),
  parameter int K     = int'(best_nk(BIT_A, BIT_B, P, QB) % 256),
  parameter int S     = int'(slice_w(P, QB, N, K))
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [P-1:0]  f [N],
  input  logic signed [QB-1:0] g [K],
  output logic                 out_valid,
  output logic signed [S-1:0]  y [N+K-1]
);

  localparam int PW = BIT_A + BIT_B;

  // A slice value always fits in S bits: |f| < 2^(P-1) and the borrow is 1.
  // Packs a sequence into S-bit slices with the borrow correction; the top
  // slice is sign-extended to the operand width.
  function automatic logic [S*(N+K)+64-1:0] pack(int unsigned cnt, logic signed [S-1:0] v [N+K]);
    logic [S*(N+K)+64-1:0] w;
    logic                  borrow;
    logic [S-1:0]          sl;
    w = '0; borrow = 1'b0;
    for (int n = 0; n < N + K; n++) begin
      if (n < int'(cnt)) begin
        sl = v[n] - S'(borrow);
        w[S*n +: S] = sl;
        borrow = sl[S-1];
      end
    end
    for (int i = 0; i < S*(N+K)+64; i++)
      if (i >= S*int'(cnt)) w[i] = borrow;
    return w;
  endfunction

  logic signed [S-1:0] f_ext [N+K];
  logic signed [S-1:0] g_ext [N+K];
  always_comb begin
    for (int i = 0; i < N + K; i++) begin
      f_ext[i] = (i < N) ? S'(f[i < N ? i : 0]) : '0;
      g_ext[i] = (i < K) ? S'(g[i < K ? i : 0]) : '0;
    end
  end

  logic signed [BIT_A-1:0] a_q;
  logic signed [BIT_B-1:0] b_q;
  logic signed [PW-1:0]    prod_q;
  logic                    v1, v2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q <= '0; b_q <= '0; prod_q <= '0;
      v1 <= 1'b0; v2 <= 1'b0; out_valid <= 1'b0;
      y <= '{default: '0};
    end else begin
      // stage 1: packing
      v1 <= in_valid;
      if (in_valid) begin
        a_q <= BIT_A'(pack(N, f_ext));
        b_q <= BIT_B'(pack(K, g_ext));
      end
      // stage 2: the single wide multiplication
      v2 <= v1;
      if (v1) prod_q <= a_q * b_q;
      // stage 3: slicing with borrow correction
      out_valid <= v2;
      if (v2) begin
        for (int m = 0; m < N + K - 1; m++) begin
          if (m == 0) y[m] <= prod_q[S-1:0];
          else        y[m] <= prod_q[S*m +: S] + S'(prod_q[S*m-1]);
        end
      end
    end
  end

endmodule
