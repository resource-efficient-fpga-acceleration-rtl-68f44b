// hikonv_conv1d: long 1D convolution F(X*N, K) built from HiKonv F(N,K)
// operations.
//
// A feature sequence of X*N values streams in N values per cycle (one chunk
// f_x per cycle) against a fixed K-value kernel g. Each chunk gives a partial
// sequence y_x of N+K-1 values from one wide multiplication (hikonv_unit).
// Since y[n] = sum_x y_x[n - x*N], chunk x's first K-1 outputs overlap the
// last K-1 outputs of chunk x-1: the unit keeps those K-1 values and adds them
// in (shift-accumulate). Each cycle N finished outputs leave on y_out; after
// the chunk flagged in_last the K-1 tail outputs leave on tail_out. The
// overlap is added with separate small adders on the sliced values, one bit
// wider than a slice; this is this design's choice (the HiKonv formulation
// also allows adding packed words with extra guard bits).
//
// Timing: 4 cycles from a chunk to its N outputs (3 in the multiplier unit,
// 1 for the overlap-add register); one chunk per cycle.
// Requires K-1 <= N.
module hikonv_conv1d
  import hikonv_pkg::*;
#(
  parameter int BIT_A = 27,
  parameter int BIT_B = 18,
  parameter int P     = 4,
  parameter int QB    = 4,
  parameter int N     = int'(best_nk(BIT_A, BIT_B, P, QB) / 256),
  parameter int K     = int'(best_nk(BIT_A, BIT_B, P, QB) % 256),
  parameter int S     = int'(slice_w(P, QB, N, K))
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic                 in_first,  // first chunk of a sequence
  input  logic                 in_last,   // last chunk of a sequence
  input  logic signed [P-1:0]  f [N],
  input  logic signed [QB-1:0] g [K],
  output logic                 out_valid,
  output logic signed [S:0]    y_out [N],
  output logic                 tail_valid,
  output logic signed [S:0]    tail_out [K-1]
);

  logic                unit_valid;
  logic signed [S-1:0] unit_y [N+K-1];
  logic [2:0]          first_d, last_d;
  logic signed [S-1:0] carry [K-1];

  hikonv_unit #(.BIT_A(BIT_A), .BIT_B(BIT_B), .P(P), .QB(QB), .N(N), .K(K), .S(S)) u_unit (
    .clk, .rst_n, .in_valid, .f, .g, .out_valid(unit_valid), .y(unit_y));

  // flags follow the unit's three-stage pipeline
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      first_d <= '0;
      last_d  <= '0;
    end else begin
      first_d <= {first_d[1:0], in_first};
      last_d  <= {last_d[1:0],  in_last};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      carry      <= '{default: '0};
      out_valid  <= 1'b0;
      tail_valid <= 1'b0;
      y_out      <= '{default: '0};
      tail_out   <= '{default: '0};
    end else begin
      out_valid  <= unit_valid;
      tail_valid <= unit_valid && last_d[2];
      if (unit_valid) begin
        for (int j = 0; j < N; j++) begin
          if (j < K - 1 && !first_d[2])
            y_out[j] <= (S+1)'(unit_y[j]) + (S+1)'(carry[j < K - 1 ? j : 0]);
          else
            y_out[j] <= (S+1)'(unit_y[j]);
        end
        for (int j = 0; j < K - 1; j++) begin
          carry[j]    <= unit_y[N + j];
          tail_out[j] <= (S+1)'(unit_y[N + j]);
        end
      end
    end
  end

  initial begin
    assert (K - 1 <= N) else $error("hikonv_conv1d needs K-1 <= N");
  end

endmodule
