// wino_systolic_array: M x N systolic array of WinoPEs.
//
// PEs in the same row i work on the same output channel and therefore share
// one weight stream; PEs in the same column j work on the same output tile
// position and share one input tile stream. Instead of broadcasting (high
// fanout), weights enter at the left edge of each row and shift one PE right
// per cycle, and input tiles with their control word enter at the top of each
// column and shift one PE down per cycle, as in the WinoCNN systolic array.
// The edge streams are skewed here so that they meet: the tile for column j
// is delayed j cycles and the weights for row i are delayed i cycles, so PE
// (i,j) sees an operand pair i+j cycles after it was presented.
//
// Interface: u_col[j] / ctl are presented together for all columns in one
// cycle (one control word, common to the whole array); v_row[i] in the same
// cycle. y[i][j] with y_valid[i][j] is PE (i,j)'s finished output tile; it
// appears i+j+1 cycles after the last input-channel group was presented.
module wino_systolic_array
  import wino_pkg::*;
#(
  parameter int M = 8,   // rows: output channels in parallel
  parameter int N = 2,   // columns: output tiles in parallel
  parameter int Q = 4,
  parameter int B = 2
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [U_W-1:0]   u_col [N][B][Q][OMEGA][OMEGA],
  input  wino_ctl_t               ctl,
  input  logic signed [WT_W-1:0]  v_row [M][Q][OMEGA][OMEGA],
  output logic signed [OUT_W-1:0] y       [M][N][B][OMEGA][OMEGA],
  output logic                    y_valid [M][N],
  output logic [TAG_W-1:0]        y_tag   [M][N],
  output ksel_e                   y_ksel  [M][N]
);

  // Vertical links: index 0 is the top edge, index i feeds row i.
  logic signed [U_W-1:0]  u_link [M+1][N][B][Q][OMEGA][OMEGA];
  wino_ctl_t              c_link [M+1][N];
  // Horizontal links: index 0 is the left edge, index j feeds column j.
  logic signed [WT_W-1:0] v_link [M][N+1][Q][OMEGA][OMEGA];

  // Column skew: column j delayed by j cycles.
  for (genvar j = 0; j < N; j++) begin : g_col_skew
    if (j == 0) begin : g_direct
      assign u_link[0][0] = u_col[0];
      assign c_link[0][0] = ctl;
    end else begin : g_delay
      logic signed [U_W-1:0] u_d [j][B][Q][OMEGA][OMEGA];
      wino_ctl_t             c_d [j];
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          for (int k = 0; k < j; k++) begin
            u_d[k] <= '{default: '0};
            c_d[k] <= '0;
          end
        end else begin
          u_d[0] <= u_col[j];
          c_d[0] <= ctl;
          for (int k = 1; k < j; k++) begin
            u_d[k] <= u_d[k-1];
            c_d[k] <= c_d[k-1];
          end
        end
      end
      assign u_link[0][j] = u_d[j-1];
      assign c_link[0][j] = c_d[j-1];
    end
  end

  // Row skew: row i delayed by i cycles.
  for (genvar i = 0; i < M; i++) begin : g_row_skew
    if (i == 0) begin : g_direct
      assign v_link[0][0] = v_row[0];
    end else begin : g_delay
      logic signed [WT_W-1:0] v_d [i][Q][OMEGA][OMEGA];
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          for (int k = 0; k < i; k++) v_d[k] <= '{default: '0};
        end else begin
          v_d[0] <= v_row[i];
          for (int k = 1; k < i; k++) v_d[k] <= v_d[k-1];
        end
      end
      assign v_link[i][0] = v_d[i-1];
    end
  end

  for (genvar i = 0; i < M; i++) begin : g_row
    for (genvar j = 0; j < N; j++) begin : g_pe
      winope #(.Q(Q), .B(B)) u_pe (
        .clk     (clk),
        .rst_n   (rst_n),
        .u_in    (u_link[i][j]),
        .ctl_in  (c_link[i][j]),
        .v_in    (v_link[i][j]),
        .u_out   (u_link[i+1][j]),
        .ctl_out (c_link[i+1][j]),
        .v_out   (v_link[i][j+1]),
        .y       (y[i][j]),
        .y_valid (y_valid[i][j]),
        .y_tag   (y_tag[i][j]),
        .y_ksel  (y_ksel[i][j])
      );
    end
  end

endmodule
