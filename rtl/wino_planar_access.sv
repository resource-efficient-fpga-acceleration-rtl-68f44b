// wino_planar_access: cuts N Winograd input tiles out of one buffer-matrix
// window, with a moving step that follows the kernel size.
//
// The input buffer returns an HB x WB window in bank order. A three-stage
// pipeline turns it into the N overlapping omega x omega tiles
//   T_N[n] = in[r : r+omega-1][c+n*m : c+n*m+omega-1]
// needed by the N columns of the PE array (m = 4 for 1x1 kernels, 2 for 3x3):
//   stage 1 registers the window,
//   stage 2 (row multiplexers) rotates the rows so that row 0 is feature-map
//           row r, using roff = r % HB,
//   stage 3 (column multiplexers) picks, for tile n and tile column j, bank
//           column (coff + n*m + j) % WB, with coff = c % WB.
// The select values are computed on the fly from the offsets and the kernel
// selection carried in the control word, so windows may start anywhere. The
// stage split follows the WinoCNN memory subsystem; HB >= omega and
// WB >= (N-1)*m + omega are required.
//
// Timing: 3 cycles from in_valid/in_ctl to out_ctl; one window per cycle.
module wino_planar_access
  import wino_pkg::*;
#(
  parameter int HB   = 4,
  parameter int WB   = 8,
  parameter int N    = 2,
  parameter int WORD = 64   // bits per buffer word (Q*B pixels)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [WORD-1:0]         in_data [HB][WB],
  input  logic [$clog2(HB)-1:0]   in_roff,
  input  logic [$clog2(WB)-1:0]   in_coff,
  input  wino_ctl_t               in_ctl,
  output logic [WORD-1:0]         out_tile [N][OMEGA][OMEGA],
  output wino_ctl_t               out_ctl
);

  localparam int HBW = $clog2(HB);
  localparam int WBW = $clog2(WB);

  // stage 1
  logic [WORD-1:0]   s1_data [HB][WB];
  logic [HBW-1:0]    s1_roff;
  logic [WBW-1:0]    s1_coff;
  wino_ctl_t         s1_ctl;
  // stage 2
  logic [WORD-1:0]   s2_plane [OMEGA][WB];
  logic [WBW-1:0]    s2_coff;
  wino_ctl_t         s2_ctl;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_data  <= '{default: '0};
      s1_roff  <= '0;
      s1_coff  <= '0;
      s1_ctl   <= '0;
      s2_plane <= '{default: '0};
      s2_coff  <= '0;
      s2_ctl   <= '0;
      out_tile <= '{default: '0};
      out_ctl  <= '0;
    end else begin
      // stage 1: register the bank outputs
      s1_data <= in_data;
      s1_roff <= in_roff;
      s1_coff <= in_coff;
      s1_ctl  <= in_ctl;
      // stage 2: row-plane multiplexers
      for (int i = 0; i < OMEGA; i++) begin
        for (int w = 0; w < WB; w++) begin
          s2_plane[i][w] <= s1_data[HBW'(s1_roff + HBW'(i))][w];
        end
      end
      s2_coff <= s1_coff;
      s2_ctl  <= s1_ctl;
      // stage 3: column multiplexers, step m between tiles
      for (int n = 0; n < N; n++) begin
        for (int i = 0; i < OMEGA; i++) begin
          for (int j = 0; j < OMEGA; j++) begin
            out_tile[n][i][j] <=
              s2_plane[i][WBW'(s2_coff + WBW'(n * int'(tile_m(s2_ctl.ksel)) + j))];
          end
        end
      end
      out_ctl <= s2_ctl;
    end
  end

endmodule
