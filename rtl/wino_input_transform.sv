// wino_input_transform: Winograd input transform U = B^T d B for one 4x4 tile.
//
// The transform matrix B^T depends only on the Winograd filter size omega, so
// the same transform serves both kernel sizes of the engine (1x1 and 3x3).
// B^T uses the interpolation points 0, 1, -1 and infinity:
//   [1 0 -1 0; 0 1 1 0; 0 -1 1 0; 0 1 0 -1]
// so the transform is adds and subtracts only. Each output sums at most four
// pixels, hence U_W = PIX_W + 2.
//
// Interface: d is a 4x4 tile of signed pixels, u the transformed tile.
// Timing: purely combinational; the caller registers the result. The input
// tiles are transformed on chip as they leave the input buffer, as in the
// WinoCNN design; the exact B^T rows are the standard F(2x2,3x3) ones.
module wino_input_transform
  import wino_pkg::*;
(
  input  logic signed [PIX_W-1:0] d [OMEGA][OMEGA],
  output logic signed [U_W-1:0]   u [OMEGA][OMEGA]
);

  logic signed [U_W-1:0] t [OMEGA][OMEGA];  // t = B^T d

  always_comb begin
    for (int j = 0; j < OMEGA; j++) begin
      for (int i = 0; i < OMEGA; i++) begin
        t[i][j] = bt_dot(i, U_W'(d[0][j]), U_W'(d[1][j]), U_W'(d[2][j]), U_W'(d[3][j]));
      end
    end
    for (int i = 0; i < OMEGA; i++) begin
      for (int j = 0; j < OMEGA; j++) begin
        u[i][j] = bt_dot(j, t[i][0], t[i][1], t[i][2], t[i][3]);
      end
    end
  end

endmodule
