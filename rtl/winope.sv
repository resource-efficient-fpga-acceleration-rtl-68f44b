// winope: Winograd processing element with multiple kernel-size support.
//
// Each cycle the PE takes Q input channels of B batch images as transformed
// 4x4 input tiles U, and the matching Q transformed 4x4 weight tiles V. It
// forms the element-wise products U (.) V (B*Q*16 multipliers), sums them over
// the Q channels with an adder tree, and accumulates that 4x4 sum over the
// input-channel groups of one output tile (ctl.first clears, ctl.last ends).
// On the last group it applies the selectable output transform
//   Y = A_sel^T E A_sel,   A_sel^T row 1 = [0 1 -1 s]
// with s = 0 for F4(4x4,1x1) (all 16 outputs valid) and s = -1 for
// F4(2x2,3x3) (the top-left 2x2 outputs valid, the rest are driven to 0).
// The kernel-sharing selection bit, the Q x B multiplier matrices and the LUT
// adder tree follow the WinoCNN PE. Accumulating before the output transform
// (the form of Eq. 5.1 of the WinoCNN formulation) rather than after it is
// this design's choice; both give the same result.
//
// Systolic links: u_in/ctl_in come from the PE above and leave registered on
// u_out/ctl_out to the PE below; v_in comes from the left and leaves
// registered on v_out to the right. One cycle per hop.
// Timing: y/y_valid/y_tag are registered and appear one cycle after the
// tile whose ctl.last is set.
module winope
  import wino_pkg::*;
#(
  parameter int Q = 4,   // input channels per cycle
  parameter int B = 2    // batch size
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [U_W-1:0]   u_in  [B][Q][OMEGA][OMEGA],
  input  wino_ctl_t               ctl_in,
  input  logic signed [WT_W-1:0]  v_in  [Q][OMEGA][OMEGA],
  output logic signed [U_W-1:0]   u_out [B][Q][OMEGA][OMEGA],
  output wino_ctl_t               ctl_out,
  output logic signed [WT_W-1:0]  v_out [Q][OMEGA][OMEGA],
  output logic signed [OUT_W-1:0] y     [B][OMEGA][OMEGA],
  output logic                    y_valid,
  output logic [TAG_W-1:0]        y_tag,
  output ksel_e                   y_ksel
);

  logic signed [ACC_W-1:0] e_sum [B][OMEGA][OMEGA];  // sum over Q of U (.) V
  logic signed [ACC_W-1:0] e_acc [B][OMEGA][OMEGA];  // running sum over groups
  logic signed [ACC_W-1:0] e_nxt [B][OMEGA][OMEGA];
  logic signed [OUT_W-1:0] t     [B][OMEGA][OMEGA];  // A^T E
  logic signed [OUT_W-1:0] y_nxt [B][OMEGA][OMEGA];  // A^T E A

  // Element-wise multiply and channel adder tree.
  always_comb begin
    for (int b = 0; b < B; b++) begin
      for (int i = 0; i < OMEGA; i++) begin
        for (int j = 0; j < OMEGA; j++) begin
          e_sum[b][i][j] = '0;
          for (int q = 0; q < Q; q++) begin
            e_sum[b][i][j] += ACC_W'(u_in[b][q][i][j]) * ACC_W'(v_in[q][i][j]);
          end
          e_nxt[b][i][j] = ctl_in.first ? e_sum[b][i][j] : e_acc[b][i][j] + e_sum[b][i][j];
        end
      end
    end
  end

  // Selectable output transform on the completed sum.
  always_comb begin
    for (int b = 0; b < B; b++) begin
      for (int j = 0; j < OMEGA; j++) begin
        for (int i = 0; i < OMEGA; i++) begin
          t[b][i][j] = at_dot(i, ctl_in.ksel,
                              OUT_W'(e_nxt[b][0][j]), OUT_W'(e_nxt[b][1][j]),
                              OUT_W'(e_nxt[b][2][j]), OUT_W'(e_nxt[b][3][j]));
        end
      end
      for (int i = 0; i < OMEGA; i++) begin
        for (int j = 0; j < OMEGA; j++) begin
          if (i < int'(tile_m(ctl_in.ksel)) && j < int'(tile_m(ctl_in.ksel)))
            y_nxt[b][i][j] = at_dot(j, ctl_in.ksel, t[b][i][0], t[b][i][1], t[b][i][2], t[b][i][3]);
          else
            y_nxt[b][i][j] = '0;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e_acc   <= '{default: '0};
      y       <= '{default: '0};
      y_valid <= 1'b0;
      y_tag   <= '0;
      y_ksel  <= KSEL_1X1;
      ctl_out <= '0;
      u_out   <= '{default: '0};
      v_out   <= '{default: '0};
    end else begin
      u_out   <= u_in;
      v_out   <= v_in;
      ctl_out <= ctl_in;
      y_valid <= ctl_in.valid && ctl_in.last;
      if (ctl_in.valid) begin
        e_acc <= e_nxt;
        if (ctl_in.last) begin
          y      <= y_nxt;
          y_tag  <= ctl_in.tag;
          y_ksel <= ctl_in.ksel;
        end
      end
    end
  end

endmodule
