// lrcn_mac_tile: the parameterised multiply-accumulate IP of the LRCN video
// description accelerator.
//
// The IP is a 2D unrolled tile of COO multiply-accumulate units, each CII
// wide: every cycle it takes CII input-channel values of one pixel and adds
//   out[coo] += sum_cii w[coo][cii] * in[cii]
// for all COO output channels at once. A convolution layer is built by
// reusing the tile over output pixels, kernel positions and channel tiles;
// the per-layer tile sizes come from the latency-optimal resource split
// (resources proportional to sqrt of each layer's work). Weights sit in a
// ping-pong pair of banks: one bank is loaded (WL weights per beat, in
// consumption order) while the other is used; `swap` exchanges them.
// Defaults follow the worked example (CII = 24, COO = 16) and the fixed-point
// formats of the LRCN (16-bit data, 12-bit weights).
//
// Interface: in_first clears the accumulators with this cycle's products,
// in_last makes the sums leave on out/out_valid one cycle later. The
// accumulator width and the fixed-point scaling (left to the consumer) are
// this design's choice.
module lrcn_mac_tile #(
  parameter int CII    = 24,
  parameter int COO    = 16,
  parameter int DATA_W = 16,
  parameter int WT_W   = 12,
  parameter int ACC_W  = 48,
  parameter int WL     = 128   // weights per load beat
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // weight load into the inactive bank
  input  logic                     wl_valid,
  input  logic signed [WT_W-1:0]   wl_data [WL],
  input  logic                     swap,
  output logic                     wl_full,   // inactive bank completely loaded
  // compute
  input  logic                     in_valid,
  input  logic                     in_first,
  input  logic                     in_last,
  input  logic signed [DATA_W-1:0] in_data [CII],
  output logic                     out_valid,
  output logic signed [ACC_W-1:0]  out [COO]
);

  localparam int NCHUNK = (COO * CII) / WL;

  logic signed [WT_W-1:0]  wbank [2][COO][CII];
  logic                    active;              // bank used by compute
  logic [$clog2(NCHUNK+1)-1:0] ptr;
  logic signed [ACC_W-1:0] acc [COO];
  logic signed [ACC_W-1:0] acc_nxt [COO];

  always_comb begin
    for (int co = 0; co < COO; co++) begin
      acc_nxt[co] = in_first ? '0 : acc[co];
      for (int ci = 0; ci < CII; ci++)
        acc_nxt[co] += ACC_W'(wbank[active][co][ci]) * ACC_W'(in_data[ci]);
    end
  end

  assign wl_full = (ptr == ($clog2(NCHUNK+1))'(NCHUNK));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wbank     <= '{default: '0};
      active    <= 1'b0;
      ptr       <= '0;
      acc       <= '{default: '0};
      out       <= '{default: '0};
      out_valid <= 1'b0;
    end else begin
      if (swap) begin
        active <= ~active;
        ptr    <= '0;
      end else if (wl_valid && !wl_full) begin
        for (int i = 0; i < WL; i++)
          wbank[~active][(int'(ptr) * WL + i) / CII][(int'(ptr) * WL + i) % CII] <= wl_data[i];
        ptr <= ptr + 1'b1;
      end
      out_valid <= in_valid && in_last;
      if (in_valid) begin
        acc <= acc_nxt;
        if (in_last) out <= acc_nxt;
      end
    end
  end

  initial begin
    assert ((COO * CII) % WL == 0) else $error("tile size must be a multiple of the load width");
  end

endmodule
