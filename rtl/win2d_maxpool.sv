// win2d_maxpool: 2D-window layer module of the layer-pipelined LeNet/CifarNet
// design, in its max-pooling + ReLU form.
//
// Layers of the pipeline pass "data chunks" (all C channels of one pixel)
// through FIFOs. Every layer receives its input chunks in a fixed order, its
// request list, chosen so that the next layer's outputs can be produced as
// early as possible (backward scheduling): for each output pixel of the
// next layer's order (row-major here), the not yet requested pixels of its
// F x F window are appended to the list. A second list holds, for each output,
// how many input chunks must have arrived before it can be computed. Both
// lists are computed at elaboration by constant functions and sit in ROMs.
//
// The module stores each arriving chunk in its buffer RAM at the coordinate
// from the request list. Whenever the received count reaches the next
// entry of the computation list, it stops taking input, reads the window's
// chunks one per cycle (positions in the padding are skipped), takes the
// per-channel maximum with 0 as the starting value (ReLU folded in) and
// offers the result chunk on the output. The request list and this
// behaviour follow the source design; the visiting order inside a window,
// the folding of ReLU into the maximum and the valid/ready handshakes are
// this design's choices.
//
// Interface: in_valid/in_ready and out_valid/out_ready handshakes, one chunk
// of C signed DATA_W-bit values per transfer. After the last output of an
// image and the last input chunk, the module starts over with the next
// image (one idle cycle).
// Timing: one input chunk per cycle while receiving; an output takes F*F+1
// cycles of reads plus the output handshake.
module win2d_maxpool #(
  parameter int HI     = 24,  // input rows
  parameter int WI     = 24,  // input columns
  parameter int C      = 8,   // channels per chunk
  parameter int DATA_W = 16,
  parameter int F      = 2,   // window size
  parameter int S      = 2,   // stride
  parameter int Z      = 0    // padding
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  output logic                     in_ready,
  input  logic signed [DATA_W-1:0] in_data [C],
  output logic                     out_valid,
  input  logic                     out_ready,
  output logic signed [DATA_W-1:0] out_data [C]
);

  localparam int HO  = (HI + 2 * Z - F) / S + 1;
  localparam int WO  = (WI + 2 * Z - F) / S + 1;
  localparam int NIN = HI * WI;
  localparam int NO  = HO * WO;
  localparam int AW  = $clog2(NIN + 1);
  localparam int OW  = $clog2(NO + 1);

  // request list: buffer address (i*WI + j) of the n-th received chunk
  function automatic logic [NIN*AW-1:0] gen_req();
    logic [NIN*AW-1:0] r;
    logic [NIN-1:0]    seen;
    int                n, i, j;
    r = '0; seen = '0; n = 0;
    for (int x = 0; x < HO; x++)
      for (int y = 0; y < WO; y++)
        for (int h = 0; h < F; h++)
          for (int w = 0; w < F; w++) begin
            i = x * S - Z + h;
            j = y * S - Z + w;
            if (i >= 0 && i < HI && j >= 0 && j < WI && !seen[i*WI + j]) begin
              seen[i*WI + j] = 1'b1;
              r[n*AW +: AW] = AW'(i * WI + j);
              n++;
            end
          end
    // pixels no window uses are requested last so every chunk has a place
    for (int k = 0; k < NIN; k++)
      if (!seen[k]) begin
        r[n*AW +: AW] = AW'(k);
        n++;
      end
    return r;
  endfunction

  // computation list: chunks needed before output number o can be computed
  function automatic logic [NO*AW-1:0] gen_comp();
    logic [NO*AW-1:0] r;
    logic [NIN-1:0]   seen;
    int               n, i, j;
    r = '0; seen = '0; n = 0;
    for (int x = 0; x < HO; x++)
      for (int y = 0; y < WO; y++) begin
        for (int h = 0; h < F; h++)
          for (int w = 0; w < F; w++) begin
            i = x * S - Z + h;
            j = y * S - Z + w;
            if (i >= 0 && i < HI && j >= 0 && j < WI && !seen[i*WI + j]) begin
              seen[i*WI + j] = 1'b1;
              n++;
            end
          end
        r[(x*WO + y)*AW +: AW] = AW'(n);
      end
    return r;
  endfunction

  localparam logic [NIN*AW-1:0] REQ_ROM  = gen_req();
  localparam logic [NO*AW-1:0]  COMP_ROM = gen_comp();

  typedef enum logic [1:0] {ST_RECV, ST_READ, ST_OUT} state_e;

  logic [C*DATA_W-1:0]     buffer [NIN];
  state_e                  state;
  logic [AW-1:0]           rcv_cnt;     // chunks received of this image
  logic [OW-1:0]           out_idx;     // next output (row-major)
  logic [$clog2(HO+1)-1:0] ox;
  logic [$clog2(WO+1)-1:0] oy;
  logic [$clog2(F*F+1)-1:0] k;          // window position being read
  logic                    rd_ok;       // previous cycle read a real pixel
  logic [C*DATA_W-1:0]     rd_word;
  logic                    comp_ready;
  logic                    pos_in;
  int                      pi, pj;
  logic [C*DATA_W-1:0]     in_word;

  always_comb
    for (int c = 0; c < C; c++) in_word[c*DATA_W +: DATA_W] = in_data[c];

  assign comp_ready = (out_idx < OW'(NO)) && (rcv_cnt >= COMP_ROM[int'(out_idx)*AW +: AW]);
  assign in_ready   = (state == ST_RECV) && !comp_ready && (rcv_cnt < AW'(NIN));

  // pixel of window position k
  always_comb begin
    pi = int'(ox) * S - Z + int'(k) / F;
    pj = int'(oy) * S - Z + int'(k) % F;
    pos_in = (int'(k) < F * F) && pi >= 0 && pi < HI && pj >= 0 && pj < WI;
  end

  // buffer RAM: written in request-list order, read one window pixel per cycle
  always_ff @(posedge clk) begin
    if (in_valid && in_ready)
      buffer[REQ_ROM[int'(rcv_cnt)*AW +: AW]] <= in_word;
    if (state == ST_READ && pos_in)
      rd_word <= buffer[pos_in ? pi * WI + pj : 0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= ST_RECV;
      rcv_cnt   <= '0;
      out_idx   <= '0;
      ox        <= '0;
      oy        <= '0;
      k         <= '0;
      rd_ok     <= 1'b0;
      out_valid <= 1'b0;
      out_data  <= '{default: '0};
    end else begin
      case (state)
        ST_RECV: begin
          if (out_idx == OW'(NO) && rcv_cnt == AW'(NIN)) begin
            // image complete: start the next one
            out_idx <= '0; ox <= '0; oy <= '0; rcv_cnt <= '0;
          end else if (comp_ready) begin
            state    <= ST_READ;
            k        <= '0;
            rd_ok    <= 1'b0;
            out_data <= '{default: '0};   // ReLU: the maximum starts at 0
          end else if (in_valid && in_ready) begin
            rcv_cnt <= rcv_cnt + 1'b1;
          end
        end
        ST_READ: begin
          // fold in the word read in the previous cycle
          if (rd_ok)
            for (int c = 0; c < C; c++)
              if ($signed(rd_word[c*DATA_W +: DATA_W]) > out_data[c])
                out_data[c] <= $signed(rd_word[c*DATA_W +: DATA_W]);
          rd_ok <= pos_in;
          if (int'(k) == F * F) begin
            state     <= ST_OUT;
            out_valid <= 1'b1;
          end else begin
            k <= k + 1'b1;
          end
        end
        default: begin  // ST_OUT
          if (out_ready) begin
            out_valid <= 1'b0;
            state     <= ST_RECV;
            out_idx <= out_idx + 1'b1;
            if (int'(oy) == WO - 1) begin
              oy <= '0;
              ox <= ox + 1'b1;
            end else begin
              oy <= oy + 1'b1;
            end
          end
        end
      endcase
    end
  end

endmodule
