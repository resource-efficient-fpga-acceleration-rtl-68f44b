// lrcn_weight_unpacker: regroups 12-bit weights from a power-of-two memory bus.
//
// 512 bits do not hold a whole number of 12-bit weights, so weights are laid
// out back to back across bus words and three consecutive 512-bit beats
// (1536 bits) are collected and cut into 128 weights. No bus bit is wasted
// and the layer receives 128 weights every three cycles at full bus rate.
// The weight stream is stored in memory in the order the MAC tile consumes
// it. Bit order (weight i = bits [12i+11 : 12i] of {beat2, beat1, beat0},
// beat 0 first) is this design's choice.
//
// Timing: out_valid pulses (registered) one cycle after the third beat.
module lrcn_weight_unpacker #(
  parameter int BUS_W  = 512,
  parameter int WT_W   = 12,
  parameter int NBEATS = 3,
  parameter int NW     = BUS_W * NBEATS / WT_W   // 128
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   beat_valid,
  input  logic [BUS_W-1:0]       beat_data,
  output logic                   out_valid,
  output logic signed [WT_W-1:0] out_w [NW]
);

  logic [BUS_W*(NBEATS-1)-1:0]  collect;   // earlier beats of the group
  logic [$clog2(NBEATS+1)-1:0]  cnt;
  logic [BUS_W*NBEATS-1:0]      full_word;

  assign full_word = {beat_data, collect};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      collect   <= '0;
      cnt       <= '0;
      out_valid <= 1'b0;
      out_w     <= '{default: '0};
    end else begin
      out_valid <= 1'b0;
      if (beat_valid) begin
        // shift right by one beat; the newest beat enters at the top
        collect <= full_word[BUS_W*NBEATS-1 -: BUS_W*(NBEATS-1)];
        if (cnt == ($clog2(NBEATS+1))'(NBEATS - 1)) begin
          cnt       <= '0;
          out_valid <= 1'b1;
          for (int i = 0; i < NW; i++) out_w[i] <= full_word[WT_W*i +: WT_W];
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end

  initial begin
    assert (BUS_W * NBEATS == NW * WT_W) else $error("beats must hold a whole number of weights");
  end

endmodule
