// wino_controller: loop sequencer of the WinoCNN engine for one block of
// output rows of a convolution layer.
//
// It walks the tiled loops of the WinoCNN mapping and issues one request per
// cycle: L1 over output-channel groups of M (og), L3 over output tile rows
// within the block (rt, step m), L4 over column groups of N tiles (cg, step
// N*m) and, innermost, L2 over input-channel groups of Q (idg). Keeping L2
// innermost lets each PE accumulate one output tile in registers and emit it
// after the last channel group; this loop order is this design's choice
// (the WinoCNN loop nest places L2 outside the tile loops and accumulates in
// per-PE output buffers).
//
// Each request carries the input window corner (r, c) relative to the block,
// the channel group, the weight-buffer address og*n_idg + idg, and a control
// word with first/last flags and the tag {og, rt, cg}.
// Interface: configuration is sampled on start; busy is high while requests
// are issued; done pulses with the last request.
module wino_controller
  import wino_pkg::*;
#(
  parameter int N     = 2,
  parameter int CNT_W = 8,     // width of each loop counter
  parameter int ROW_W = 5,
  parameter int COL_W = 10,
  parameter int IDG_W = 10,
  parameter int WA_W  = 10
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  ksel_e              cfg_ksel,
  input  logic [CNT_W-1:0]   cfg_n_og,   // output-channel groups (ceil(OD/M))
  input  logic [CNT_W-1:0]   cfg_n_rt,   // output tile rows in the block (RS/m)
  input  logic [CNT_W-1:0]   cfg_n_cg,   // column groups (ceil(OW/(N*m)))
  input  logic [IDG_W-1:0]   cfg_n_idg,  // input-channel groups (ceil(ID/Q))
  output logic               busy,
  output logic               done,
  output logic               req_en,
  output logic [ROW_W-1:0]   req_r,
  output logic [COL_W-1:0]   req_c,
  output logic [IDG_W-1:0]   req_idg,
  output logic [WA_W-1:0]    req_waddr,
  output wino_ctl_t          req_ctl
);

  ksel_e            ksel;
  logic [CNT_W-1:0] n_og, n_rt, n_cg;
  logic [IDG_W-1:0] n_idg;
  logic [CNT_W-1:0] og, rt, cg;
  logic [IDG_W-1:0] idg;

  logic last_idg, last_cg, last_rt, last_og;
  assign last_idg = (idg == n_idg - 1'b1);
  assign last_cg  = (cg  == n_cg  - 1'b1);
  assign last_rt  = (rt  == n_rt  - 1'b1);
  assign last_og  = (og  == n_og  - 1'b1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      ksel <= KSEL_1X1;
      n_og <= '0; n_rt <= '0; n_cg <= '0; n_idg <= '0;
      og <= '0; rt <= '0; cg <= '0; idg <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy  <= 1'b1;
          ksel  <= cfg_ksel;
          n_og  <= cfg_n_og;
          n_rt  <= cfg_n_rt;
          n_cg  <= cfg_n_cg;
          n_idg <= cfg_n_idg;
          og <= '0; rt <= '0; cg <= '0; idg <= '0;
        end
      end else begin
        idg <= last_idg ? '0 : idg + 1'b1;
        if (last_idg) begin
          cg <= last_cg ? '0 : cg + 1'b1;
          if (last_cg) begin
            rt <= last_rt ? '0 : rt + 1'b1;
            if (last_rt) begin
              og <= last_og ? '0 : og + 1'b1;
              if (last_og) begin
                busy <= 1'b0;
                done <= 1'b1;
              end
            end
          end
        end
      end
    end
  end

  always_comb begin
    req_en        = busy;
    req_r         = ROW_W'(32'(rt) * tile_m(ksel));
    req_c         = COL_W'(32'(cg) * N * tile_m(ksel));
    req_idg       = idg;
    req_waddr     = WA_W'(32'(og) * 32'(n_idg) + 32'(idg));
    req_ctl.valid = busy;
    req_ctl.first = (idg == '0);
    req_ctl.last  = last_idg;
    req_ctl.ksel  = ksel;
    req_ctl.tag   = TAG_W'({og, rt, cg});
  end

endmodule
