// array_cell: one cell of the processing array, four directional units.
//
// A cell holds four processing units, one per direction. Unit d drives the
// stream leaving the cell towards its neighbour on side d (DIR_N, DIR_E,
// DIR_S, DIR_W). Every unit sees the same eight candidate streams:
//   cand[0..3]  streams arriving from the north, east, south, west neighbours
//   cand[4..7]  the registered outputs of the cell's own N, E, S, W units
// so a unit can route (PASS), compute on neighbour streams, chain with the
// other units of its cell, or use its own output as feedback. Routing and
// function are therefore configured together, per unit, by its pu_cfg_t.
//
// Interface: in_i[d] is the stream arriving from side d, out_o[d] the stream
// leaving towards side d; cfg_i[d] configures unit d.
// Timing: 3 cycles from any in_i to any out_o through one unit.
//
// Four directional units per cell follow the array's description; the
// candidate set is this design's choice.
module array_cell
  import ppa_pkg::*;
#(
  parameter int unsigned ACC_W = 6,
  parameter int unsigned SQ_W  = 10,
  parameter logic [15:0] SEED  = 16'h1D0F   // SQRT dither seeds: SEED + d*16'h4F1B
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  pu_cfg_t    cfg_i [4],
  input  logic [3:0] in_i,
  output logic [3:0] out_o
);

  logic [NCAND-1:0] cand;
  assign cand = {out_o, in_i};

  for (genvar d = 0; d < 4; d++) begin : g_pu
    processing_unit #(
      .ACC_W (ACC_W),
      .SQ_W  (SQ_W),
      .SEED  (16'(SEED + 16'(d) * 16'h4F1B))
    ) u_pu (
      .clk   (clk),
      .rst_n (rst_n),
      .en    (en),
      .cfg   (cfg_i[d]),
      .cand  (cand),
      .out_o (out_o[d])
    );
  end

endmodule
