// qdlru_order: LRU access queue of the configuration layers with
// quick-drop insertion (qdLRU).
//
// Every layer holds its position in the queue as a rank: 0 is the most
// recently used (MRU) position, LAYERS-1 the least recently used (LRU)
// position, and the ranks always form a permutation of 0..LAYERS-1. One
// update per cycle moves one layer:
//   to MRU (upd_to_lru = 0): layers ranked above it (closer to MRU) move one
//                            step towards LRU, the layer takes rank 0;
//   to LRU (upd_to_lru = 1): layers ranked below it move one step towards
//                            MRU, the layer takes rank LAYERS-1.
// Plain LRU only ever uses the first move. qdLRU uses the second for a
// configuration whose first instruction carries the drop-quickly flag, so that
// it is the next one evicted. lru_idx names the layer at the LRU position.
//
// Interface / timing: upd_* is applied at the clock edge; rank_o and lru_idx
// are registered state. Reset puts layer l at rank l. The rank encoding is
// this design's choice; the two insertion positions follow the document.
module qdlru_order #(
  parameter int unsigned LAYERS = gap_cfg_pkg::GAP_LAYERS,
  localparam int unsigned IDX_W = (LAYERS > 1) ? $clog2(LAYERS) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             upd_en,
  input  logic [IDX_W-1:0] upd_idx,
  input  logic             upd_to_lru,
  output logic [IDX_W-1:0] rank_o [LAYERS],
  output logic [IDX_W-1:0] lru_idx
);

  localparam logic [IDX_W-1:0] LRU_RANK = IDX_W'(LAYERS - 1);

  logic [IDX_W-1:0] rank_q [LAYERS];
  logic [IDX_W-1:0] rank_d [LAYERS];
  logic [IDX_W-1:0] cur;

  assign cur = rank_q[upd_idx];

  always_comb begin
    for (int unsigned l = 0; l < LAYERS; l++) begin
      rank_d[l] = rank_q[l];
      if (upd_en) begin
        if (IDX_W'(l) == upd_idx)
          rank_d[l] = upd_to_lru ? LRU_RANK : '0;
        else if (!upd_to_lru && rank_q[l] < cur)
          rank_d[l] = rank_q[l] + 1'b1;
        else if (upd_to_lru && rank_q[l] > cur)
          rank_d[l] = rank_q[l] - 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned l = 0; l < LAYERS; l++) rank_q[l] <= IDX_W'(l);
    end else begin
      for (int unsigned l = 0; l < LAYERS; l++) rank_q[l] <= rank_d[l];
    end
  end

  always_comb begin
    lru_idx = '0;
    for (int unsigned l = 0; l < LAYERS; l++)
      if (rank_q[l] == LRU_RANK) lru_idx = IDX_W'(l);
  end

  assign rank_o = rank_q;

  a_upd_idx_range: assert property (@(posedge clk) disable iff (!rst_n)
    upd_en |-> (int'(upd_idx) < int'(LAYERS)))
    else $error("qdlru_order: layer index out of range");

endmodule
