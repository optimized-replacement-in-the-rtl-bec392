// layer_ctrl: lookup and replacement control of the GAP configuration layers.
//
// Before new instructions are mapped onto the ALU array, the address of the
// next instruction (acc_addr) is presented together with the drop-quickly
// flag that the post-link optimiser may have set on that instruction
// (acc_drop). The access is classified as
//   loop hit  : same configuration as the previous access; nothing changes
//               (the replacement order is left alone as well);
//   layer hit : the address matches the first instruction of a stored layer;
//               that layer becomes active and moves to the MRU position,
//               unless it is a marked (drop-quickly) layer, which stays where
//               it is so that it is still dropped quickly;
//   miss      : an empty layer is taken if one exists, otherwise the victim
//               chosen by the replacement policy; the layer is cleared, tagged
//               with the new start address and made active so that the
//               configuration unit can fill it.
// Replacement is qdLRU. With QD_MODE = 0 (default) a new configuration is
// inserted at the MRU position if it is unmarked and at the LRU position if it
// is marked, so a marked configuration is the next victim. With QD_MODE = 1
// every configuration is inserted at MRU and the victim is the least recently
// used marked layer if any exists, else the LRU layer. Both forms are the two
// hardware variants the document allows; without marks both behave exactly
// as LRU.
//
// Interface / timing: one access per cycle may be offered (acc_valid), no
// back-pressure. The result appears one cycle later on resp_* together with a
// one-cycle clr_en pulse naming the layer to clear on a miss; active_layer
// changes at the same edge. The one-cycle latency, empty-layer-first fill and
// leaving marked layers in place on a hit are this design's choices.
module layer_ctrl
  import gap_cfg_pkg::*;
#(
  parameter int unsigned LAYERS  = GAP_LAYERS,
  parameter int unsigned ADDR_W  = GAP_ADDR_W,
  parameter bit          QD_MODE = 1'b0,
  localparam int unsigned IDX_W  = (LAYERS > 1) ? $clog2(LAYERS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // access from the front-end / configuration unit
  input  logic              acc_valid,
  input  logic [ADDR_W-1:0] acc_addr,
  input  logic              acc_drop,
  // result, one cycle later
  output logic              resp_valid,
  output acc_kind_e         resp_kind,
  output logic [IDX_W-1:0]  resp_layer,
  output logic              resp_evict,    // miss replaced a valid layer
  output logic              resp_quick,    // miss/hit on a marked layer
  output logic              clr_en,
  output logic [IDX_W-1:0]  clr_layer,
  output logic [IDX_W-1:0]  active_layer
);

  // ---------------------------------------------------------------- tags
  logic              srch_hit;
  logic [IDX_W-1:0]  srch_idx;
  logic              wr_en;
  logic [IDX_W-1:0]  victim;
  logic [LAYERS-1:0] valid_v, mark_v;
  logic              free_any;
  logic [IDX_W-1:0]  free_idx;

  layer_tag_cam #(.LAYERS(LAYERS), .ADDR_W(ADDR_W)) u_tags (
    .clk, .rst_n,
    .srch_addr (acc_addr),
    .srch_hit, .srch_idx,
    .wr_en,
    .wr_idx    (victim),
    .wr_addr   (acc_addr),
    .wr_mark   (acc_drop),
    .valid_o   (valid_v),
    .mark_o    (mark_v),
    .free_any, .free_idx
  );

  // --------------------------------------------------------- LRU queue
  logic             upd_en, upd_to_lru;
  logic [IDX_W-1:0] upd_idx;
  logic [IDX_W-1:0] rank [LAYERS];
  logic [IDX_W-1:0] lru_idx;

  qdlru_order #(.LAYERS(LAYERS)) u_order (
    .clk, .rst_n,
    .upd_en, .upd_idx, .upd_to_lru,
    .rank_o  (rank),
    .lru_idx
  );

  // ------------------------------------------------------ classification
  logic              last_valid_q;
  logic [ADDR_W-1:0] last_addr_q;
  logic              is_loop, is_hit, is_miss;

  assign is_loop = acc_valid && last_valid_q && (last_addr_q == acc_addr);
  assign is_hit  = acc_valid && !is_loop && srch_hit;
  assign is_miss = acc_valid && !is_loop && !srch_hit;

  // Victim: empty layer first; else, in QD_MODE 1, the marked layer closest to
  // the LRU end; else the LRU layer.
  logic             mark_found;
  logic [IDX_W-1:0] mark_idx;
  logic [IDX_W-1:0] mark_rank;

  always_comb begin
    mark_found = 1'b0;
    mark_idx   = '0;
    mark_rank  = '0;
    for (int unsigned l = 0; l < LAYERS; l++) begin
      if (valid_v[l] && mark_v[l] && (!mark_found || rank[l] > mark_rank)) begin
        mark_found = 1'b1;
        mark_idx   = IDX_W'(l);
        mark_rank  = rank[l];
      end
    end
  end

  always_comb begin
    if (free_any)                  victim = free_idx;
    else if (QD_MODE && mark_found) victim = mark_idx;
    else                           victim = lru_idx;
  end

  assign wr_en = is_miss;

  always_comb begin
    upd_en     = 1'b0;
    upd_idx    = victim;
    upd_to_lru = 1'b0;
    if (is_miss) begin
      upd_en     = 1'b1;
      upd_idx    = victim;
      upd_to_lru = !QD_MODE && acc_drop;
    end else if (is_hit) begin
      upd_idx    = srch_idx;
      upd_en     = QD_MODE || !mark_v[srch_idx];
      upd_to_lru = 1'b0;
    end
  end

  // ----------------------------------------------------------- registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last_valid_q <= 1'b0;
      last_addr_q  <= '0;
      resp_valid   <= 1'b0;
      resp_kind    <= ACC_LOOP_HIT;
      resp_layer   <= '0;
      resp_evict   <= 1'b0;
      resp_quick   <= 1'b0;
      clr_en       <= 1'b0;
      clr_layer    <= '0;
      active_layer <= '0;
    end else begin
      resp_valid <= acc_valid;
      clr_en     <= is_miss;
      if (acc_valid) begin
        last_valid_q <= 1'b1;
        last_addr_q  <= acc_addr;
      end
      if (is_loop) begin
        resp_kind  <= ACC_LOOP_HIT;
        resp_layer <= active_layer;
        resp_evict <= 1'b0;
        resp_quick <= 1'b0;
      end else if (is_hit) begin
        resp_kind    <= ACC_LAYER_HIT;
        resp_layer   <= srch_idx;
        resp_evict   <= 1'b0;
        resp_quick   <= mark_v[srch_idx];
        active_layer <= srch_idx;
      end else if (is_miss) begin
        resp_kind    <= ACC_MISS;
        resp_layer   <= victim;
        resp_evict   <= valid_v[victim];
        resp_quick   <= acc_drop;
        clr_layer    <= victim;
        active_layer <= victim;
      end
    end
  end

  a_victim_valid: assert property (@(posedge clk) disable iff (!rst_n)
    is_miss |-> (int'(victim) < int'(LAYERS)))
    else $error("layer_ctrl: victim index out of range");

endmodule
