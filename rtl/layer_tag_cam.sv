// layer_tag_cam: start-address tags of the configuration layers.
//
// Each layer is identified by the address of the first instruction of the
// configuration it holds, plus a valid bit and the drop-quickly mark that came
// with that instruction. Before new instructions are mapped, the address of
// the next instruction is compared against the tags of all layers in
// parallel; a match names the layer to activate. The search is fully
// associative (one comparator per layer) and combinational. The module also
// reports the lowest-numbered empty layer, which is filled before anything is
// evicted.
//
// Interface / timing:
//   srch_addr -> srch_hit, srch_idx          combinational, same cycle
//   wr_en, wr_idx, wr_addr, wr_mark          tag written at the clock edge,
//                                            layer becomes valid
//   valid_o, mark_o, free_any, free_idx      state of all layers
// Reset empties all layers. The parallel compare follows the document; the
// empty-layer-first rule and reset behaviour are this design's choices.
module layer_tag_cam #(
  parameter int unsigned LAYERS = gap_cfg_pkg::GAP_LAYERS,
  parameter int unsigned ADDR_W = gap_cfg_pkg::GAP_ADDR_W,
  localparam int unsigned IDX_W = (LAYERS > 1) ? $clog2(LAYERS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // search port
  input  logic [ADDR_W-1:0] srch_addr,
  output logic              srch_hit,
  output logic [IDX_W-1:0]  srch_idx,
  // install port
  input  logic              wr_en,
  input  logic [IDX_W-1:0]  wr_idx,
  input  logic [ADDR_W-1:0] wr_addr,
  input  logic              wr_mark,
  // state
  output logic [LAYERS-1:0] valid_o,
  output logic [LAYERS-1:0] mark_o,
  output logic              free_any,
  output logic [IDX_W-1:0]  free_idx
);

  logic [ADDR_W-1:0] tag_q   [LAYERS];
  logic [LAYERS-1:0] valid_q;
  logic [LAYERS-1:0] mark_q;
  logic [LAYERS-1:0] match;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= '0;
      mark_q  <= '0;
    end else if (wr_en) begin
      valid_q[wr_idx] <= 1'b1;
      mark_q[wr_idx]  <= wr_mark;
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en) tag_q[wr_idx] <= wr_addr;
  end

  always_comb begin
    for (int unsigned l = 0; l < LAYERS; l++)
      match[l] = valid_q[l] && (tag_q[l] == srch_addr);
  end

  // A configuration is installed only on a miss, so at most one tag matches.
  always_comb begin
    srch_hit = |match;
    srch_idx = '0;
    for (int unsigned l = 0; l < LAYERS; l++)
      if (match[l]) srch_idx = IDX_W'(l);
  end

  always_comb begin
    free_any = ~&valid_q;
    free_idx = '0;
    for (int l = LAYERS - 1; l >= 0; l--)
      if (!valid_q[l]) free_idx = IDX_W'(l);
  end

  assign valid_o = valid_q;
  assign mark_o  = mark_q;

  a_one_match: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(match))
    else $error("layer_tag_cam: address found in more than one layer");

endmodule
