// layer_hit_stats: access counters of the configuration layer subsystem.
//
// Counts, per classified access, the quantities used to judge a replacement
// policy:
//   a_total : all accesses
//   a_hit   : accesses whose configuration was already in the layers
//             (a_hit = a_loop + a_layer)
//   a_loop  : re-accesses of the configuration accessed just before; these do
//             not depend on the number of layers or on the policy
//   a_layer : hits in another layer, the part the policy controls
// The hit rates are h_total = a_hit/a_total, h_loop = a_loop/a_total and
// h_layer = a_layer/a_total; the division is left to software. Counters
// saturate at their maximum and are cleared by reset or by clear.
//
// Interface / timing: acc_valid/acc_kind are sampled at the clock edge and
// counted in the same edge. The counters themselves are this design's way of
// exposing the document's measures.
module layer_hit_stats
  import gap_cfg_pkg::*;
#(
  parameter int unsigned CNT_W = GAP_CNT_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             acc_valid,
  input  acc_kind_e        acc_kind,
  output logic [CNT_W-1:0] a_total,
  output logic [CNT_W-1:0] a_hit,
  output logic [CNT_W-1:0] a_loop,
  output logic [CNT_W-1:0] a_layer
);

  function automatic logic [CNT_W-1:0] sat_inc(input logic [CNT_W-1:0] v);
    return (&v) ? v : v + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_total <= '0;
      a_hit   <= '0;
      a_loop  <= '0;
      a_layer <= '0;
    end else if (clear) begin
      a_total <= '0;
      a_hit   <= '0;
      a_loop  <= '0;
      a_layer <= '0;
    end else if (acc_valid) begin
      a_total <= sat_inc(a_total);
      if (acc_kind != ACC_MISS)      a_hit   <= sat_inc(a_hit);
      if (acc_kind == ACC_LOOP_HIT)  a_loop  <= sat_inc(a_loop);
      if (acc_kind == ACC_LAYER_HIT) a_layer <= sat_inc(a_layer);
    end
  end

endmodule
