// gap_config_layers: configuration layer subsystem of the Grid ALU Processor
// with qdLRU (quick-drop LRU) replacement.
//
// The GAP maps a sequential instruction stream onto a COLS x ROWS array of
// functional units; a finished mapping is a configuration. The configuration
// layers keep recent configurations next to the FUs, like a trace cache, so
// that a configuration found there runs without passing the front-end again.
// This block holds:
//   layer_ctrl      - compares the next instruction address with the first
//                     instruction of every layer and classifies the access as
//                     loop hit, layer hit or miss; on a miss it picks and
//                     clears a layer. Replacement is LRU in which a
//                     configuration whose first instruction carries the
//                     drop-quickly flag is inserted at the LRU position.
//   cfg_layer_array - the COLS x ROWS x LAYERS configuration words; the active
//                     layer drives every FU.
//   layer_hit_stats - a_total / a_hit / a_loop / a_layer counters.
// The front-end, the configuration unit that produces FU words, the ALU array
// and the branch and load/store units are outside this block: their
// connections are the ports below.
//
// Timing: an access (acc_*) is answered one cycle later on resp_*; on the same
// edge active_layer switches to the hit or newly allocated layer, and on a
// miss that layer is cleared at the following edge. The configuration unit
// then writes FU words (cu_wr_*) into the active layer, one per cycle.
// fu_cfg/fu_cfg_valid show the active layer one cycle after it (or a word in
// it) changes. Statistics count each response as it appears.
module gap_config_layers
  import gap_cfg_pkg::*;
#(
  parameter int unsigned COLS    = GAP_COLS,
  parameter int unsigned ROWS    = GAP_ROWS,
  parameter int unsigned LAYERS  = GAP_LAYERS,
  parameter int unsigned ADDR_W  = GAP_ADDR_W,
  parameter int unsigned CFG_W   = GAP_CFG_W,
  parameter int unsigned CNT_W   = GAP_CNT_W,
  parameter bit          QD_MODE = 1'b0,
  localparam int unsigned IDX_W  = (LAYERS > 1) ? $clog2(LAYERS) : 1,
  localparam int unsigned ROW_W  = (ROWS > 1) ? $clog2(ROWS) : 1,
  localparam int unsigned COL_W  = (COLS > 1) ? $clog2(COLS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // next-configuration lookup (front-end / configuration unit)
  input  logic              acc_valid,
  input  logic [ADDR_W-1:0] acc_addr,
  input  logic              acc_drop,
  output logic              resp_valid,
  output acc_kind_e         resp_kind,
  output logic [IDX_W-1:0]  resp_layer,
  output logic              resp_evict,
  output logic              resp_quick,
  output logic [IDX_W-1:0]  active_layer,
  // configuration unit writes FU words of the configuration being built
  input  logic              cu_wr_en,
  input  logic [ROW_W-1:0]  cu_wr_row,
  input  logic [COL_W-1:0]  cu_wr_col,
  input  logic [CFG_W-1:0]  cu_wr_data,
  // configuration of every FU, from the active layer
  output logic [CFG_W-1:0]  fu_cfg       [ROWS][COLS],
  output logic              fu_cfg_valid [ROWS][COLS],
  // statistics
  input  logic              stats_clear,
  output logic [CNT_W-1:0]  a_total,
  output logic [CNT_W-1:0]  a_hit,
  output logic [CNT_W-1:0]  a_loop,
  output logic [CNT_W-1:0]  a_layer
);

  logic             clr_en;
  logic [IDX_W-1:0] clr_layer;

  layer_ctrl #(.LAYERS(LAYERS), .ADDR_W(ADDR_W), .QD_MODE(QD_MODE)) u_ctrl (
    .clk, .rst_n,
    .acc_valid, .acc_addr, .acc_drop,
    .resp_valid, .resp_kind, .resp_layer, .resp_evict, .resp_quick,
    .clr_en, .clr_layer,
    .active_layer
  );

  cfg_layer_array #(.COLS(COLS), .ROWS(ROWS), .LAYERS(LAYERS), .CFG_W(CFG_W)) u_array (
    .clk, .rst_n,
    .clr_en, .clr_layer,
    .wr_en    (cu_wr_en),
    .wr_layer (active_layer),
    .wr_row   (cu_wr_row),
    .wr_col   (cu_wr_col),
    .wr_data  (cu_wr_data),
    .rd_layer (active_layer),
    .fu_cfg, .fu_cfg_valid
  );

  layer_hit_stats #(.CNT_W(CNT_W)) u_stats (
    .clk, .rst_n,
    .clear     (stats_clear),
    .acc_valid (resp_valid),
    .acc_kind  (resp_kind),
    .a_total, .a_hit, .a_loop, .a_layer
  );

endmodule
