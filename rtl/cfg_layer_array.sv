// cfg_layer_array: configuration storage of the whole GAP ALU array,
// COLS x ROWS x LAYERS.
//
// One fu_cfg_cell per functional unit. The configuration unit writes one FU
// word per cycle into a chosen layer (wr_row, wr_col, wr_layer); clearing a
// layer (clr_en) empties that layer in every FU at once. All FUs read the
// same active layer (rd_layer) in parallel, so switching the active layer
// reconfigures the whole array in one step. fu_cfg/fu_cfg_valid are indexed
// [row][col] and are registered (one cycle after rd_layer or a write).
//
// The quasi three-dimensional organisation (columns x rows x layers) follows
// the document; the one-word-per-cycle write port is this design's choice.
module cfg_layer_array #(
  parameter int unsigned COLS   = gap_cfg_pkg::GAP_COLS,
  parameter int unsigned ROWS   = gap_cfg_pkg::GAP_ROWS,
  parameter int unsigned LAYERS = gap_cfg_pkg::GAP_LAYERS,
  parameter int unsigned CFG_W  = gap_cfg_pkg::GAP_CFG_W,
  localparam int unsigned IDX_W = (LAYERS > 1) ? $clog2(LAYERS) : 1,
  localparam int unsigned ROW_W = (ROWS > 1) ? $clog2(ROWS) : 1,
  localparam int unsigned COL_W = (COLS > 1) ? $clog2(COLS) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr_en,
  input  logic [IDX_W-1:0] clr_layer,
  input  logic             wr_en,
  input  logic [IDX_W-1:0] wr_layer,
  input  logic [ROW_W-1:0] wr_row,
  input  logic [COL_W-1:0] wr_col,
  input  logic [CFG_W-1:0] wr_data,
  input  logic [IDX_W-1:0] rd_layer,
  output logic [CFG_W-1:0] fu_cfg       [ROWS][COLS],
  output logic             fu_cfg_valid [ROWS][COLS]
);

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      logic sel;
      assign sel = wr_en && (wr_row == ROW_W'(r)) && (wr_col == COL_W'(c));
      fu_cfg_cell #(.LAYERS(LAYERS), .CFG_W(CFG_W)) u_cell (
        .clk, .rst_n,
        .clr_en, .clr_layer,
        .wr_en      (sel),
        .wr_layer,
        .wr_data,
        .rd_layer,
        .cfg_o       (fu_cfg[r][c]),
        .cfg_valid_o (fu_cfg_valid[r][c])
      );
    end
  end

  a_wr_in_range: assert property (@(posedge clk) disable iff (!rst_n)
    wr_en |-> (int'(wr_row) < int'(ROWS) && int'(wr_col) < int'(COLS)))
    else $error("cfg_layer_array: write outside the array");

endmodule
