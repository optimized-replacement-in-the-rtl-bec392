// fu_cfg_cell: configuration layer memory of one functional unit (FU).
//
// Every element of the GAP ALU array carries a few memory cells, one
// configuration word per layer; together the cells of all FUs form the
// configuration layers. This cell stores LAYERS words of CFG_W bits and a
// valid bit per word. The valid bits of a whole layer are cleared in one
// cycle (clr_en) when the layer is handed to a new configuration; a word
// written by the configuration unit (wr_en) becomes valid. The FU reads the
// word of the active layer (rd_layer); cfg_o/cfg_valid_o are registered, so
// they follow rd_layer and any write by one clock cycle. A write in the same
// cycle as a clear of the same layer leaves the written word valid.
//
// The per-FU placement of the storage follows the document; word width,
// valid bits, single-cycle clear and the registered read are this design's
// choices. Reset empties every layer.
module fu_cfg_cell #(
  parameter int unsigned LAYERS = gap_cfg_pkg::GAP_LAYERS,
  parameter int unsigned CFG_W  = gap_cfg_pkg::GAP_CFG_W,
  localparam int unsigned IDX_W = (LAYERS > 1) ? $clog2(LAYERS) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr_en,
  input  logic [IDX_W-1:0] clr_layer,
  input  logic             wr_en,
  input  logic [IDX_W-1:0] wr_layer,
  input  logic [CFG_W-1:0] wr_data,
  input  logic [IDX_W-1:0] rd_layer,
  output logic [CFG_W-1:0] cfg_o,
  output logic             cfg_valid_o
);

  logic [CFG_W-1:0]  mem [LAYERS];
  logic [LAYERS-1:0] valid_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= '0;
    end else begin
      if (clr_en) valid_q[clr_layer] <= 1'b0;
      if (wr_en)  valid_q[wr_layer]  <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_layer] <= wr_data;
    cfg_o <= mem[rd_layer];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cfg_valid_o <= 1'b0;
    else        cfg_valid_o <= valid_q[rd_layer];
  end

endmodule
