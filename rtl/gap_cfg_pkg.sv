// gap_cfg_pkg: types and default sizes shared by the configuration layer
// subsystem of the Grid ALU Processor (GAP).
//
// The ALU array is COLS x ROWS functional units (FUs); every FU carries
// LAYERS memory cells, one configuration word per configuration layer. A
// configuration is identified by the address of its first instruction. The
// 12 x 12 array and the layer counts (2..64, 32 used as default here) follow
// the GAP evaluation setup; address and configuration word widths are this
// design's own choice (32-bit instruction addresses, 32-bit FU words).
package gap_cfg_pkg;

  localparam int unsigned GAP_COLS   = 12;
  localparam int unsigned GAP_ROWS   = 12;
  localparam int unsigned GAP_LAYERS = 32;
  localparam int unsigned GAP_ADDR_W = 32;
  localparam int unsigned GAP_CFG_W  = 32;
  localparam int unsigned GAP_CNT_W  = 32;

  // Outcome of one access to the layer subsystem.
  //   ACC_LOOP_HIT  : the requested configuration is the one accessed last;
  //                   nothing in the layers or the replacement order changes.
  //   ACC_LAYER_HIT : found in another layer, which becomes active.
  //   ACC_MISS      : not present; a layer is cleared and receives it.
  typedef enum logic [1:0] {
    ACC_LOOP_HIT  = 2'd0,
    ACC_LAYER_HIT = 2'd1,
    ACC_MISS      = 2'd2
  } acc_kind_e;

endpackage
