// tb_gap_config_layers: end-to-end test of the configuration layer subsystem
// at its default size (12 x 12 FUs, 32 layers, no parameter overrides).
//
// A stand-in for the front-end and configuration unit drives a trace of
// configuration start addresses: a sequential start-up part, a small loop
// that fits into the layers, a large loop of 40 configurations (more than
// the layers) of which some are flagged drop-quickly, and a random phase.
// Each access is checked one cycle later against qdlru_model. On a miss the
// testbench maps the configuration: it writes the FU words of its first
// rows (how many depends on the configuration) into the new layer, one word
// per cycle. After every access the words the FUs see are compared with what
// was mapped for that configuration, so stale words of an evicted
// configuration must read as empty. The statistics counters are compared at
// the end. Each mechanism is counted and must occur at least once.
module tb_gap_config_layers;
  import gap_cfg_pkg::*;
  import qdlru_model_pkg::*;

  localparam int unsigned C = GAP_COLS;
  localparam int unsigned R = GAP_ROWS;
  localparam int unsigned L = GAP_LAYERS;
  localparam int unsigned A = GAP_ADDR_W;
  localparam int unsigned D = GAP_CFG_W;
  localparam int unsigned N = GAP_CNT_W;
  localparam int unsigned W = $clog2(L);

  logic         clk = 0, rst_n = 0;
  logic         acc_valid = 0, acc_drop = 0;
  logic [A-1:0] acc_addr = '0;
  logic         resp_valid, resp_evict, resp_quick;
  acc_kind_e    resp_kind;
  logic [W-1:0] resp_layer, active_layer;
  logic         cu_wr_en = 0;
  logic [3:0]   cu_wr_row = '0, cu_wr_col = '0;
  logic [D-1:0] cu_wr_data = '0;
  logic [D-1:0] fu_cfg       [R][C];
  logic         fu_cfg_valid [R][C];
  logic         stats_clear = 0;
  logic [N-1:0] a_total, a_hit, a_loop, a_layer;

  gap_config_layers dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_loop = 0, n_layer_hit = 0, n_miss_free = 0, n_miss_evict = 0;
  int n_quick_insert = 0, n_marked_hit = 0, n_stale_cleared = 0, n_words = 0;
  longint m_total = 0, m_hit = 0, m_loop = 0, m_layer = 0;

  qdlru_model model;
  int layer_cfg [L];          // configuration id mapped in each layer

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint cfg_addr(int id);
    return 64'h0040_0000 + longint'(id) * 64'h40;
  endfunction

  function automatic int cfg_rows(int id);
    return 1 + (id * 7) % R;
  endfunction

  function automatic logic [D-1:0] cfg_word(int id, int r, int c);
    return D'({16'(id), 8'(r), 8'(c)}) ^ D'(32'h5a00_0000);
  endfunction

  task automatic check_fus(int id);
    int bad = 0;
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++) begin
        bit ev = (r < cfg_rows(id));
        if (fu_cfg_valid[r][c] != ev || (ev && fu_cfg[r][c] != cfg_word(id, r, c))) bad++;
      end
    checks++;
    if (bad != 0) begin
      failures++;
      $display("configuration %0d: %0d FU words differ", id, bad);
    end
  endtask

  task automatic access(int id, bit drop);
    m_kind_e k; int lay; bit ev, q;
    acc_valid = 1; acc_addr = A'(cfg_addr(id)); acc_drop = drop;
    @(negedge clk);
    acc_valid = 0;
    model.access(cfg_addr(id), drop, k, lay, ev, q);
    checks++;
    if (!resp_valid || int'(resp_kind) != int'(k) || resp_layer != W'(lay) || resp_evict != ev
        || resp_quick != q || active_layer != W'(lay)) begin
      failures++;
      $display("cfg %0d: got kind=%0d layer=%0d ev=%0d q=%0d, exp kind=%0d layer=%0d ev=%0d q=%0d",
               id, resp_kind, resp_layer, resp_evict, resp_quick, k, lay, ev, q);
    end
    m_total++;
    case (k)
      M_LOOP:  begin n_loop++; m_hit++; m_loop++; end
      M_LAYER: begin n_layer_hit++; m_hit++; m_layer++; if (q) n_marked_hit++; end
      default: begin
        if (ev) n_miss_evict++; else n_miss_free++;
        if (drop) n_quick_insert++;
      end
    endcase
    if (k == M_MISS) begin
      // configuration unit maps the new configuration into the active layer
      bit stale = ev && (cfg_rows(layer_cfg[lay]) > cfg_rows(id));
      for (int r = 0; r < cfg_rows(id); r++)
        for (int c = 0; c < C; c++) begin
          cu_wr_en = 1; cu_wr_row = 4'(r); cu_wr_col = 4'(c); cu_wr_data = cfg_word(id, r, c);
          @(negedge clk);
          n_words++;
        end
      cu_wr_en = 0;
      layer_cfg[lay] = id;
      @(negedge clk);
      if (stale) n_stale_cleared++;
    end else begin
      @(negedge clk);
    end
    check_fus(layer_cfg[lay]);
  endtask

  initial begin
    model = new(L, 0);
    for (int l = 0; l < L; l++) layer_cfg[l] = -1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++;
    if (a_total != 0 || resp_valid) failures++;
    // sequential start-up code
    for (int i = 0; i < 10; i++) access(i, 0);
    // small loop, each configuration re-entered once in a row
    for (int it = 0; it < 5; it++)
      for (int i = 100; i < 106; i++) begin access(i, 0); if (i == 103) access(i, 0); end
    // large loop of 40 configurations; the first 9 are flagged drop-quickly
    for (int it = 0; it < 4; it++)
      for (int i = 200; i < 240; i++) access(i, i < 209);
    // a flagged configuration reached again before the next miss
    access(300, 1);
    access(101, 0);
    access(300, 1);
    // random phase over the configurations seen so far
    for (int n = 0; n < 300; n++) begin
      int s, id;
      s = $urandom_range(0, 2);
      id = (s == 0) ? $urandom_range(0, 9) : (s == 1) ? $urandom_range(100, 105)
                                                      : $urandom_range(200, 239);
      access(id, id >= 200 && id < 209);
    end
    // statistics
    checks++;
    if (a_total != N'(m_total) || a_hit != N'(m_hit) || a_loop != N'(m_loop) || a_layer != N'(m_layer)) begin
      failures++;
      $display("stats got %0d/%0d/%0d/%0d exp %0d/%0d/%0d/%0d", a_total, a_hit, a_loop, a_layer,
               m_total, m_hit, m_loop, m_layer);
    end
    stats_clear = 1;
    @(negedge clk);
    stats_clear = 0;
    checks++;
    if (a_total != 0 || a_hit != 0) failures++;
    $display("loop hits %0d, layer hits %0d, misses into empty layers %0d, evictions %0d",
             n_loop, n_layer_hit, n_miss_free, n_miss_evict);
    $display("quick-drop insertions %0d, hits on flagged layers %0d, stale words cleared %0d, FU words mapped %0d",
             n_quick_insert, n_marked_hit, n_stale_cleared, n_words);
    $display("h_total = %0d/%0d", m_hit, m_total);
    begin
      int mech [8];
      mech = '{n_loop, n_layer_hit, n_miss_free, n_miss_evict, n_quick_insert,
                       n_marked_hit, n_stale_cleared, n_words};
      foreach (mech[i]) begin
        checks++;
        if (mech[i] == 0) begin failures++; $display("mechanism %0d never occurred", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
