// tb_qdlru_workloads: the thrashing workloads that motivate qdLRU, run on the
// configuration layer subsystem with 16, 32 (default) and 64 layers.
//
// Also run with 2 layers and with a single layer, where no policy can add
// anything to the loop hits.
//
// Workload 1, large loop: a working set of 48 configurations executed in
// order, 20 times. First the trace is run without any drop-quickly flags
// (the subsystem then behaves as plain LRU) and recorded. From the recorded
// trace the software side of qdLRU (qdlru_marker) builds the configuration
// lines and flags configurations until every line minus its flagged members
// fits into the layers; the trace is then run again with the flags. Expected:
//   - plain LRU with fewer layers than 48 thrashes: after the first pass no
//     layer hit at all;
//   - qdLRU keeps LAYERS-1 configurations: per steady-state pass
//     LAYERS-1 layer hits out of 48, i.e. h_layer = 31/48 with 32 layers,
//     the optimum for this pattern;
//   - with 64 layers the loop fits, nothing is flagged and every access after
//     the first pass hits.
// Workload 2, program phase: a small loop of 6 configurations (each entered
// twice in a row, giving loop hits) alternating with the 48-configuration
// loop. qdLRU must not cost the small loop any hit and must gain hits in
// total. Counts are read from the subsystem's statistics counters.
module tb_qdlru_workloads;
  import gap_cfg_pkg::*;
  import qdlru_model_pkg::*;

  localparam int NCFG  = 48;
  localparam int PASS  = 20;
  localparam int NSIZE = 5;

  int checks = 0, failures = 0;
  int done = 0;

  initial begin
    #2ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar g = 0; g < NSIZE; g++) begin : g_size
    localparam int unsigned L = (g == 0) ? 16 : (g == 1) ? GAP_LAYERS : (g == 2) ? 64 :
                                (g == 3) ? 2 : 1;
    localparam int unsigned W = (L > 1) ? $clog2(L) : 1;

    logic         clk = 0, rst_n = 0;
    logic         acc_valid = 0, acc_drop = 0;
    logic [31:0]  acc_addr = '0;
    logic         resp_valid, resp_evict, resp_quick;
    acc_kind_e    resp_kind;
    logic [W-1:0] resp_layer, active_layer;
    logic [31:0]  fu_cfg       [GAP_ROWS][GAP_COLS];
    logic         fu_cfg_valid [GAP_ROWS][GAP_COLS];
    logic         stats_clear = 0;
    logic [31:0]  a_total, a_hit, a_loop, a_layer;

    gap_config_layers #(.LAYERS(L)) dut (
      .clk, .rst_n, .acc_valid, .acc_addr, .acc_drop,
      .resp_valid, .resp_kind, .resp_layer, .resp_evict, .resp_quick, .active_layer,
      .cu_wr_en (1'b0), .cu_wr_row (4'd0), .cu_wr_col (4'd0), .cu_wr_data (32'd0),
      .fu_cfg, .fu_cfg_valid,
      .stats_clear, .a_total, .a_hit, .a_loop, .a_layer
    );

    always #5 clk = ~clk;

    longint      trace [$];
    qdlru_marker marker;

    task automatic restart();
      rst_n = 0;
      repeat (2) @(posedge clk);
      rst_n = 1;
      @(negedge clk);
    endtask

    task automatic run(longint addrs [$], bit use_marks);
      for (int i = 0; i < addrs.size(); i++) begin
        acc_valid = 1; acc_addr = 32'(addrs[i]);
        acc_drop  = use_marks && marker.is_marked(addrs[i]);
        @(negedge clk);
      end
      acc_valid = 0;
      @(negedge clk);
    endtask

    function automatic longint addr_of(int id);
      return 64'h0040_0000 + longint'(id) * 64'h100;
    endfunction

    task automatic expect_eq(string what, longint got, longint exp);
      checks++;
      if (got != exp) begin
        failures++;
        $display("L=%0d %s: got %0d, expected %0d", L, what, got, exp);
      end
    endtask

    initial begin
      longint w1 [$];
      longint w2 [$];
      longint lru_layer, lru_total, qd_layer, qd_total, qd_hit, lru_hit;
      int nmarked;
      marker = new();
      // ---------------- workload 1: large loop
      for (int p = 0; p < PASS; p++) for (int i = 0; i < NCFG; i++) w1.push_back(addr_of(i));
      restart();
      run(w1, 0);
      // first pass: 48 misses; afterwards LRU hits only if the loop fits
      expect_eq("LRU accesses", a_total, PASS * NCFG);
      expect_eq("LRU layer hits", a_layer, (L > NCFG) ? (PASS - 1) * NCFG : 0);
      lru_layer = a_layer;
      // software: configuration lines and drop-quickly flags
      marker.build_lines(w1);
      marker.select_marks(int'(L));
      nmarked = 0;
      for (int i = 0; i < NCFG; i++) nmarked += marker.is_marked(addr_of(i));
      expect_eq("flagged configurations", nmarked, (L > NCFG) ? 0 : NCFG - (L - 1));
      restart();
      run(w1, 1);
      // steady state: all L-1 unflagged configurations stay in the layers
      // and hit in every pass after the first; the second pass also hits the
      // one flagged configuration left in the LRU layer by the first pass
      // (with a single layer every configuration is flagged and nothing but
      // loop hits can occur)
      expect_eq("qdLRU layer hits", a_layer,
                (L > NCFG) ? (PASS - 1) * NCFG : (L == 1) ? 0 : (PASS - 1) * (L - 1) + 1);
      expect_eq("qdLRU loop hits", a_loop, 0);
      qd_layer = a_layer;
      $display("L=%0d large loop: LRU h_layer = %0d/%0d, qdLRU h_layer = %0d/%0d (%0d flagged)",
               L, lru_layer, a_total, qd_layer, a_total, nmarked);
      // ---------------- workload 2: program phases
      for (int p = 0; p < 6; p++) begin
        for (int r = 0; r < 4; r++)
          for (int i = 0; i < 6; i++) begin
            w2.push_back(addr_of(1000 + i));
            w2.push_back(addr_of(1000 + i));
          end
        for (int i = 0; i < NCFG; i++) w2.push_back(addr_of(i));
      end
      marker = new();
      marker.build_lines(w2);
      marker.select_marks(int'(L));
      restart();
      run(w2, 0);
      lru_hit = a_hit; lru_total = a_total;
      expect_eq("LRU loop hits", a_loop, 6 * 4 * 6);
      restart();
      run(w2, 1);
      qd_hit = a_hit; qd_total = a_total;
      expect_eq("qdLRU loop hits", a_loop, 6 * 4 * 6);
      checks++;
      if (L > 1 && L <= NCFG && !(qd_hit > lru_hit)) begin
        failures++;
        $display("L=%0d program phases: qdLRU %0d hits not above LRU %0d", L, qd_hit, lru_hit);
      end
      // a single layer holds only the current configuration: h_total = h_loop
      if (L == 1) expect_eq("1 layer: hits equal loop hits", qd_hit, a_loop);
      checks++;
      if (L > 6) for (int i = 0; i < 6; i++) if (marker.is_marked(addr_of(1000 + i))) begin
        failures++;
        $display("L=%0d small-loop configuration %0d flagged", L, i);
      end
      $display("L=%0d program phases: LRU h_total = %0d/%0d, qdLRU h_total = %0d/%0d",
               L, lru_hit, lru_total, qd_hit, qd_total);
      done++;
    end
  end

  initial begin
    wait (done == NSIZE);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
