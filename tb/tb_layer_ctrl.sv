// tb_layer_ctrl: self-checking test of the layer lookup and replacement
// controller, both hardware forms of qdLRU (QD_MODE 0: marked configurations
// inserted at the LRU position; QD_MODE 1: marked layers evicted first).
// Both instances receive the same accesses: a directed sequence first, then
// random accesses over a pool of addresses larger than the number of layers,
// with a fixed random subset of addresses flagged drop-quickly. Every
// response is compared with qdlru_model one cycle after the access (the
// specified latency), including the cleared layer on a miss.
module tb_layer_ctrl;
  import gap_cfg_pkg::*;
  import qdlru_model_pkg::*;

  localparam int unsigned L = 8;
  localparam int unsigned A = 32;
  localparam int unsigned W = $clog2(L);

  logic         clk = 0, rst_n = 0;
  logic         acc_valid = 0, acc_drop = 0;
  logic [A-1:0] acc_addr = '0;

  logic         resp_valid [2];
  acc_kind_e    resp_kind  [2];
  logic [W-1:0] resp_layer [2];
  logic         resp_evict [2];
  logic         resp_quick [2];
  logic         clr_en     [2];
  logic [W-1:0] clr_layer  [2];
  logic [W-1:0] active     [2];

  int checks = 0, failures = 0;
  int n_kind [2][3];

  for (genvar m = 0; m < 2; m++) begin : g_dut
    layer_ctrl #(.LAYERS(L), .ADDR_W(A), .QD_MODE(m[0])) dut (
      .clk, .rst_n, .acc_valid, .acc_addr, .acc_drop,
      .resp_valid (resp_valid[m]), .resp_kind (resp_kind[m]),
      .resp_layer (resp_layer[m]), .resp_evict (resp_evict[m]),
      .resp_quick (resp_quick[m]), .clr_en (clr_en[m]),
      .clr_layer (clr_layer[m]), .active_layer (active[m])
    );
  end

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  qdlru_model model [2];

  task automatic do_access(longint addr, bit drop);
    m_kind_e k; int lay; bit ev, q;
    acc_valid = 1; acc_addr = A'(addr); acc_drop = drop;
    @(negedge clk);
    acc_valid = 0;
    for (int m = 0; m < 2; m++) begin
      model[m].access(addr, drop, k, lay, ev, q);
      checks++;
      if (!resp_valid[m] || int'(resp_kind[m]) != int'(k) || resp_layer[m] != W'(lay)
          || resp_evict[m] != ev || resp_quick[m] != q || active[m] != W'(lay)
          || clr_en[m] != (k == M_MISS) || (k == M_MISS && clr_layer[m] != W'(lay))) begin
        failures++;
        $display("mode %0d addr %h: got kind=%0d layer=%0d ev=%0d q=%0d clr=%0d; exp kind=%0d layer=%0d ev=%0d q=%0d",
                 m, addr, resp_kind[m], resp_layer[m], resp_evict[m], resp_quick[m], clr_en[m],
                 k, lay, ev, q);
      end
      n_kind[m][int'(k)]++;
    end
  endtask

  initial begin
    bit flag [64];
    model[0] = new(L, 0);
    model[1] = new(L, 1);
    for (int i = 0; i < 64; i++) flag[i] = ($urandom_range(0, 3) == 0);
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // no access: no response
    checks++;
    if (resp_valid[0] || resp_valid[1]) failures++;
    // directed: fill, loop, hit, a thrashing loop of L+2 with and without marks
    for (int i = 0; i < L; i++) do_access(64'h1000 + i * 8, 0);
    do_access(64'h1000 + 7 * 8, 0);          // loop hit
    do_access(64'h1000, 0);                  // layer hit
    do_access(64'h1000, 0);                  // loop hit
    for (int r = 0; r < 4; r++)
      for (int i = 0; i < L + 2; i++) do_access(64'h2000 + i * 8, 0);
    for (int r = 0; r < 4; r++)
      for (int i = 0; i < L + 2; i++) do_access(64'h3000 + i * 8, i < 3);
    // no access for a cycle
    @(negedge clk);
    checks++;
    if (resp_valid[0] || resp_valid[1]) failures++;
    // random
    for (int n = 0; n < 6000; n++) begin
      int c;
      c = $urandom_range(0, 11 + (n / 1000) * 6);
      if (c > 63) c = 63;
      do_access(64'h8000 + c * 16, flag[c]);
    end
    for (int m = 0; m < 2; m++) begin
      $display("mode %0d: loop hits %0d, layer hits %0d, misses %0d", m,
               n_kind[m][0], n_kind[m][1], n_kind[m][2]);
      for (int k = 0; k < 3; k++) begin checks++; if (n_kind[m][k] == 0) failures++; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
