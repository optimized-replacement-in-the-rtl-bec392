// tb_qdlru_order: self-checking test of the qdLRU access queue.
// Random moves to the MRU or LRU position are applied; after every clock edge
// the rank of each layer and the LRU layer are compared with a list model of
// the queue (front = MRU). Also checks that ranks stay a permutation.
module tb_qdlru_order;
  localparam int unsigned L = 8;
  localparam int unsigned W = $clog2(L);

  logic         clk = 0, rst_n = 0;
  logic         upd_en = 0, upd_to_lru = 0;
  logic [W-1:0] upd_idx = '0;
  logic [W-1:0] rank [L];
  logic [W-1:0] lru_idx;
  int checks = 0, failures = 0;
  int order[$];

  qdlru_order #(.LAYERS(L)) dut (.*, .rank_o(rank));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    bit seen [L];
    for (int l = 0; l < L; l++) seen[l] = 0;
    for (int i = 0; i < L; i++) begin
      checks++;
      if (rank[order[i]] != W'(i)) begin
        failures++;
        $display("rank mismatch layer %0d: got %0d exp %0d", order[i], rank[order[i]], i);
      end
    end
    for (int l = 0; l < L; l++) seen[rank[l]] = 1;
    for (int l = 0; l < L; l++) begin checks++; if (!seen[l]) failures++; end
    checks++;
    if (lru_idx != W'(order[$])) begin
      failures++;
      $display("lru mismatch got %0d exp %0d", lru_idx, order[$]);
    end
  endtask

  initial begin
    for (int l = 0; l < L; l++) order.push_back(l);
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    compare();
    for (int n = 0; n < 3000; n++) begin
      int k;
      bit en, tl;
      en = ($urandom_range(0, 3) != 0);
      k  = $urandom_range(0, L - 1);
      tl = $urandom_range(0, 2) == 0;
      upd_en = en; upd_idx = W'(k); upd_to_lru = tl;
      @(negedge clk);
      if (en) begin
        foreach (order[i]) if (order[i] == k) begin order.delete(i); break; end
        if (tl) order.push_back(k); else order.push_front(k);
      end
      compare();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
