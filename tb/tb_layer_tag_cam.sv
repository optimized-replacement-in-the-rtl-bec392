// tb_layer_tag_cam: self-checking test of the layer start-address tags.
// Installs random addresses (from a small pool, never duplicating a stored
// one, as the controller guarantees) into random layers and checks every
// search result, the valid and mark vectors and the lowest empty layer
// against an array model.
module tb_layer_tag_cam;
  localparam int unsigned L = 8;
  localparam int unsigned A = 16;
  localparam int unsigned W = $clog2(L);

  logic         clk = 0, rst_n = 0;
  logic [A-1:0] srch_addr = '0;
  logic         srch_hit;
  logic [W-1:0] srch_idx;
  logic         wr_en = 0, wr_mark = 0;
  logic [W-1:0] wr_idx = '0;
  logic [A-1:0] wr_addr = '0;
  logic [L-1:0] valid_o, mark_o;
  logic         free_any;
  logic [W-1:0] free_idx;
  int checks = 0, failures = 0;

  bit           m_valid [L];
  bit           m_mark  [L];
  logic [A-1:0] m_tag   [L];

  layer_tag_cam #(.LAYERS(L), .ADDR_W(A)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_search(logic [A-1:0] a);
    int exp_idx = -1;
    srch_addr = a;
    #1;
    for (int l = 0; l < L; l++) if (m_valid[l] && m_tag[l] == a) exp_idx = l;
    checks++;
    if (srch_hit !== (exp_idx >= 0) || (exp_idx >= 0 && srch_idx != W'(exp_idx))) begin
      failures++;
      $display("search %h: hit=%0d idx=%0d exp %0d", a, srch_hit, srch_idx, exp_idx);
    end
  endtask

  task automatic check_state();
    int exp_free = -1;
    for (int l = L - 1; l >= 0; l--) if (!m_valid[l]) exp_free = l;
    for (int l = 0; l < L; l++) begin
      checks++;
      if (valid_o[l] != m_valid[l] || (m_valid[l] && mark_o[l] != m_mark[l])) failures++;
    end
    checks++;
    if (free_any != (exp_free >= 0) || (exp_free >= 0 && free_idx != W'(exp_free))) begin
      failures++;
      $display("free: any=%0d idx=%0d exp %0d", free_any, free_idx, exp_free);
    end
  endtask

  initial begin
    for (int l = 0; l < L; l++) begin m_valid[l] = 0; m_mark[l] = 0; m_tag[l] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check_state();
    for (int n = 0; n < 2000; n++) begin
      logic [A-1:0] a;
      bit dup;
      int k;
      // searches over the whole pool
      for (int s = 0; s < 4; s++) check_search(A'($urandom_range(0, 23)));
      // install a new address not present elsewhere
      a = A'($urandom_range(0, 23));
      dup = 0;
      for (int l = 0; l < L; l++) if (m_valid[l] && m_tag[l] == a) dup = 1;
      k = (n < L) ? n : $urandom_range(0, L - 1);
      wr_en = !dup; wr_idx = W'(k); wr_addr = a; wr_mark = 1'($urandom_range(0, 1));
      @(negedge clk);
      if (!dup) begin
        m_valid[k] = 1; m_tag[k] = a; m_mark[k] = wr_mark;
      end
      wr_en = 0;
      check_state();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
