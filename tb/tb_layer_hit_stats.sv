// tb_layer_hit_stats: self-checking test of the access counters. Random
// classified accesses are counted by the model and compared with the
// counters; a narrow counter instance checks saturation, and the clear input
// is exercised.
module tb_layer_hit_stats;
  import gap_cfg_pkg::*;

  logic      clk = 0, rst_n = 0, clear = 0, acc_valid = 0;
  acc_kind_e acc_kind = ACC_MISS;
  logic [31:0] a_total, a_hit, a_loop, a_layer;
  logic [3:0]  s_total, s_hit, s_loop, s_layer;
  int checks = 0, failures = 0;
  longint m_total, m_hit, m_loop, m_layer;

  layer_hit_stats #(.CNT_W(32)) dut (.*);
  layer_hit_stats #(.CNT_W(4)) dut_sat (
    .clk, .rst_n, .clear, .acc_valid, .acc_kind,
    .a_total (s_total), .a_hit (s_hit), .a_loop (s_loop), .a_layer (s_layer)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint sat(longint v);
    return (v > 15) ? 15 : v;
  endfunction

  task automatic compare();
    checks++;
    if (a_total != 32'(m_total) || a_hit != 32'(m_hit) || a_loop != 32'(m_loop) || a_layer != 32'(m_layer)) begin
      failures++;
      $display("got %0d/%0d/%0d/%0d exp %0d/%0d/%0d/%0d", a_total, a_hit, a_loop, a_layer,
               m_total, m_hit, m_loop, m_layer);
    end
    checks++;
    if (s_total != 4'(sat(m_total)) || s_hit != 4'(sat(m_hit)) || s_loop != 4'(sat(m_loop))
        || s_layer != 4'(sat(m_layer))) begin
      failures++;
      $display("saturating counters wrong: %0d/%0d/%0d/%0d", s_total, s_hit, s_loop, s_layer);
    end
  endtask

  initial begin
    m_total = 0; m_hit = 0; m_loop = 0; m_layer = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    compare();
    for (int n = 0; n < 3000; n++) begin
      int k;
      k = $urandom_range(0, 2);
      acc_valid = ($urandom_range(0, 3) != 0);
      acc_kind  = acc_kind_e'(k);
      clear     = (n == 1500);
      @(negedge clk);
      if (clear) begin
        m_total = 0; m_hit = 0; m_loop = 0; m_layer = 0;
      end else if (acc_valid) begin
        m_total++;
        if (k != 2) m_hit++;
        if (k == 0) m_loop++;
        if (k == 1) m_layer++;
      end
      compare();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
