// tb_fu_cfg_cell: self-checking test of one FU's configuration memory.
// Random writes, layer clears (also together with a write to the cleared
// layer) and read-layer changes; the registered output is compared one cycle
// later with an array model of words and valid bits.
module tb_fu_cfg_cell;
  localparam int unsigned L = 8;
  localparam int unsigned D = 16;
  localparam int unsigned W = $clog2(L);

  logic         clk = 0, rst_n = 0;
  logic         clr_en = 0, wr_en = 0;
  logic [W-1:0] clr_layer = '0, wr_layer = '0, rd_layer = '0;
  logic [D-1:0] wr_data = '0;
  logic [D-1:0] cfg_o;
  logic         cfg_valid_o;
  int checks = 0, failures = 0;
  logic [D-1:0] m_mem [L];
  bit           m_val [L];

  fu_cfg_cell #(.LAYERS(L), .CFG_W(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int l = 0; l < L; l++) begin m_val[l] = 0; m_mem[l] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < 5000; n++) begin
      int rl;
      logic [D-1:0] exp_d;
      bit exp_v;
      clr_en   = ($urandom_range(0, 9) == 0);
      clr_layer = W'($urandom_range(0, L - 1));
      wr_en    = ($urandom_range(0, 2) == 0);
      wr_layer = ($urandom_range(0, 3) == 0) ? clr_layer : W'($urandom_range(0, L - 1));
      wr_data  = D'($urandom);
      rl       = $urandom_range(0, L - 1);
      rd_layer = W'(rl);
      // the read returns the contents before this edge
      exp_d = m_mem[rl];
      exp_v = m_val[rl];
      @(negedge clk);
      if (clr_en) m_val[clr_layer] = 0;
      if (wr_en) begin m_val[wr_layer] = 1; m_mem[wr_layer] = wr_data; end
      checks++;
      if (cfg_valid_o != exp_v || (exp_v && cfg_o != exp_d)) begin
        failures++;
        $display("layer %0d: got v=%0d d=%h exp v=%0d d=%h", rl, cfg_valid_o, cfg_o, exp_v, exp_d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
