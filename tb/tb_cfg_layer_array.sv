// tb_cfg_layer_array: self-checking test of the COLS x ROWS x LAYERS
// configuration storage. Fills several layers word by word, clears layers,
// switches the active layer and compares every FU's word and valid bit with a
// model, one cycle after the read layer is selected.
module tb_cfg_layer_array;
  localparam int unsigned C = 4;
  localparam int unsigned R = 3;
  localparam int unsigned L = 4;
  localparam int unsigned D = 16;
  localparam int unsigned W = $clog2(L);

  logic             clk = 0, rst_n = 0;
  logic             clr_en = 0, wr_en = 0;
  logic [W-1:0]     clr_layer = '0, wr_layer = '0, rd_layer = '0;
  logic [1:0]       wr_row = '0, wr_col = '0;
  logic [D-1:0]     wr_data = '0;
  logic [D-1:0]     fu_cfg       [R][C];
  logic             fu_cfg_valid [R][C];
  int checks = 0, failures = 0;
  logic [D-1:0] m_mem [L][R][C];
  bit           m_val [L][R][C];

  cfg_layer_array #(.COLS(C), .ROWS(R), .LAYERS(L), .CFG_W(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_layer(int l);
    rd_layer = W'(l);
    @(negedge clk);
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++) begin
        checks++;
        if (fu_cfg_valid[r][c] != m_val[l][r][c] || (m_val[l][r][c] && fu_cfg[r][c] != m_mem[l][r][c])) begin
          failures++;
          $display("layer %0d fu[%0d][%0d]: got v=%0d d=%h exp v=%0d d=%h", l, r, c,
                   fu_cfg_valid[r][c], fu_cfg[r][c], m_val[l][r][c], m_mem[l][r][c]);
        end
      end
  endtask

  initial begin
    for (int l = 0; l < L; l++) for (int r = 0; r < R; r++) for (int c = 0; c < C; c++) begin
      m_val[l][r][c] = 0; m_mem[l][r][c] = '0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int round = 0; round < 40; round++) begin
      int l;
      int nw;
      l = $urandom_range(0, L - 1);
      nw = $urandom_range(1, R * C);
      // clear the layer, then map a random number of FU words into it
      clr_en = 1; clr_layer = W'(l);
      @(negedge clk);
      clr_en = 0;
      for (int r = 0; r < R; r++) for (int c = 0; c < C; c++) m_val[l][r][c] = 0;
      for (int k = 0; k < nw; k++) begin
        int r;
        int c;
        r = $urandom_range(0, R - 1);
        c = $urandom_range(0, C - 1);
        wr_en = 1; wr_layer = W'(l); wr_row = 2'(r); wr_col = 2'(c); wr_data = D'($urandom);
        @(negedge clk);
        m_val[l][r][c] = 1; m_mem[l][r][c] = wr_data;
      end
      wr_en = 0;
      for (int q = 0; q < L; q++) check_layer(q);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
