// Self-checking testbench of the data collection unit. Random rows are written into
// the row register file and random weight vectors into the weight register files;
// random read requests are then checked against a model: standard-mode index vectors
// (pixel, channel group, padding), unicasting-mode window vectors (K pixels of one
// channel, padding) and the weight bus in standard and depthwise modes.
module tb_data_collection;
  import cerebron_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;

  layer_e ltype;
  logic [6:0] cg;
  logic [3:0] k;
  logic wr_en = 0, wrf_we = 0;
  logic [$clog2(RF_ROWS)-1:0] wr_slot;
  logic [$clog2(ROW_WORDS)-1:0] wr_word;
  logic [VEC-1:0] wr_data;
  logic [$clog2(M)-1:0] wrf_col;
  logic [$clog2(WRF_DEPTH)-1:0] wrf_entry;
  wvec_t wrf_data;
  logic [N-1:0][$clog2(RF_ROWS)-1:0] row_slot;
  logic [N-1:0] row_ok;
  coord_t std_x;
  logic [L-1:0][6:0] std_cg;
  logic [L-1:0] std_cg_ok;
  logic [N-1:0][L-1:0][VEC-1:0] std_idx;
  coord_t [L-1:0][KMAX-1:0] px;
  logic [M-1:0][6:0] col_g;
  logic [M-1:0][2:0] col_b;
  logic [N-1:0][M-1:0][L-1:0][VEC-1:0] uni_idx;
  logic [M-1:0][TAGW-1:0] col_tag;
  wvec_t [M-1:0][L-1:0] col_w;

  data_collection dut (.*);

  int checks = 0, failures = 0;
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int WPX = 10;   // pixels per row in this test
  logic [VEC-1:0] rows [RF_ROWS][WPX*2];
  wvec_t          wrf  [M][64];

  initial begin
    ltype = L_STD; cg = 2; k = 3;
    row_slot = '0; row_ok = '0; std_x = '0; std_cg = '0; std_cg_ok = '0; px = '0;
    col_g = '0; col_b = '0; col_tag = '0;
    for (int s = 0; s < RF_ROWS; s++)
      for (int wd = 0; wd < WPX*2; wd++) begin
        @(negedge clk); wr_en = 1; wr_slot = 4'(s); wr_word = 11'(wd); wr_data = VEC'($urandom);
        rows[s][wd] = wr_data;
      end
    @(negedge clk); wr_en = 0;
    for (int c = 0; c < M; c++)
      for (int e = 0; e < 64; e++) begin
        @(negedge clk); wrf_we = 1; wrf_col = 3'(c); wrf_entry = 10'(e); wrf_data = {$urandom, $urandom};
        wrf[c][e] = wrf_data;
      end
    @(negedge clk); wrf_we = 0;

    for (int t = 0; t < 200; t++) begin
      @(negedge clk);
      ltype = (t % 2) ? L_DW : L_STD;
      for (int r = 0; r < N; r++) begin row_slot[r] = 4'($urandom_range(0, 15)); row_ok[r] = ($urandom_range(0, 9) != 0); end
      std_x = ($urandom_range(0, 5) == 0) ? coord_t'(-1) : coord_t'($urandom_range(0, WPX-1));
      for (int l = 0; l < L; l++) begin std_cg[l] = 7'($urandom_range(0, 1)); std_cg_ok[l] = $urandom_range(0, 1); end
      for (int l = 0; l < L; l++)
        for (int kk = 0; kk < KMAX; kk++)
          px[l][kk] = ($urandom_range(0, 5) == 0) ? coord_t'(-1) : coord_t'($urandom_range(0, WPX-1));
      for (int c = 0; c < M; c++) begin
        col_g[c] = 7'($urandom_range(0, 1)); col_b[c] = 3'($urandom_range(0, 7));
        col_tag[c] = TAGW'($urandom_range(0, 15));
      end
      #1;
      for (int r = 0; r < N; r++)
        for (int l = 0; l < L; l++) begin
          logic [VEC-1:0] e;
          e = (row_ok[r] && std_cg_ok[l] && std_x >= 0) ? rows[row_slot[r]][std_x*2 + std_cg[l]] : '0;
          checks++;
          if (std_idx[r][l] !== e) failures++;
          for (int c = 0; c < M; c++) begin
            logic [VEC-1:0] u;
            u = '0;
            for (int kk = 0; kk < 3; kk++)
              if (row_ok[r] && px[l][kk] >= 0) u[kk] = rows[row_slot[r]][px[l][kk]*2 + col_g[c]][col_b[c]];
            checks++;
            if (uni_idx[r][c][l] !== u) failures++;
          end
        end
      for (int c = 0; c < M; c++)
        for (int l = 0; l < L; l++) begin
          checks++;
          if (col_w[c][l] !== ((ltype == L_STD) ? wrf[c][col_tag[c]*L + l] : wrf[c][col_tag[c]])) failures++;
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
