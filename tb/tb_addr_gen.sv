// Self-checking testbench of the address generator. For random loop counters of a
// standard 3x3 layer, a depthwise stride-2 layer and a pooling layer it recomputes
// the input row and its register-file slot, padding, channel groups, window pixels,
// first/last flags, weight tags, output coordinates and membrane-potential words.
module tb_addr_gen;
  import cerebron_pkg::*;
  layer_cfg_t cfg;
  logic [6:0] cgr, gn, g, cgi;
  logic [YW-1:0] nb, xgn, b, xi;
  logic [3:0] ky, kx;
  logic issue;
  logic [M-1:0][CHW-1:0] sched_ch, tab_idx;
  logic [N-1:0][$clog2(RF_ROWS)-1:0] row_slot;
  logic [N-1:0] row_ok;
  coord_t std_x;
  logic [L-1:0][6:0] std_cg;
  logic [L-1:0] std_cg_ok;
  coord_t [L-1:0][KMAX-1:0] px;
  logic [M-1:0][6:0] col_g;
  logic [M-1:0][2:0] col_b;
  item_t [N-1:0] sys_item;
  item_t [N-1:0][M-1:0] uni_item;

  addr_gen dut (.*);

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("mismatch: %s", what); end
  endtask

  initial begin
    issue = 1;
    for (int t = 0; t < 600; t++) begin
      int mode, pad, s;
      mode = t % 3;
      cfg = '0;
      cfg.h = 20; cfg.w = 20; cfg.cg = 3; cfg.f = 24; cfg.vbase = 11'd100;
      cfg.sched_en = (t % 2);
      if (mode == 0) begin cfg.ltype = L_STD;  cfg.k = 3; cfg.s = 1; cfg.ho = 20; cfg.wo = 20; end
      if (mode == 1) begin cfg.ltype = L_DW;   cfg.k = 3; cfg.s = 2; cfg.ho = 10; cfg.wo = 10; end
      if (mode == 2) begin cfg.ltype = L_POOL; cfg.k = 2; cfg.s = 2; cfg.ho = 10; cfg.wo = 10; end
      pad = (mode == 2) ? 0 : 1; s = cfg.s;
      cgr = 1; nb = 7; gn = 3; xgn = 3;
      g = 7'($urandom_range(0, 2)); b = YW'($urandom_range(0, 2));
      xi = YW'((mode == 0) ? $urandom_range(0, 19) : $urandom_range(0, 2));
      ky = 4'($urandom_range(0, int'(cfg.k) - 1)); kx = 4'($urandom_range(0, int'(cfg.k) - 1));
      cgi = 0;
      for (int c = 0; c < M; c++) sched_ch[c] = CHW'(23 - (int'(g) * M + c));
      #1;
      for (int r = 0; r < N; r++) begin
        int yo, yin;
        yo = int'(b) * 7 + r;
        yin = yo * s - pad + int'(ky);
        chk(row_ok[r] == (r < 7 && yo < int'(cfg.ho) && yin >= 0 && yin < 20), "row_ok");
        if (row_ok[r]) chk(int'(row_slot[r]) == yin % RF_ROWS, "row_slot");
        chk(int'(sys_item[r].meta.y) == yo % 256, "meta.y");
      end
      if (mode == 0) begin
        int xin;
        xin = int'(xi) - 1 + int'(kx);
        chk(std_x == ((xin >= 0 && xin < 20) ? coord_t'(xin) : coord_t'(-1)), "std_x");
        for (int l = 0; l < L; l++) chk(std_cg_ok[l] == (l < 3) && int'(std_cg[l]) == l, "std_cg");
        chk(sys_item[0].first == (ky == 0 && kx == 0), "first");
        chk(sys_item[0].last == (ky == 2 && kx == 2), "last");
        chk(int'(sys_item[0].tag) == int'(ky) * 3 + int'(kx), "tag");
        chk(int'(sys_item[0].meta.vaddr) == 100 + (int'(b) * 20 + int'(xi)) * 3 + int'(g), "std vaddr");
        chk(int'(sys_item[0].meta.ch) == int'(g) * M, "std ch");
      end else begin
        for (int l = 0; l < L; l++)
          for (int kk = 0; kk < KMAX; kk++) begin
            int xin;
            xin = (int'(xi) * L + l) * s - pad + kk;
            chk(px[l][kk] == ((kk < int'(cfg.k) && xin >= 0 && xin < 20) ? coord_t'(xin) : coord_t'(-1)), "px");
          end
        for (int c = 0; c < M; c++) begin
          int ch;
          ch = cfg.sched_en ? 23 - (int'(g) * M + c) : int'(g) * M + c;
          chk(int'(col_g[c]) == ch / 8 && int'(col_b[c]) == ch % 8, "column channel");
          chk(int'(uni_item[0][c].meta.ch) == ch, "uni ch");
          chk(int'(tab_idx[c]) == int'(g) * M + c, "tab_idx");
        end
        chk(uni_item[0][0].first == (ky == 0) && uni_item[0][0].last == (ky == cfg.k - 1), "uni first/last");
        chk(int'(uni_item[0][0].meta.vaddr) == 100 + (int'(b) * 3 + int'(xi)) * 3 + int'(g), "uni vaddr");
        for (int l = 0; l < L; l++)
          chk(uni_item[0][0].en[l] == ((int'(xi) * L + l) < 10 && int'(b) * 7 < int'(cfg.ho)), "uni en");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
