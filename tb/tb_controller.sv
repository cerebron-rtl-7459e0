// Self-checking testbench of the layer controller, run against an always-ready array
// and buffer models whose words are a known function of their address.
// For a standard 3x3 layer (12x12x8 -> 16 channels) and a depthwise 3x3 layer
// (12x12x16) it checks the number of input rows loaded (each row once per pass), the
// data and place of every row word, the number of weight register file writes, the
// number of items issued and the single `done` pulse.
module tb_controller;
  import cerebron_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0, busy, done, step, array_idle, advance, issue;
  layer_cfg_t cfg;
  logic [6:0] cgr, gn, g, cgi;
  logic [YW-1:0] nb, xgn, b, xi;
  logic [3:0] ky, kx, phase;
  logic [M-1:0][CHW-1:0] sched_ch;
  logic [$clog2(NS_DEPTH)-1:0] ns_addr;
  logic [VEC-1:0] ns_rdata;
  logic rf_we;
  logic [$clog2(RF_ROWS)-1:0] rf_slot;
  logic [$clog2(ROW_WORDS)-1:0] rf_word;
  logic [VEC-1:0] rf_data;
  logic [$clog2(W_DEPTH)-1:0] wb_addr;
  wvec_t wb_rdata, wrf_data;
  logic wrf_we;
  logic [$clog2(M)-1:0] wrf_col;
  logic [$clog2(WRF_DEPTH)-1:0] wrf_entry;

  controller dut (.*);

  assign step = advance;
  assign array_idle = 1'b1;
  always_comb for (int c = 0; c < M; c++) sched_ch[c] = CHW'(int'(g) * M + c);
  always_ff @(posedge clk) begin
    ns_rdata <= VEC'(ns_addr * 7 + 3);
    wb_rdata <= wvec_t'({48'(0), wb_addr});
  end

  int checks = 0, failures = 0;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_rf, n_wrf, n_item, n_done, bad_rf;
  always @(posedge clk) begin
    if (rf_we) begin
      n_rf++;
      // rows of a 12-row map sit in slot = row; word = x*CG + g
      if (rf_data !== VEC'((int'(rf_slot) * int'(cfg.w) * int'(cfg.cg) + int'(rf_word)) * 7 + 3)) bad_rf++;
    end
    if (wrf_we) n_wrf++;
    if (step && issue) n_item++;
    if (done) n_done++;
  end

  task automatic run(layer_cfg_t c, int e_rf, int e_wrf, int e_item, string name);
    n_rf = 0; n_wrf = 0; n_item = 0; n_done = 0; bad_rf = 0;
    cfg = c;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    while (busy) @(negedge clk);
    repeat (3) @(negedge clk);
    checks += 5;
    if (n_rf != e_rf)     begin failures++; $display("%s: row words %0d expected %0d", name, n_rf, e_rf); end
    if (bad_rf != 0)      begin failures++; $display("%s: %0d wrong row words", name, bad_rf); end
    if (n_wrf != e_wrf)   begin failures++; $display("%s: weight writes %0d expected %0d", name, n_wrf, e_wrf); end
    if (n_item != e_item) begin failures++; $display("%s: items %0d expected %0d", name, n_item, e_item); end
    if (n_done != 1)      begin failures++; $display("%s: done pulses %0d", name, n_done); end
  endtask

  initial begin
    layer_cfg_t c;
    cfg = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    c = '0; c.ltype = L_STD; c.k = 3; c.s = 1; c.h = 12; c.w = 12; c.ho = 12; c.wo = 12;
    c.cg = 1; c.f = 16; c.vth = 10;
    // 2 filter groups x 12 rows x 12 words; 2 x 8 x 9 taps x 4 entries; 2 x 2 bands x 12 px x 9
    run(c, 2*12*12, 2*8*9*4, 2*2*12*9, "standard");
    c.ltype = L_DW; c.cg = 2;
    // rows once: 12 x 24 words; 2 bands x 2 rounds x 8 x 3 rows; 2 bands x 2 rounds x 3 groups x 3
    run(c, 12*24, 2*2*8*3, 2*2*3*3, "depthwise");
    c.ltype = L_POOL; c.k = 2; c.s = 2; c.ho = 6; c.wo = 6;
    // pooling: 1 band of 6 output rows (input rows 0..11), no weights, 2 rounds x 2 groups x 2
    run(c, 12*24, 0, 2*2*2, "pooling");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
