// Address generator.
//
// From the controller's loop counters it forms, every cycle and combinationally,
// everything one step of the CU array needs:
//  * the register-file slot of the input row each CU row reads (row y_in mod RF_ROWS,
//    y_in = y_out*S - P + ky) and whether that row lies inside the map;
//  * standard mode: the input pixel (x_out*S - P + kx) and the channel group of each PE
//    (cgi*L + l), so the L PEs of a CU split the input channels;
//  * unicasting mode: the K pixels of one kernel row for each PE (PE l owns output
//    pixel xg*L + l) and the channel of each CU column, taken from the scheduling
//    table when scheduling is on;
//  * the item bookkeeping: first/last of a neuron, the weight register file tag, the
//    output neuron coordinates and its membrane-potential word
//      standard:  vbase + (b*Wo + x)*G + g,    depthwise / pooling: vbase + (b*XG + xg)*G + g
//    which is unique in the bank of the PE that fires it.
// A negative coordinate marks padding. P = (K-1)/2 for convolutions and 0 for pooling.
// The address generator is named and given its task by the design description; the
// address formulas are this implementation's own.
module addr_gen
  import cerebron_pkg::*;
(
  input  layer_cfg_t                  cfg,
  input  logic [6:0]                  cgr,      // ceil(CG / L)
  input  logic [YW-1:0]               nb,       // output rows per band
  input  logic [YW-1:0]               xgn,      // ceil(Wo / L)
  input  logic [6:0]                  gn,       // channel rounds / filter groups
  input  logic                        issue,    // 0: bubble
  input  logic [6:0]                  g,
  input  logic [YW-1:0]               b,
  input  logic [YW-1:0]               xi,       // x (standard) or xg (unicasting)
  input  logic [3:0]                  ky, kx,
  input  logic [6:0]                  cgi,
  input  logic [M-1:0][CHW-1:0]       sched_ch,
  output logic [M-1:0][CHW-1:0]       tab_idx,
  output logic [N-1:0][$clog2(RF_ROWS)-1:0] row_slot,
  output logic [N-1:0]                row_ok,
  output coord_t                      std_x,
  output logic [L-1:0][6:0]           std_cg,
  output logic [L-1:0]                std_cg_ok,
  output coord_t [L-1:0][KMAX-1:0]    px,
  output logic [M-1:0][6:0]           col_g,
  output logic [M-1:0][2:0]           col_b,
  output item_t [N-1:0]               sys_item,
  output item_t [N-1:0][M-1:0]        uni_item
);
  logic [3:0] pad;
  logic       is_std;
  assign is_std = (cfg.ltype == L_STD);
  assign pad = (cfg.ltype == L_POOL) ? 4'd0 : (cfg.k - 4'd1) >> 1;

  logic [CHW-1:0] chc [M];
  always_comb begin
    for (int c = 0; c < M; c++) begin
      chc[c]     = cfg.sched_en ? sched_ch[c] : CHW'(int'(g) * M + c);
      col_g[c]   = chc[c][CHW-1:3];
      col_b[c]   = chc[c][2:0];
    end
  end

  always_comb
    for (int c = 0; c < M; c++) tab_idx[c] = CHW'(int'(g) * M + c);

  logic        first, last;
  logic [TAGW-1:0] tag;
  always_comb begin
    if (is_std) begin
      first = (ky == 0) && (kx == 0) && (cgi == 0);
      last  = (ky == cfg.k - 4'd1) && (kx == cfg.k - 4'd1) && (cgi == cgr - 7'd1);
      tag   = TAGW'((int'(ky) * int'(cfg.k) + int'(kx)) * int'(cgr) + int'(cgi));
    end else begin
      first = (ky == 0);
      last  = (ky == cfg.k - 4'd1);
      tag   = TAGW'(ky);
    end
  end

  logic [YW-1:0] yout [N];
  always_comb begin
    for (int r = 0; r < N; r++) begin
      int yin;
      yout[r]     = YW'(int'(b) * int'(nb) + r);
      yin         = int'(yout[r]) * int'(cfg.s) - int'(pad) + int'(ky);
      row_ok[r]   = (yout[r] < cfg.ho) && (r < int'(nb)) && (yin >= 0) && (yin < int'(cfg.h));
      row_slot[r] = yin[$clog2(RF_ROWS)-1:0];
    end
  end

  // standard mode pixel and channel groups
  always_comb begin
    int xin;
    xin   = int'(xi) * int'(cfg.s) - int'(pad) + int'(kx);
    std_x = (xin >= 0 && xin < int'(cfg.w)) ? coord_t'(xin) : coord_t'(-1);
    for (int l = 0; l < L; l++) begin
      std_cg[l]    = 7'(cgi * L + l);
      std_cg_ok[l] = (int'(cgi) * L + l) < int'(cfg.cg);
    end
  end

  // unicasting mode pixels
  always_comb begin
    for (int l = 0; l < L; l++)
      for (int kk = 0; kk < KMAX; kk++) begin
        int xin;
        xin = (int'(xi) * L + l) * int'(cfg.s) - int'(pad) + kk;
        px[l][kk] = (kk < int'(cfg.k) && xin >= 0 && xin < int'(cfg.w)) ? coord_t'(xin) : coord_t'(-1);
      end
  end

  always_comb begin
    for (int r = 0; r < N; r++) begin
      sys_item[r]            = '0;
      sys_item[r].valid      = issue;
      sys_item[r].first      = first;
      sys_item[r].last       = last;
      sys_item[r].en         = {L{issue && (yout[r] < cfg.ho) && (r < int'(nb))}};
      sys_item[r].tag        = tag;
      sys_item[r].meta.y     = yout[r];
      sys_item[r].meta.x     = xi;
      sys_item[r].meta.ch    = CHW'(g * M);
      sys_item[r].meta.vaddr = VAW'(int'(cfg.vbase) + (int'(b) * int'(cfg.wo) + int'(xi)) * int'(gn) + int'(g));
      for (int c = 0; c < M; c++) begin
        uni_item[r][c]            = '0;
        uni_item[r][c].valid      = issue;
        uni_item[r][c].first      = first;
        uni_item[r][c].last       = last;
        for (int l = 0; l < L; l++)
          uni_item[r][c].en[l] = issue && (yout[r] < cfg.ho) && (r < int'(nb)) &&
                                 ((int'(xi) * L + l) < int'(cfg.wo)) && (int'(chc[c]) < int'(cfg.f));
        uni_item[r][c].tag        = tag;
        uni_item[r][c].meta.y     = yout[r];
        uni_item[r][c].meta.x     = YW'(int'(xi) * L);
        uni_item[r][c].meta.ch    = chc[c];
        uni_item[r][c].meta.vaddr = VAW'(int'(cfg.vbase) + (int'(b) * int'(xgn) + int'(xi)) * int'(gn) + int'(g));
      end
    end
  end

endmodule
