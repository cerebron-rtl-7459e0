// Layer controller.
//
// Runs one spiking layer (one time step) described by `cfg`, through four phases that
// repeat until every output neuron has been computed:
//  * weight load: fills the weight register file of every CU column from the weight
//    buffer (standard: the K*K*CG weight vectors of the column's filter; depthwise:
//    the K kernel rows of the column's channel). Done only with the array drained,
//    because items in flight still read the old entries.
//  * row load: reads from the neuron state buffer only the input rows the next band
//    needs and the row register file does not hold yet.
//  * stream: presents one item per step to the array; the array takes it when all
//    CUs are ready. Loop order, innermost first:
//      standard:  channel round cgi, kx, ky, output pixel x, band b, filter group g
//      depthwise: ky, pixel group xg, channel round g, band b
//    Standard layers keep a filter group's weights for the whole map; depthwise and
//    pooling layers keep a band's rows for all channel rounds.
//  * drain: bubbles are pushed until the array is idle.
// A band is nb = min(N, (RF_ROWS-K)/S + 1) output rows, so a band's input rows always
// fit in the row register file. `done` pulses once when the layer has finished.
// The design description names the controller only; phases, loop orders and timing
// are this implementation's own.
module controller
  import cerebron_pkg::*;
(
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       start,
  input  layer_cfg_t                 cfg,
  output logic                       busy,
  output logic                       done,
  // array
  input  logic                       step,
  input  logic                       array_idle,
  output logic                       advance,
  output logic                       issue,
  // loop state for the address generator
  output logic [6:0]                 cgr,
  output logic [YW-1:0]              nb,
  output logic [YW-1:0]              xgn,
  output logic [6:0]                 gn,
  output logic [6:0]                 g,
  output logic [YW-1:0]              b,
  output logic [YW-1:0]              xi,
  output logic [3:0]                 ky, kx,
  output logic [6:0]                 cgi,
  input  logic [M-1:0][CHW-1:0]      sched_ch,
  // neuron state buffer read -> row register file
  output logic [$clog2(NS_DEPTH)-1:0] ns_addr,
  input  logic [VEC-1:0]             ns_rdata,
  output logic                       rf_we,
  output logic [$clog2(RF_ROWS)-1:0] rf_slot,
  output logic [$clog2(ROW_WORDS)-1:0] rf_word,
  output logic [VEC-1:0]             rf_data,
  // weight buffer read -> weight register files
  output logic [$clog2(W_DEPTH)-1:0] wb_addr,
  input  wvec_t                      wb_rdata,
  output logic                       wrf_we,
  output logic [$clog2(M)-1:0]       wrf_col,
  output logic [$clog2(WRF_DEPTH)-1:0] wrf_entry,
  output wvec_t                      wrf_data,
  // phase counters for observation
  output logic [3:0]                 phase
);
  typedef enum logic [3:0] {S_IDLE, S_DISP, S_WLOAD, S_RLOAD, S_STREAM, S_END, S_DONE} state_e;
  state_e state;
  assign phase = 4'(state);

  layer_cfg_t c_q;
  logic       is_std, is_pool;
  assign is_std  = (c_q.ltype == L_STD);
  assign is_pool = (c_q.ltype == L_POOL);

  logic [YW-1:0] nbands, xn;
  logic [3:0]    pad;
  logic          need_w, need_rows;
  int            loaded_hi, ylo, yhi;

  // weight load counters
  logic [$clog2(M)-1:0] wc;
  logic [3:0]           wt_y, wt_x;
  logic [6:0]           wl;
  // row load counters
  int                   ry;
  logic [$clog2(ROW_WORDS)-1:0] rw;
  // read pipelines
  logic                 wp_v, wp_z, rp_v;
  logic [$clog2(M)-1:0] wp_col;
  logic [$clog2(WRF_DEPTH)-1:0] wp_entry;
  logic [$clog2(RF_ROWS)-1:0]   rp_slot;
  logic [$clog2(ROW_WORDS)-1:0] rp_word;

  assign pad = is_pool ? 4'd0 : ((c_q.k - 4'd1) >> 1);
  always_comb begin
    ylo = int'(b) * int'(nb) * int'(c_q.s) - int'(pad);
    if (ylo < 0) ylo = 0;
    yhi = (int'(b) * int'(nb) + int'(nb) - 1) * int'(c_q.s) - int'(pad) + int'(c_q.k) - 1;
    if (yhi > int'(c_q.h) - 1) yhi = int'(c_q.h) - 1;
  end

  // weight load addresses
  logic [CHW-1:0] wch;
  logic           wvalid;
  logic [3:0]     wtap;
  always_comb begin
    wtap = 4'(int'(wt_y) * int'(c_q.k) + int'(wt_x));
    if (is_std) begin
      wch     = CHW'(int'(g) * M + int'(wc));
      wvalid  = (int'(wch) < int'(c_q.f)) && (wl < c_q.cg);
      wb_addr = $clog2(W_DEPTH)'(int'(c_q.wbase) +
                ((int'(wch) * int'(c_q.k) * int'(c_q.k) + int'(wtap)) * int'(c_q.cg) + int'(wl)));
    end else begin
      wch     = c_q.sched_en ? sched_ch[wc] : CHW'(int'(g) * M + int'(wc));
      wvalid  = int'(wch) < int'(c_q.f);
      wb_addr = $clog2(W_DEPTH)'(int'(c_q.wbase) + int'(wch) * int'(c_q.k) + int'(wt_y));
    end
  end

  assign ns_addr = $clog2(NS_DEPTH)'(int'(c_q.ibase) + ry * int'(c_q.w) * int'(c_q.cg) + int'(rw));

  assign advance = (state == S_STREAM) || (state == S_DISP) || (state == S_END);
  assign issue   = (state == S_STREAM);
  assign busy    = (state != S_IDLE);
  assign done    = (state == S_DONE);

  assign rf_we    = rp_v;
  assign rf_slot  = rp_slot;
  assign rf_word  = rp_word;
  assign rf_data  = ns_rdata;
  assign wrf_we   = wp_v;
  assign wrf_col  = wp_col;
  assign wrf_entry = wp_entry;
  assign wrf_data = wp_z ? wvec_t'('0) : wb_rdata;

  logic stream_wrap;  // the step that issues the last item of a band pass
  always_comb begin
    if (is_std)
      stream_wrap = (cgi == cgr - 7'd1) && (kx == c_q.k - 4'd1) && (ky == c_q.k - 4'd1) && (xi == xn - 1'b1);
    else
      stream_wrap = (ky == c_q.k - 4'd1) && (xi == xn - 1'b1);
  end

  // layer constants derived from the configuration at start
  int nbv, cgrv;
  always_comb begin
    cgrv = (int'(cfg.cg) + L - 1) / L;
    nbv  = (RF_ROWS - int'(cfg.k)) / int'(cfg.s) + 1;
    if (nbv > N) nbv = N;
  end

  // last weight vector of the load
  logic wdone;
  always_comb begin
    if (is_std)
      wdone = (int'(wl) + 1 >= int'(cgr) * L) && (wt_x + 1'b1 >= c_q.k) &&
              (wt_y + 1'b1 >= c_q.k) && (wc == $clog2(M)'(M-1));
    else
      wdone = (wt_y + 1'b1 >= c_q.k) && (wc == $clog2(M)'(M-1));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      c_q <= '0;
      cgr <= '0; nb <= '0; xgn <= '0; gn <= '0; nbands <= '0; xn <= '0;
      g <= '0; b <= '0; xi <= '0; ky <= '0; kx <= '0; cgi <= '0;
      need_w <= 1'b0; need_rows <= 1'b0; loaded_hi <= -1;
      wc <= '0; wt_y <= '0; wt_x <= '0; wl <= '0; ry <= 0; rw <= '0;
      wp_v <= 1'b0; wp_z <= 1'b0; wp_col <= '0; wp_entry <= '0;
      rp_v <= 1'b0; rp_slot <= '0; rp_word <= '0;
    end else begin
      wp_v <= 1'b0;
      rp_v <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          c_q  <= cfg;
          cgr  <= 7'(cgrv);
          nb     <= YW'(nbv);
          nbands <= YW'((int'(cfg.ho) + nbv - 1) / nbv);
          xgn    <= YW'((int'(cfg.wo) + L - 1) / L);
          xn     <= (cfg.ltype == L_STD) ? cfg.wo : YW'((int'(cfg.wo) + L - 1) / L);
          gn     <= 7'((int'(cfg.f) + M - 1) / M);
          g <= '0; b <= '0; xi <= '0; ky <= '0; kx <= '0; cgi <= '0;
          loaded_hi <= -1;
          need_w    <= (cfg.ltype != L_POOL);
          need_rows <= 1'b1;
          state     <= S_DISP;
        end
        S_DISP: begin
          if (need_w) begin
            if (array_idle) begin
              wc <= '0; wt_y <= '0; wt_x <= '0; wl <= '0;
              state <= S_WLOAD;
            end
          end else if (need_rows) begin
            ry <= (loaded_hi + 1 > ylo) ? loaded_hi + 1 : ylo;
            rw <= '0;
            if (((loaded_hi + 1 > ylo) ? loaded_hi + 1 : ylo) > yhi) need_rows <= 1'b0;
            else state <= S_RLOAD;
          end else begin
            state <= S_STREAM;
          end
        end
        S_WLOAD: begin
          wp_v     <= 1'b1;
          wp_z     <= !wvalid;
          wp_col   <= wc;
          wp_entry <= is_std ? $clog2(WRF_DEPTH)'(int'(wtap) * int'(cgr) * L + int'(wl))
                             : $clog2(WRF_DEPTH)'(wt_y);
          if (is_std) begin
            if (int'(wl) + 1 < int'(cgr) * L) wl <= wl + 1'b1;
            else begin
              wl <= '0;
              if (wt_x + 1'b1 < c_q.k) wt_x <= wt_x + 1'b1;
              else begin
                wt_x <= '0;
                if (wt_y + 1'b1 < c_q.k) wt_y <= wt_y + 1'b1;
                else begin
                  wt_y <= '0;
                  wc <= wc + 1'b1;
                end
              end
            end
          end else begin
            if (wt_y + 1'b1 < c_q.k) wt_y <= wt_y + 1'b1;
            else begin
              wt_y <= '0;
              wc <= wc + 1'b1;
            end
          end
          if (wdone) begin
            need_w <= 1'b0;
            state  <= S_DISP;
          end
        end
        S_RLOAD: begin
          rp_v    <= 1'b1;
          rp_slot <= ry[$clog2(RF_ROWS)-1:0];
          rp_word <= rw;
          if (int'(rw) + 1 < int'(c_q.w) * int'(c_q.cg)) rw <= rw + 1'b1;
          else begin
            rw <= '0;
            ry <= ry + 1;
            if (ry >= yhi) begin
              loaded_hi <= yhi;
              need_rows <= 1'b0;
              state     <= S_DISP;
            end
          end
        end
        S_STREAM: if (step) begin
          // innermost counters
          if (is_std) begin
            if (cgi + 1'b1 < cgr) cgi <= cgi + 1'b1;
            else begin
              cgi <= '0;
              if (kx + 1'b1 < c_q.k) kx <= kx + 1'b1;
              else begin
                kx <= '0;
                if (ky + 1'b1 < c_q.k) ky <= ky + 1'b1;
                else begin
                  ky <= '0;
                  xi <= (xi + 1'b1 < xn) ? xi + 1'b1 : '0;
                end
              end
            end
          end else begin
            if (ky + 1'b1 < c_q.k) ky <= ky + 1'b1;
            else begin
              ky <= '0;
              xi <= (xi + 1'b1 < xn) ? xi + 1'b1 : '0;
            end
          end
          if (stream_wrap) begin
            state <= S_DISP;
            if (is_std) begin
              if (b + 1'b1 < nbands) begin
                b <= b + 1'b1; need_rows <= 1'b1;
              end else begin
                b <= '0; loaded_hi <= -1;
                if (g + 1'b1 < gn) begin
                  g <= g + 1'b1; need_w <= 1'b1; need_rows <= 1'b1;
                end else state <= S_END;
              end
            end else begin
              if (g + 1'b1 < gn) begin
                g <= g + 1'b1; need_w <= !is_pool;
              end else begin
                g <= '0;
                if (b + 1'b1 < nbands) begin
                  b <= b + 1'b1; need_rows <= 1'b1; need_w <= !is_pool;
                end else state <= S_END;
              end
            end
          end
        end
        S_END:  if (array_idle) state <= S_DONE;
        S_DONE: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
