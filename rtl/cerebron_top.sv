// Cerebron: reconfigurable accelerator for spatiotemporally sparse spiking networks.
//
// The accelerator runs one spiking layer per `start`: standard or pointwise
// convolution (CU array in systolic mode, PEs in cascade mode), depthwise convolution
// (unicasting mode, stand-alone PEs) or average pooling (unicasting mode, pooling
// PEs). Integrate-and-fire neurons keep their membrane potentials in the VMEM buffer
// between time steps; `cfg.first_step` starts them at zero.
//
//   host / DMA --> weight buffer ----------> weight register files --+
//   host / DMA --> neuron state buffer A/B -> row register file ------+-> CU array
//                  (input side)                                       |   8 x 8 CUs
//   controller + address generator sequence the loads and the items --+   x 4 PEs
//   CU array firings --> output neuron state buffer (bit writes), VMEM buffer,
//                        workload accumulator of the scheduling unit
//
// Two neuron state buffers alternate as input and output (`pp_sel`), so a network is
// run layer after layer without copying. When a layer ends, the workload scheduling
// unit sorts the spike counts of its output channels; a following depthwise layer
// with `cfg.sched_en` set processes its channels in the balanced order.
//
// Host interface: weights are written word by word (hw_*), neuron states through
// hn_* into the buffer chosen by hn_buf (0: A, 1: B), read back with one cycle of
// latency. `cfg` must stay stable while `busy` is high. `done` pulses when the layer
// and its schedule are complete. The DMA engine and host processor of the system are
// outside this module; their data paths are these ports.
// The block structure follows the design description; the host interface, the buffer
// pairing and the sizes of the buffers are this implementation's own.
module cerebron_top
  import cerebron_pkg::*;
(
  input  logic                        clk,
  input  logic                        rst_n,
  // host: weights
  input  logic                        hw_we,
  input  logic [$clog2(W_DEPTH)-1:0]  hw_addr,
  input  wvec_t                       hw_wdata,
  // host: neuron states
  input  logic                        hn_buf,
  input  logic                        hn_we,
  input  logic [$clog2(NS_DEPTH)-1:0] hn_addr,
  input  logic [VEC-1:0]              hn_wdata,
  output logic [VEC-1:0]              hn_rdata,
  // layer control
  input  layer_cfg_t                  cfg,
  input  logic                        pp_sel,     // 0: A is input, B output
  input  logic [3:0]                  sched_iters,
  input  logic                        start,
  output logic                        busy,
  output logic                        done,
  // scheduling table / workload readback
  input  logic [$clog2(FMAX)-1:0]     cnt_idx,
  output logic [15:0]                 cnt_val
);
  localparam int unsigned BAW = $clog2(NS_DEPTH*VEC);

  // ---------------------------------------------------------------- controller
  logic ctrl_busy, ctrl_done, step, array_idle, advance, issue;
  logic [6:0] cgr, gn, g, cgi;
  logic [YW-1:0] nb, xgn, b, xi;
  logic [3:0] ky, kx, phase;
  logic [M-1:0][CHW-1:0] sched_ch, tab_idx;
  logic [$clog2(NS_DEPTH)-1:0] ns_raddr;
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

  controller u_ctrl (
    .clk, .rst_n, .start, .cfg, .busy(ctrl_busy), .done(ctrl_done),
    .step, .array_idle, .advance, .issue,
    .cgr, .nb, .xgn, .gn, .g, .b, .xi, .ky, .kx, .cgi, .sched_ch,
    .ns_addr(ns_raddr), .ns_rdata, .rf_we, .rf_slot, .rf_word, .rf_data,
    .wb_addr, .wb_rdata, .wrf_we, .wrf_col, .wrf_entry, .wrf_data, .phase
  );

  // ---------------------------------------------------------------- address generator
  logic [N-1:0][$clog2(RF_ROWS)-1:0] row_slot;
  logic [N-1:0] row_ok;
  coord_t std_x;
  logic [L-1:0][6:0] std_cg;
  logic [L-1:0] std_cg_ok;
  coord_t [L-1:0][KMAX-1:0] px;
  logic [M-1:0][6:0] col_g;
  logic [M-1:0][2:0] col_b;
  item_t [N-1:0] sys_item, sys_in;
  item_t [N-1:0][M-1:0] uni_item, uni_in;

  addr_gen u_ag (
    .cfg, .cgr, .nb, .xgn, .gn, .issue, .g, .b, .xi, .ky, .kx, .cgi,
    .sched_ch, .tab_idx, .row_slot, .row_ok, .std_x, .std_cg, .std_cg_ok,
    .px, .col_g, .col_b, .sys_item, .uni_item
  );

  // ---------------------------------------------------------------- data collection
  logic [N-1:0][L-1:0][VEC-1:0] std_idx;
  logic [N-1:0][M-1:0][L-1:0][VEC-1:0] uni_idx;
  logic [M-1:0][TAGW-1:0] col_tag;
  wvec_t [M-1:0][L-1:0] col_w;

  data_collection u_dc (
    .clk, .ltype(cfg.ltype), .cg(cfg.cg), .k(cfg.k),
    .wr_en(rf_we), .wr_slot(rf_slot), .wr_word(rf_word), .wr_data(rf_data),
    .wrf_we, .wrf_col, .wrf_entry, .wrf_data,
    .row_slot, .row_ok, .std_x, .std_cg, .std_cg_ok, .std_idx,
    .px, .col_g, .col_b, .uni_idx, .col_tag, .col_w
  );

  always_comb begin
    for (int r = 0; r < N; r++) begin
      sys_in[r]     = sys_item[r];
      sys_in[r].idx = std_idx[r];
      for (int c = 0; c < M; c++) begin
        uni_in[r][c]     = uni_item[r][c];
        uni_in[r][c].idx = uni_idx[r][c];
      end
    end
  end

  // ---------------------------------------------------------------- CU array
  pe_mode_e pmode;
  assign pmode = (cfg.ltype == L_STD) ? PE_CASCADE : (cfg.ltype == L_DW) ? PE_ALONE : PE_POOL;

  logic  [N-1:0][M-1:0][L-1:0]          vre, o_valid, o_spike;
  logic  [N-1:0][M-1:0][L-1:0][VAW-1:0] vraddr;
  vmem_t [N-1:0][M-1:0][L-1:0]          vrdata, o_vmem;
  meta_t [N-1:0][M-1:0][L-1:0]          o_meta;

  cu_array u_arr (
    .clk, .rst_n, .systolic(cfg.ltype == L_STD), .mode(pmode), .vth(cfg.vth),
    .first_step(cfg.first_step), .advance, .step, .idle(array_idle),
    .sys_in, .uni_in, .col_tag, .col_w,
    .vmem_re(vre), .vmem_raddr(vraddr), .vmem_rdata(vrdata),
    .out_valid(o_valid), .out_spike(o_spike), .out_vmem(o_vmem), .out_meta(o_meta)
  );

  // ---------------------------------------------------------------- VMEM buffer
  logic  [NPE-1:0]          v_we;
  logic  [NPE-1:0][VAW-1:0] v_waddr;
  vmem_t [NPE-1:0]          v_wdata;
  always_comb
    for (int r = 0; r < N; r++)
      for (int c = 0; c < M; c++)
        for (int l = 0; l < L; l++) begin
          v_we   [(r*M + c)*L + l] = o_valid[r][c][l];
          v_waddr[(r*M + c)*L + l] = o_meta[r][c][l].vaddr;
          v_wdata[(r*M + c)*L + l] = o_vmem[r][c][l];
        end

  vmem_buffer u_vmem (
    .clk, .re(vre), .raddr(vraddr), .rdata(vrdata),
    .we(v_we), .waddr(v_waddr), .wdata(v_wdata)
  );

  // ---------------------------------------------------------------- output spikes
  logic [NPE-1:0]          s_we, s_bit;
  logic [NPE-1:0][BAW-1:0] s_addr;
  logic [M-1:0]            acc_en;
  logic [M-1:0][$clog2(FMAX)-1:0] acc_ch;
  logic [M-1:0][5:0]       acc_n;
  logic [6:0]              cgo;
  assign cgo = 7'((int'(cfg.f) + VEC - 1) / VEC);

  always_comb begin
    for (int c = 0; c < M; c++) begin
      acc_en[c] = 1'b0; acc_ch[c] = '0; acc_n[c] = '0;
    end
    for (int r = 0; r < N; r++)
      for (int c = 0; c < M; c++)
        for (int l = 0; l < L; l++) begin
          int p, f, x;
          p = (r*M + c)*L + l;
          if (cfg.ltype == L_STD) begin
            f = int'(o_meta[r][c][l].ch) + c;
            x = int'(o_meta[r][c][l].x);
          end else begin
            f = int'(o_meta[r][c][l].ch);
            x = int'(o_meta[r][c][l].x) + l;
          end
          s_we[p]   = o_valid[r][c][l] && (f < int'(cfg.f));
          s_bit[p]  = o_spike[r][c][l];
          s_addr[p] = BAW'((int'(cfg.obase) + (int'(o_meta[r][c][l].y) * int'(cfg.wo) + x) * int'(cgo)) * VEC + f);
          if (s_we[p]) begin
            acc_ch[c] = $clog2(FMAX)'(f);
            if (o_spike[r][c][l]) begin
              acc_en[c] = 1'b1;
              acc_n[c]  = acc_n[c] + 6'd1;
            end
          end
        end
  end

  // ---------------------------------------------------------------- buffers
  logic [VEC-1:0] b_rdata_a, b_rdata_b, hn_rdata_a, hn_rdata_b;
  logic [NPE-1:0] s_we_a, s_we_b;
  assign s_we_a = pp_sel ? s_we : '0;
  assign s_we_b = pp_sel ? '0 : s_we;
  assign ns_rdata = pp_sel ? b_rdata_b : b_rdata_a;
  assign hn_rdata = hn_buf ? hn_rdata_b : hn_rdata_a;

  ns_buffer u_ns_a (
    .clk, .a_we(hn_we && !hn_buf), .a_addr(hn_addr), .a_wdata(hn_wdata), .a_rdata(hn_rdata_a),
    .b_addr(ns_raddr), .b_rdata(b_rdata_a), .s_we(s_we_a), .s_addr, .s_bit
  );
  ns_buffer u_ns_b (
    .clk, .a_we(hn_we && hn_buf), .a_addr(hn_addr), .a_wdata(hn_wdata), .a_rdata(hn_rdata_b),
    .b_addr(ns_raddr), .b_rdata(b_rdata_b), .s_we(s_we_b), .s_addr, .s_bit
  );

  weight_buffer u_wbuf (
    .clk, .a_we(hw_we), .a_addr(hw_addr), .a_wdata(hw_wdata),
    .b_addr(wb_addr), .b_rdata(wb_rdata)
  );

  // ---------------------------------------------------------------- workload scheduling
  logic sch_busy, sch_done;
  logic [M-1:0][$clog2(FMAX)-1:0] s_idx, s_ch;
  always_comb
    for (int c = 0; c < M; c++) begin
      s_idx[c]    = $clog2(FMAX)'(tab_idx[c]);
      sched_ch[c] = CHW'(s_ch[c]);
    end

  logic ctrl_done_q;
  workload_sched u_sched (
    .clk, .rst_n, .clear(start && !busy), .acc_en, .acc_ch, .acc_n,
    .start(ctrl_done), .f(($clog2(FMAX)+1)'(cfg.f)), .iters(sched_iters),
    .busy(sch_busy), .done(sch_done), .tab_idx(s_idx), .tab_ch(s_ch),
    .cnt_rd(cnt_val), .cnt_rd_idx(cnt_idx)
  );

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) ctrl_done_q <= 1'b0;
    else        ctrl_done_q <= ctrl_done || (ctrl_done_q && !sch_done);

  assign busy = ctrl_busy || sch_busy || ctrl_done_q;
  assign done = ctrl_done_q && sch_done;

endmodule
