// Reconfigurable CU array: N rows by M columns of computing units.
//
// Inter-CU reconfiguration selects how items reach the CUs:
//  * systolic mode (standard and pointwise convolution): row r takes its items at
//    the left edge (sys_in[r]) and every step each item moves one CU to the right,
//    so the same input neuron states are reused by all M columns, each of which
//    holds a different filter;
//  * unicasting mode (depthwise convolution and pooling): every CU takes its own
//    item (uni_in[r][c]) straight from the data collection register files.
// Each column has one weight bus, broadcast to the N CUs of the column. The array
// tells the weight register files which entry each column needs (col_tag, taken from
// the item entering the top CU of that column) and receives the L weight vectors of
// that entry on col_w in the same cycle.
//
// Timing: the array steps all CUs together; a step happens when `advance` is high and
// every CU is ready, so the CU with the most aligned pairs sets the pace. Bubbles
// (valid = 0) are used to fill and drain the systolic pipeline. `idle` is high when
// no CU holds work and no item is in flight.
// The two modes and the per-column weight bus follow the design description; the
// lock-step advance and the tag lookup are choices of this implementation.
module cu_array
  import cerebron_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          systolic,
  input  pe_mode_e      mode,
  input  vmem_t         vth,
  input  logic          first_step,
  input  logic          advance,
  output logic          step,
  output logic          idle,
  input  item_t [N-1:0]         sys_in,
  input  item_t [N-1:0][M-1:0]  uni_in,
  output logic  [M-1:0][TAGW-1:0] col_tag,
  input  wvec_t [M-1:0][L-1:0]  col_w,
  output logic  [N-1:0][M-1:0][L-1:0]          vmem_re,
  output logic  [N-1:0][M-1:0][L-1:0][VAW-1:0] vmem_raddr,
  input  vmem_t [N-1:0][M-1:0][L-1:0]          vmem_rdata,
  output logic  [N-1:0][M-1:0][L-1:0]          out_valid,
  output logic  [N-1:0][M-1:0][L-1:0]          out_spike,
  output vmem_t [N-1:0][M-1:0][L-1:0]          out_vmem,
  output meta_t [N-1:0][M-1:0][L-1:0]          out_meta
);

  item_t [N-1:0][M-1:0] sreg;   // item each CU took on the last step
  item_t [N-1:0][M-1:0] enter;  // item entering each CU on this step
  logic  [N-1:0][M-1:0] cu_ready, cu_busy;

  always_comb begin
    for (int r = 0; r < N; r++)
      for (int c = 0; c < M; c++)
        if (systolic) enter[r][c] = (c == 0) ? sys_in[r] : sreg[r][c-1];
        else          enter[r][c] = uni_in[r][c];
    for (int c = 0; c < M; c++) col_tag[c] = enter[0][c].tag;
  end

  assign step = advance && (&cu_ready);

  logic inflight;
  always_comb begin
    inflight = 1'b0;
    for (int r = 0; r < N; r++)
      for (int c = 0; c < M-1; c++)
        if (systolic && sreg[r][c].valid) inflight = 1'b1;
  end
  assign idle = !inflight && !(|cu_busy);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    sreg <= '0;
    else if (step) sreg <= enter;
  end

  for (genvar r = 0; r < N; r++) begin : g_row
    for (genvar c = 0; c < M; c++) begin : g_col
      cu u_cu (
        .clk, .rst_n, .mode, .vth, .first_step,
        .ready(cu_ready[r][c]), .busy(cu_busy[r][c]),
        .load(step), .item(enter[r][c]), .w(col_w[c]),
        .vmem_re(vmem_re[r][c]), .vmem_raddr(vmem_raddr[r][c]), .vmem_rdata(vmem_rdata[r][c]),
        .out_valid(out_valid[r][c]), .out_spike(out_spike[r][c]),
        .out_vmem(out_vmem[r][c]), .out_meta(out_meta[r][c])
      );
    end
  end

endmodule
