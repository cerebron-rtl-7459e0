// Computing unit (CU): L reconfigurable PEs side by side.
//
// In cascade mode (standard and pointwise convolution) the L PEs share one output
// neuron: PE l accumulates its slice of the input channels and the partial sums run
// down the chain PE0 -> PE(L-1); the tail PE adds the membrane potential and fires.
// This is how the CU gains parallelism over the channel dimension. In stand-alone and
// pooling modes every PE owns its own output neuron and fires on its own.
//
// Interface: one item per step (see cerebron_pkg::item_t) and one weight vector per
// PE. `ready` is high when every PE can take the item. Each PE has a membrane
// potential port: a read is requested (`vmem_re`, address `vmem_raddr`) when a
// `first` item is loaded and the data is expected on `vmem_rdata` the next cycle;
// firings appear on out_valid/out_spike/out_vmem/out_meta per PE.
// The chain structure follows the design description; the item format is this
// implementation's own.
module cu
  import cerebron_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  pe_mode_e             mode,
  input  vmem_t                vth,
  input  logic                 first_step,
  output logic                 ready,
  output logic                 busy,
  input  logic                 load,
  input  item_t                item,
  input  wvec_t [L-1:0]        w,
  output logic  [L-1:0]        vmem_re,
  output logic  [L-1:0][VAW-1:0] vmem_raddr,
  input  vmem_t [L-1:0]        vmem_rdata,
  output logic  [L-1:0]        out_valid,
  output logic  [L-1:0]        out_spike,
  output vmem_t [L-1:0]        out_vmem,
  output meta_t [L-1:0]        out_meta
);
  localparam int unsigned AW = 24;

  logic [L-1:0]         pe_ready, pe_busy;
  logic [L:0][AW-1:0]   psum;
  logic [L:0]           psum_v, psum_r;

  assign psum[0]   = '0;
  assign psum_v[0] = 1'b0;
  assign psum_r[L] = 1'b0;

  for (genvar l = 0; l < L; l++) begin : g_pe
    logic ld;
    assign ld = load && item.valid && item.en[l];
    assign vmem_re[l]    = ld && ready && item.first;
    assign vmem_raddr[l] = item.meta.vaddr;
    pe #(.IS_HEAD(l == 0), .IS_TAIL(l == L-1), .AW(AW)) u_pe (
      .clk, .rst_n, .mode, .vth, .first_step,
      .ready(pe_ready[l]), .load(ld && ready), .idx(item.idx[l]), .w(w[l]),
      .first(item.first), .last(item.last), .meta_in(item.meta),
      .vmem_rdata(vmem_rdata[l]),
      .psum_in(psum[l]), .psum_in_valid(psum_v[l]), .psum_in_ready(psum_r[l]),
      .psum_out(psum[l+1]), .psum_out_valid(psum_v[l+1]), .psum_out_ready(psum_r[l+1]),
      .out_valid(out_valid[l]), .out_spike(out_spike[l]), .out_vmem(out_vmem[l]),
      .out_meta(out_meta[l]), .busy(pe_busy[l])
    );
  end

  assign ready = &pe_ready;
  assign busy  = |pe_busy;

endmodule
